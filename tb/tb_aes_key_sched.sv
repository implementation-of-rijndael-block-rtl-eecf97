// tb_aes_key_sched -- the on-the-fly key generator for all three key sizes.
// After a load it is stepped forward through all Nr round keys and then back
// down to round key 0; every round key on the way is compared with the
// reference key expansion. Uses the FIPS-197 keys and random keys.
module tb_aes_key_sched;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         load = 0, step_fwd = 0, step_inv = 0;
  key_len_e     key_len = KEY_128;
  logic [255:0] key_in = '0;
  state_t       round_key;
  logic [3:0]   key_round;
  int checks = 0, failures = 0, cycles = 0;

  aes_key_sched dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(logic [255:0] key, key_len_e kl);
    logic [31:0] w [60];
    int nk = (kl == KEY_128) ? 4 : (kl == KEY_192) ? 6 : 8;
    int nr = nk + 6;
    expand(key, nk, w);
    @(negedge clk); load = 1; key_in = key; key_len = kl;
    @(negedge clk); load = 0; key_in = rand256();  // key is sampled at load only
    for (int r = 0; r <= nr; r++) begin
      check(round_key, aes_ref_pkg::round_key(w, r), $sformatf("nk %0d fwd key %0d", nk, r));
      checks++; if (key_round != 4'(r)) failures++;
      if (r != nr) begin step_fwd = 1; @(negedge clk); step_fwd = 0; end
    end
    for (int r = nr - 1; r >= 0; r--) begin
      step_inv = 1; @(negedge clk); step_inv = 0;
      check(round_key, aes_ref_pkg::round_key(w, r), $sformatf("nk %0d inv key %0d", nk, r));
    end
    // a backward step at round key 0 is ignored
    step_inv = 1; @(negedge clk); step_inv = 0;
    check(round_key, aes_ref_pkg::round_key(w, 0), $sformatf("nk %0d hold at key 0", nk));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128);
    run({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY_128);
    run({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, KEY_192);
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, KEY_256);
    for (int n = 0; n < 20; n++) begin
      run(rand256(), KEY_128);
      run(rand256(), KEY_192);
      run(rand256(), KEY_256);
    end
    // one published value, independent of the reference model
    run({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128);
    @(negedge clk);
    repeat (10) begin step_fwd = 1; @(negedge clk); end
    step_fwd = 0;
    check(round_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 round key 10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
