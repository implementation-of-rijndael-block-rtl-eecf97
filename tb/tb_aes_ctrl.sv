// tb_aes_ctrl -- the sequencer on its own. For each mode and key length it
// counts the cycles from start to done, the load, key-step, initial-round
// and round strobes, and checks where the final round falls, that the key
// generator is never stepped in the final round and that start is ignored
// while busy.
module tb_aes_ctrl;
  import aes_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start = 0, decrypt = 0;
  key_len_e   key_len = KEY_128;
  logic       load, key_fwd, key_inv, do_init, do_round, final_round, mode, busy, done;
  key_len_e   klen;
  logic [3:0] round;
  int checks = 0, failures = 0, cycles = 0;

  aes_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(bit dec, key_len_e kl);
    int nr = (kl == KEY_128) ? 10 : (kl == KEY_192) ? 12 : 14;
    int n_cyc = 0, n_load = 0, n_fwd = 0, n_inv = 0, n_init = 0, n_round = 0;
    int n_final = 0, n_step_in_final = 0, last_round = 0;
    @(negedge clk);
    start = 1; decrypt = dec; key_len = kl;
    #1;
    n_load += int'(load);
    @(negedge clk);
    start = 1;                        // held high: must be ignored while busy
    decrypt = !dec; key_len = KEY_256;
    while (!done) begin
      n_cyc++;
      n_load += int'(load); n_fwd += int'(key_fwd); n_inv += int'(key_inv);
      n_init += int'(do_init); n_round += int'(do_round);
      if (final_round) begin
        n_final++; last_round = int'(round);
        if (key_fwd || key_inv) n_step_in_final++;
      end
      if (do_round && mode != dec) failures++;
      @(negedge clk);
      if (n_cyc > 100) break;
    end
    start = 0;
    expect_eq(n_cyc + 1, dec ? 2*nr + 2 : nr + 2, "start-to-done cycles");
    expect_eq(n_load, 1, "loads");
    expect_eq(n_init, 1, "initial rounds");
    expect_eq(n_round, nr, "rounds");
    expect_eq(n_final, 1, "final rounds");
    expect_eq(last_round, nr, "final round number");
    expect_eq(n_step_in_final, 0, "key steps in final round");
    expect_eq(n_fwd, dec ? nr : nr, "forward key steps");
    expect_eq(n_inv, dec ? nr : 0, "backward key steps");
    expect_eq(int'(busy), 0, "idle after done");
    expect_eq(int'(klen), int'(kl), "latched key length");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      run(d[0], KEY_128);
      run(d[0], KEY_192);
      run(d[0], KEY_256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
