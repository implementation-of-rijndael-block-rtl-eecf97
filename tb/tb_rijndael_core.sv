// tb_rijndael_core -- end-to-end test of the Rijndael processor at its
// default (and only) configuration.
//
// Runs the FIPS-197 known-answer vectors for 128, 192 and 256-bit keys in
// both directions, then random blocks with random keys, key sizes and modes
// against the reference model, including decryption of the block just
// encrypted. Each operation's start-to-done latency is checked (Nr + 2
// encrypting, 2*Nr + 2 decrypting), as is out_data staying put after done.
// It also counts how often each mechanism of the design was exercised:
// both modes, each key size, the decryption key set-up pass, the final
// round without (Inverse) MixColumn, each kind of key step for 192-bit keys
// (SubWord at word 0, at word 2, none) and for 256-bit keys (with and
// without RotWord/Rcon), and a start request ignored while busy. A
// mechanism never seen counts as a failure.
module tb_rijndael_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         start = 0, decrypt = 0;
  key_len_e     key_len = KEY_128;
  logic [255:0] key = '0;
  logic [127:0] in_data = '0;
  logic         busy, done;
  logic [127:0] out_data;
  int checks = 0, failures = 0, cycles = 0;

  rijndael_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters --------------------------------------------
  typedef enum int {
    M_ENCRYPT, M_DECRYPT, M_K128, M_K192, M_K256, M_KEY_SETUP, M_FINAL_BYPASS,
    M_K192_WORD0, M_K192_WORD2, M_K192_NONE, M_K256_ROT, M_K256_SUB,
    M_START_IGNORED, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"encrypt", "decrypt", "128-bit key", "192-bit key",
    "256-bit key", "decryption key set-up cycle", "final round without MixColumn",
    "192-bit step, SubWord at word 0", "192-bit step, SubWord at word 2",
    "192-bit step, no SubWord", "256-bit step with RotWord", "256-bit step, SubWord only",
    "start ignored while busy"};

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.st == dut.u_ctrl.S_KEY_SETUP) mech[M_KEY_SETUP]++;
    if (dut.final_round) mech[M_FINAL_BYPASS]++;
    if (start && busy) mech[M_START_IGNORED]++;
    if (dut.key_fwd && dut.u_keys.klen == KEY_192)
      case ((4 * int'(dut.u_keys.kr)) % 6)
        0: mech[M_K192_WORD0]++;
        4: mech[M_K192_WORD2]++;
        default: mech[M_K192_NONE]++;
      endcase
    if (dut.key_fwd && dut.u_keys.klen == KEY_256) begin
      if (dut.u_keys.kr[0]) mech[M_K256_SUB]++; else mech[M_K256_ROT]++;
    end
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // One block operation; returns the result
  task automatic op(bit dec, key_len_e kl, logic [255:0] k, logic [127:0] din,
                    output logic [127:0] dout, input bit hold_start = 0);
    int nr = (kl == KEY_128) ? 10 : (kl == KEY_192) ? 12 : 14;
    int lat = 0;
    @(negedge clk);
    start = 1; decrypt = dec; key_len = kl; key = k; in_data = din;
    @(negedge clk);
    // inputs are only sampled with start: scramble them while busy
    start = hold_start; decrypt = !dec; key = rand256(); in_data = rand128();
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    start = 0;
    checks++;
    if (lat != (dec ? 2*nr + 2 : nr + 2)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d (dec %0d, Nr %0d)", lat, dec ? 2*nr + 2 : nr + 2, dec, nr);
    end
    dout = out_data;
    mech[dec ? M_DECRYPT : M_ENCRYPT]++;
    mech[kl == KEY_128 ? M_K128 : kl == KEY_192 ? M_K192 : M_K256]++;
    @(negedge clk);
    check(out_data, dout, "result held after done");
  endtask

  task automatic kat(key_len_e kl, logic [255:0] k, logic [127:0] pt, logic [127:0] ct, string what);
    logic [127:0] r;
    op(0, kl, k, pt, r);
    check(r, ct, {what, " encrypt"});
    op(1, kl, k, ct, r);
    check(r, pt, {what, " decrypt"});
  endtask

  initial begin
    logic [127:0] r1, r2, pt;
    logic [255:0] k;
    key_len_e     kl;
    repeat (3) @(negedge clk);
    rst_n = 1;

    kat(KEY_128, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0},
        128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B");
    kat(KEY_128, {128'h000102030405060708090a0b0c0d0e0f, 128'h0},
        128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    kat(KEY_192, {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0},
        128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, "FIPS-197 C.2");
    kat(KEY_256, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089, "FIPS-197 C.3");

    for (int n = 0; n < 60; n++) begin
      kl = key_len_e'(n % 3);
      k  = rand256();
      pt = rand128();
      op(0, kl, k, pt, r1, n[2]);
      check(r1, aes_ref_pkg::encrypt(pt, k, kl == KEY_128 ? 4 : kl == KEY_192 ? 6 : 8),
            $sformatf("random encrypt %0d", n));
      op(1, kl, k, r1, r2, n[3]);
      check(r2, pt, $sformatf("random round trip %0d", n));
      pt = rand128();
      op(1, kl, k, pt, r2);
      check(r2, aes_ref_pkg::decrypt(pt, k, kl == KEY_128 ? 4 : kl == KEY_192 ? 6 : 8),
            $sformatf("random decrypt %0d", n));
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-34s seen %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never exercised"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
