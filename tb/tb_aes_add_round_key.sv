// tb_aes_add_round_key -- Add Round Key on a published example and on random
// state / key pairs.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  aes_add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 B initial round");
    for (int n = 0; n < 400; n++) begin
      logic [127:0] e;
      din = rand128(); key = rand128(); #1;
      for (int b = 0; b < 128; b++) e[b] = (din[b] != key[b]);
      check(dout, e, $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
