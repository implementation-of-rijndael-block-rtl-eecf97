// tb_aes_sub_bytes -- random states through the Substitution unit in both
// modes, compared with the reference S-box and SI-box, plus a round trip.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, dout2;
  logic         dec;
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

  aes_sub_bytes dut  (.state_in(din),  .decrypt(dec),  .state_out(dout));
  aes_sub_bytes dut2 (.state_in(dout), .decrypt(!dec), .state_out(dout2));

  initial begin
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; dec = 0; #1;
    check(dout, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 B round 1 SubBytes");
    for (int n = 0; n < 400; n++) begin
      din = rand128(); dec = n[0]; #1;
      check(dout, sub_bytes(din, dec), $sformatf("mode %0d random %0d", dec, n));
      check(dout2, din, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
