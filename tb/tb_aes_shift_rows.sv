// tb_aes_shift_rows -- Shift Rows and Inverse Shift Rows on random states
// against the reference permutation, on a published example, and a round
// trip through both modes.
module tb_aes_shift_rows;
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

  aes_shift_rows dut  (.state_in(din),  .decrypt(dec),  .state_out(dout));
  aes_shift_rows dut2 (.state_in(dout), .decrypt(!dec), .state_out(dout2));

  initial begin
    din = 128'hd42711aee0bf98f1b8b45de51e415230; dec = 0; #1;
    check(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 B round 1 ShiftRows");
    din = 128'h000102030405060708090a0b0c0d0e0f; dec = 1; #1;
    check(dout, 128'h000d0a0704010e0b0805020f0c090603, "inverse on index pattern");
    for (int n = 0; n < 400; n++) begin
      din = rand128(); dec = n[0]; #1;
      check(dout, shift_rows(din, dec), $sformatf("mode %0d random %0d", dec, n));
      check(dout2, din, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
