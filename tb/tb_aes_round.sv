// tb_aes_round -- one round in the four combinations of mode and final
// round, against rounds composed from the reference model (decryption in the
// textbook order InvShiftRows, InvSubBytes), plus published round values.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic [127:0] din, key, dout;
  logic         dec, fin;
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

  aes_round dut (.state_in(din), .round_key(key), .decrypt(dec), .final_round(fin),
                 .state_out(dout));

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, bit d, bit f);
    if (!d) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (!f) s = mix_columns(s, 0);
      return s ^ k;
    end
    s = sub_bytes(shift_rows(s, 1), 1) ^ k;
    return f ? s : mix_columns(s, 1);
  endfunction

  initial begin
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; key = 128'ha0fafe1788542cb123a339392a6c7605;
    dec = 0; fin = 0; #1;
    check(dout, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 B round 1");
    din = 128'heb40f21e592e38848ba113e71bc342d2; key = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    fin = 1; #1;
    check(dout, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B round 10");
    for (int n = 0; n < 800; n++) begin
      din = rand128(); key = rand128(); dec = n[0]; fin = n[1]; #1;
      check(dout, ref_round(din, key, dec, fin), $sformatf("dec %0d final %0d random %0d", dec, fin, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
