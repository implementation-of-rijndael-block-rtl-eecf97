// tb_aes_inv_sbox -- checks every SI-box entry against the reference model and a
// few published SI-box values, and that the table is a permutation.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  bit seen [256];

  aes_inv_sbox dut (.in_byte(din), .out_byte(dout));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] kin [6]  = '{8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, 8'h00};
    logic [7:0] kout [6] = '{8'h00, 8'h01, 8'h53, 8'hff, 8'h10, 8'h52};
    init();
    for (int i = 0; i < 6; i++) begin
      din = kin[i]; #1;
      check(dout, kout[i], $sformatf("known SI(%02h)", kin[i]));
    end
    for (int x = 0; x < 256; x++) begin
      din = 8'(x); #1;
      check(dout, isb[x], $sformatf("SI(%02h)", x));
      seen[dout] = 1;
    end
    for (int x = 0; x < 256; x++) begin
      checks++;
      if (!seen[x]) begin failures++; $display("FAIL value %02h never produced", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
