// tb_aes_inv_mix_columns -- Inverse MixColumn on published column examples
// (run backwards), on random states against the reference, and as the
// inverse of the reference MixColumn.
module tb_aes_inv_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
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

  aes_inv_mix_columns dut (.state_in(din), .state_out(dout));

  initial begin
    logic [127:0] x;
    din = 128'h8e4da1bc9fdc589d01010101c6c6c6c6; #1;
    check(dout, 128'hdb135345f20a225c01010101c6c6c6c6, "published columns 1");
    din = 128'hd5d5d7d64d7ebdf8046681e5e0cb199a; #1;
    check(dout, 128'hd4d4d4d52d26314cd4bf5d30e0b452ae, "published columns 2");
    for (int n = 0; n < 400; n++) begin
      din = rand128(); #1;
      check(dout, mix_columns(din, 1), $sformatf("random %0d", n));
      x = rand128(); din = mix_columns(x, 0); #1;
      check(dout, x, $sformatf("inverse of MixColumn %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
