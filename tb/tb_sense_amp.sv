// tb_sense_amp: checks the sense amplifier model.
//
// With sae high, a differential input must appear at the output (value of
// bl); with equal inputs, or with sae low, each output must keep its previous
// value. 1000 random steps are compared with a reference kept in the
// testbench.
module tb_sense_amp;
  logic       sae;
  logic [7:0] bl, blb, dout, e_out;
  int checks = 0, failures = 0;

  sense_amp dut (.sae(sae), .bl(bl), .blb(blb), .dout(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Set a known output first.
    sae = 1'b1; bl = 8'h00; blb = 8'hFF;
    #1 sae = 1'b0;
    #1 e_out = 8'h00;
    for (int n = 0; n < 1000; n++) begin
      sae = 1'($urandom);
      bl  = 8'($urandom);
      blb = (n % 3 == 0) ? 8'($urandom) : ~bl;
      #1;
      if (sae) for (int i = 0; i < 8; i++) if (bl[i] != blb[i]) e_out[i] = bl[i];
      checks++;
      if (dout != e_out) begin
        failures++;
        $display("FAIL: step %0d sae=%0d dout=%02h expected %02h", n, sae, dout, e_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
