// tb_tx_shift_reg: checks the MISO parallel-to-serial register.
//
// For 50 random bytes: raises muxen across one falling SCLK edge to load the
// byte, then checks that MISO shows bit 7 right after that edge and the
// following bits, MSB first, after each later falling edge. Also checks that
// the output holds while chip select is high.
module tb_tx_shift_reg;
  logic       sclk = 1'b1, cs_n = 1'b0, muxen = 1'b0;
  logic [7:0] din;
  logic       miso;
  int checks = 0, failures = 0;

  tx_shift_reg dut (.sclk(sclk), .cs_n(cs_n), .muxen(muxen), .din(din), .miso(miso));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    for (int k = 0; k < 50; k++) begin
      d = 8'($urandom);
      din = d;
      muxen = 1'b1;
      #5 sclk = 1'b0;
      #1 check(miso == d[7], "bit 7 right after load");
      #4 sclk = 1'b1;
      muxen = 1'b0;
      din = ~d;
      for (int i = 6; i >= 0; i--) begin
        #5 sclk = 1'b0;
        #1 check(miso == d[i], $sformatf("byte %02h bit %0d", d, i));
        #4 sclk = 1'b1;
      end
    end
    // Deselected: no shifting.
    din = 8'h80;
    muxen = 1'b1;
    #5 sclk = 1'b0;
    #5 sclk = 1'b1;
    muxen = 1'b0;
    cs_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      #5 sclk = 1'b0;
      #1 check(miso == 1'b1, "hold while deselected");
      #4 sclk = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
