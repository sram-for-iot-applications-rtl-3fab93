// tb_rx_shift_reg: checks the MOSI serial-to-parallel register.
//
// Shifts 200 random bits in on rising SCLK edges while chip select is low and
// compares the register with the last eight bits sent (first bit in q[7]).
// Then clocks with chip select high and checks the register holds.
module tb_rx_shift_reg;
  logic       sclk = 1'b1, cs_n = 1'b0, mosi = 1'b0;
  logic [7:0] q, expect_q;
  int checks = 0, failures = 0;

  rx_shift_reg dut (.sclk(sclk), .cs_n(cs_n), .mosi(mosi), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(input logic b);
    #5 sclk = 1'b0; mosi = b;
    #5 sclk = 1'b1;
    #1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    expect_q = '0;
    for (int n = 0; n < 200; n++) begin
      b = 1'($urandom);
      tick(b);
      expect_q = {expect_q[6:0], b};
      if (n >= 7) check(q == expect_q, $sformatf("shift %0d got %02h expected %02h", n, q, expect_q));
    end
    cs_n = 1'b1;
    for (int n = 0; n < 8; n++) begin
      tick(~expect_q[0]);
      check(q == expect_q, "hold while deselected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
