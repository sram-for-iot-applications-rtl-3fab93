// tb_cycle_counter: checks the 5-bit SCLK cycle counter.
//
// Counts 40 rising edges (so the count wraps past 31), checking each value
// against an integer kept by the testbench, then pulses the reset in the
// middle of a count and checks that the count returns to zero at once and
// restarts from one on the next edge.
module tb_cycle_counter;
  logic       sclk = 1'b1, rst_n = 1'b1;
  logic [4:0] q;
  int checks = 0, failures = 0;

  cycle_counter dut (.sclk(sclk), .rst_n(rst_n), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    #5 sclk = 1'b0;
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
    #1 rst_n = 1'b0;
    #1;
    check(q == 5'd0, "zero in reset");
    tick();
    check(q == 5'd0, "held while in reset");
    rst_n = 1'b1;
    for (int n = 1; n <= 40; n++) begin
      tick();
      check(q == 5'(n % 32), $sformatf("count %0d got %0d", n, q));
    end
    rst_n = 1'b0;
    #1;
    check(q == 5'd0, "asynchronous clear");
    rst_n = 1'b1;
    tick();
    check(q == 5'd1, "restart at one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
