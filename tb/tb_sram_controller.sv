// tb_sram_controller: checks the control timing derived from the cycle count.
//
// The testbench plays the SPI master and also stands in for the cycle counter
// and the MOSI shift register, feeding the controller its own count of rising
// edges and its own copy of the received bits. For 200 random reads and
// writes (and some writes abandoned after 12 cycles) it checks, after every
// SCLK edge: the opcode bit after the falling edge at count 1; the address
// after the falling edge at count 6; read strobes (pc after rising edge 7
// only; wl, col, muxen, sae after edge 8 only); write strobes (pc after edge
// 14 only; wl, wr, col from edge 16 until deselect); the write data after edge
// 16; and that every strobe is low once chip select rises.
module tb_sram_controller;
  import sram_pkg::*;
  logic       sclk = 1'b1, cs_n = 1'b0, mosi = 1'b0;
  logic [4:0] ctr, addr;
  logic [7:0] sdi, data;
  logic       rwn;
  sram_ctrl_t ctrl;
  int checks = 0, failures = 0;

  sram_controller dut (.sclk(sclk), .cs_n(cs_n), .mosi(mosi), .ctr(ctr), .sdi(sdi),
                       .addr(addr), .data(data), .rwn(rwn), .ctrl(ctrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic xfer(input logic rd, input logic [4:0] a, input logic [7:0] d, input int nbits);
    logic [15:0] w;
    w = {rd, a, 2'b00, d};
    ctr = '0;
    cs_n = 1'b0;
    #10;
    for (int e = 1; e <= nbits; e++) begin
      sclk = 1'b0; mosi = w[16 - e];
      #1;
      if (e - 1 == 1) check(rwn == rd, "opcode latched");
      if (e - 1 == 6) check(addr == a, $sformatf("address latched %0d", addr));
      #4 sclk = 1'b1;
      #1;
      ctr = 5'(e);
      sdi = {sdi[6:0], mosi};
      if (rd) begin
        check(ctrl.pc == (e == 7), $sformatf("read pc after edge %0d", e));
        check(ctrl.wl == (e == 8) && ctrl.col == (e == 8) && ctrl.muxen == (e == 8) &&
              ctrl.sae == (e == 8) && !ctrl.wr, $sformatf("read strobes after edge %0d", e));
      end else begin
        check(ctrl.pc == (e == 14), $sformatf("write pc after edge %0d", e));
        check(ctrl.wl == (e >= 16) && ctrl.wr == (e >= 16) && ctrl.col == (e >= 16) &&
              !ctrl.muxen && !ctrl.sae, $sformatf("write strobes after edge %0d", e));
        if (e == 16) check(data == d, $sformatf("write data %02h expected %02h", data, d));
      end
      #4;
    end
    #10;
    if (!rd && nbits == 16) check(ctrl.wl && ctrl.wr && ctrl.col, "write strobes held until deselect");
    cs_n = 1'b1;
    #1 check(ctrl == '0, "strobes cleared on deselect");
    #10;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctr = '0; sdi = '0;
    #1 cs_n = 1'b1;
    #10;
    for (int n = 0; n < 200; n++)
      xfer(1'($urandom), 5'($urandom), 8'($urandom), (n % 10 == 9) ? 12 : 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
