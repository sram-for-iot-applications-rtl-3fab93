// tb_spi_interface: checks the SPI front end with a stand-in memory.
//
// An SPI mode 2 master runs 200 random transactions. The testbench presents a
// random byte on the sense-amplifier input for each read and checks that it
// comes out on MISO, MSB first, sampled at rising edges 9 to 16. For writes it
// checks the address and data handed to the array at the end of the frame and
// that wr is high then; for reads it checks the address and that muxen rose
// exactly once.
module tb_spi_interface;
  import sram_pkg::*;
  logic       sclk = 1'b1, cs_n = 1'b0, mosi = 1'b0, miso, rwn;
  logic [7:0] dsns, data;
  logic [4:0] addr;
  sram_ctrl_t ctrl;
  int checks = 0, failures = 0, n_muxen = 0;

  spi_interface dut (.sclk(sclk), .cs_n(cs_n), .mosi(mosi), .miso(miso), .dsns(dsns),
                     .addr(addr), .data(data), .rwn(rwn), .ctrl(ctrl));

  always @(posedge ctrl.muxen) n_muxen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic xfer(input logic rd, input logic [4:0] a, input logic [7:0] d);
    logic [15:0] w, r;
    w = {rd, a, 2'b00, d};
    dsns = 8'($urandom);
    n_muxen = 0;
    cs_n = 1'b0;
    #500;
    for (int i = 0; i < 16; i++) begin
      sclk = 1'b0; mosi = w[15 - i];
      #500 sclk = 1'b1;
      r[15 - i] = miso;
      #500;
    end
    check(addr == a, "address");
    check(rwn == rd, "opcode");
    if (rd) begin
      check(r[7:0] == dsns, $sformatf("MISO %02h expected %02h", r[7:0], dsns));
      check(n_muxen == 1, "one load per read");
    end else begin
      check(data == d && ctrl.wr, $sformatf("write data %02h expected %02h", data, d));
      check(n_muxen == 0, "no load on write");
    end
    #500 cs_n = 1'b1;
    #1000;
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 cs_n = 1'b1;
    #1000;
    for (int n = 0; n < 200; n++) xfer(1'($urandom), 5'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
