// tb_spi_sram: end-to-end test of the SPI SRAM at its full size.
//
// An SPI mode 2 master (clock idles high, 1 us period) writes and reads the
// memory through the four pins only, and a 32-byte reference array predicts
// every byte read back. It runs the measured sequence first (write 0xDC to
// address 0x19, then read it), then fills all 32 addresses, reads them back,
// overwrites a random set and reads again, and finally checks that a write
// abandoned before its 16th cycle changes nothing. At every rising SCLK edge
// it also checks the strobe timing against the cycle numbers (read: pc after
// edge 7, access after edge 8 until edge 9; write: pc after edge 14, access
// from edge 16 until chip select rises), and counts each mechanism:
// precharge before read, precharge before write, read access, write access,
// both byte halves of a row, an overwrite and an abandoned write.
module tb_spi_sram;
  import sram_pkg::*;

  localparam time TPER = 1000ns;

  // Chip select starts low and is raised at once, so that the asynchronous
  // clear on deselect sees an edge in simulation, as a power-up would give.
  logic sclk = 1'b1, cs_n = 1'b0, mosi = 1'b0;
  logic miso;

  spi_sram dut (.sclk(sclk), .cs_n(cs_n), .mosi(mosi), .miso(miso));

  int checks = 0, failures = 0;
  logic [7:0] ref_mem [32];
  bit         ref_valid [32];

  // Mechanism counters.
  int n_rd_pc = 0, n_wr_pc = 0, n_rd_acc = 0, n_wr_acc = 0;
  int n_half0 = 0, n_half1 = 0, n_overwrite = 0, n_abort = 0;

  // Edge index within the current transaction, kept by the testbench.
  int edge_no = 0;
  bit cur_read = 1'b0;
  int cur_bits = 16;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // One transaction of nbits SCLK cycles. mosi_word is sent MSB first;
  // miso_word returns the bits sampled on the rising edges.
  task automatic spi_xfer(input logic [15:0] mosi_word, input int nbits,
                          output logic [15:0] miso_word);
    miso_word = '0;
    cur_read  = mosi_word[15];
    cur_bits  = nbits;
    edge_no   = 0;
    cs_n = 1'b0;
    #(TPER);
    for (int i = 0; i < nbits; i++) begin
      sclk = 1'b0;
      mosi = mosi_word[15 - i];
      #(TPER/2);
      sclk = 1'b1;
      miso_word[15 - i] = miso;
      #(TPER/2);
    end
    #(TPER);
    cs_n = 1'b1;
    #(TPER);
  endtask

  task automatic do_write(input logic [4:0] a, input logic [7:0] d);
    logic [15:0] r;
    if (ref_valid[a] && ref_mem[a] != d) n_overwrite++;
    spi_xfer({OP_WRITE, a, 2'b00, d}, 16, r);
    ref_mem[a] = d;
    ref_valid[a] = 1'b1;
    if (a[4]) n_half1++; else n_half0++;
  endtask

  task automatic do_read(input logic [4:0] a);
    logic [15:0] r;
    spi_xfer({OP_READ, a, 2'b00, 8'h00}, 16, r);
    check(ref_valid[a] && r[7:0] == ref_mem[a],
          $sformatf("read addr %0d got %02h expected %02h", a, r[7:0], ref_mem[a]));
  endtask

  // Strobe timing, checked just after each rising edge.
  always @(posedge sclk) begin
    if (!cs_n) begin
      edge_no++;
      #1;
      if (cur_bits == 16) begin
        if (cur_read) begin
          check(dut.u_spi.ctrl.pc == (edge_no == 7), $sformatf("read pc after edge %0d", edge_no));
          check(dut.u_spi.ctrl.wl == (edge_no == 8) && dut.u_spi.ctrl.sae == (edge_no == 8) &&
                dut.u_spi.ctrl.col == (edge_no == 8) && dut.u_spi.ctrl.muxen == (edge_no == 8),
                $sformatf("read access strobes after edge %0d", edge_no));
          check(!dut.u_spi.ctrl.wr, "no wr during read");
          if (edge_no == 7) n_rd_pc++;
          if (edge_no == 8) n_rd_acc++;
        end else begin
          check(dut.u_spi.ctrl.pc == (edge_no == 14), $sformatf("write pc after edge %0d", edge_no));
          check(dut.u_spi.ctrl.wl == (edge_no == 16) && dut.u_spi.ctrl.wr == (edge_no == 16) &&
                dut.u_spi.ctrl.col == (edge_no == 16),
                $sformatf("write access strobes after edge %0d", edge_no));
          check(!dut.u_spi.ctrl.sae && !dut.u_spi.ctrl.muxen, "no sense during write");
          if (edge_no == 14) n_wr_pc++;
          if (edge_no == 16) n_wr_acc++;
        end
      end
    end
  end

  // Strobes fall as soon as chip select rises.
  always @(posedge cs_n) begin
    #1;
    check(dut.u_spi.ctrl == '0, "strobes cleared on deselect");
  end

  initial begin : watchdog
    #(TPER * 40 * 200);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [15:0] r;
    logic [4:0]  a;
    logic [7:0]  d;
    foreach (ref_valid[i]) ref_valid[i] = 1'b0;
    #1 cs_n = 1'b1;
    #(TPER * 3);

    // The measured sequence: write 0xDC to 0x19, read it back.
    do_write(5'h19, 8'hDC);
    do_read(5'h19);

    // Fill every address, then read all back.
    for (int i = 0; i < 32; i++) do_write(5'(i), 8'($urandom));
    for (int i = 0; i < 32; i++) do_read(5'(i));

    // Overwrite a random selection, reading back after each write and at the end.
    for (int k = 0; k < 24; k++) begin
      a = 5'($urandom);
      d = 8'($urandom);
      do_write(a, d);
      do_read(a);
      do_read(5'($urandom));
    end
    for (int i = 0; i < 32; i++) do_read(5'(i));

    // A write abandoned after 12 cycles must leave the byte unchanged.
    a = 5'h0A;
    spi_xfer({OP_WRITE, a, 2'b00, ~ref_mem[a]}, 12, r);
    n_abort++;
    do_read(a);

    // Every mechanism must have happened at least once.
    check(n_rd_pc > 0,     "precharge before read seen");
    check(n_wr_pc > 0,     "precharge before write seen");
    check(n_rd_acc > 0,    "read access seen");
    check(n_wr_acc > 0,    "write access seen");
    check(n_half0 > 0,     "A4=0 half written");
    check(n_half1 > 0,     "A4=1 half written");
    check(n_overwrite > 0, "overwrite seen");
    check(n_abort > 0,     "abandoned write seen");
    $display("mechanisms: rd_pc=%0d wr_pc=%0d rd_acc=%0d wr_acc=%0d half0=%0d half1=%0d overwrite=%0d abort=%0d",
             n_rd_pc, n_wr_pc, n_rd_acc, n_wr_acc, n_half0, n_half1, n_overwrite, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
