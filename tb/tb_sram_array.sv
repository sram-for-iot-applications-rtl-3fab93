// tb_sram_array: checks the cell array and its bit-line model.
//
// Fills every row through the write drivers, then for 600 random steps either
// writes a random subset of columns of a random row, or precharges and reads a
// row. Checks: after precharge both lines of every column are high; with a row
// selected each column carries its stored bit (bl) and its complement (blb),
// compared with a 16 x 16 reference; with no row selected and no precharge the
// lines stay high; unselected rows and columns keep their contents.
module tb_sram_array;
  logic [15:0] wl, col_we, col_wd, bl, blb;
  logic        pc;
  logic [15:0] ref_rows [16];
  int checks = 0, failures = 0;

  sram_array dut (.wl(wl), .pc(pc), .col_we(col_we), .col_wd(col_wd), .bl(bl), .blb(blb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_row(input int r, input logic [15:0] mask, input logic [15:0] d);
    col_we = mask; col_wd = d;
    #1 wl = 16'(1) << r;
    #1 wl = '0;
    #1 col_we = '0;
    ref_rows[r] = (ref_rows[r] & ~mask) | (d & mask);
  endtask

  task automatic read_row(input int r);
    pc = 1'b1;
    #1 check(bl == 16'hFFFF && blb == 16'hFFFF, "precharged");
    pc = 1'b0;
    #1 check(bl == 16'hFFFF && blb == 16'hFFFF, "idle lines stay high");
    wl = 16'(1) << r;
    #1 check(bl == ref_rows[r] && blb == ~ref_rows[r],
             $sformatf("row %0d bl=%04h blb=%04h expected %04h", r, bl, blb, ref_rows[r]));
    wl = '0;
    #1;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; pc = 1'b0; col_we = '0; col_wd = '0;
    foreach (ref_rows[i]) ref_rows[i] = '0;
    for (int r = 0; r < 16; r++) write_row(r, 16'hFFFF, 16'($urandom));
    for (int r = 0; r < 16; r++) read_row(r);
    for (int n = 0; n < 600; n++) begin
      if ($urandom % 2) write_row($urandom % 16, 16'($urandom), 16'($urandom));
      else              read_row($urandom % 16);
    end
    for (int r = 0; r < 16; r++) read_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
