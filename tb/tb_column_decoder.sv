// tb_column_decoder: random check of column selection.
//
// Drives 2000 random combinations of A[4], col, wr, write data and bit lines
// and compares every output with a reference built bit by bit: write enables
// only on the eight columns of the chosen half when col and wr are high, the
// sense-amplifier inputs taken from that half when col is high and wr low,
// and no differential (both lines high) otherwise.
module tb_column_decoder;
  logic        sel, col, wr;
  logic [7:0]  wdata, sbl, sblb;
  logic [15:0] bl, blb, col_we, col_wd;
  int checks = 0, failures = 0;

  column_decoder dut (.sel(sel), .col(col), .wr(wr), .wdata(wdata), .bl(bl), .blb(blb),
                      .col_we(col_we), .col_wd(col_wd), .sbl(sbl), .sblb(sblb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e_we;
    logic [7:0]  e_sbl, e_sblb, e_wd;
    for (int n = 0; n < 2000; n++) begin
      sel = 1'($urandom); col = 1'($urandom); wr = 1'($urandom);
      wdata = 8'($urandom); bl = 16'($urandom); blb = 16'($urandom);
      #1;
      e_we = '0; e_sbl = 8'hFF; e_sblb = 8'hFF;
      if (col && wr) e_we = sel ? 16'hFF00 : 16'h00FF;
      if (col && !wr) begin
        e_sbl  = sel ? bl[15:8]  : bl[7:0];
        e_sblb = sel ? blb[15:8] : blb[7:0];
      end
      e_wd = sel ? col_wd[15:8] : col_wd[7:0];
      checks++;
      if (col_we != e_we || sbl != e_sbl || sblb != e_sblb || (col && e_wd != wdata)) begin
        failures++;
        $display("FAIL: sel=%0d col=%0d wr=%0d we=%04h sbl=%02h sblb=%02h", sel, col, wr, col_we, sbl, sblb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
