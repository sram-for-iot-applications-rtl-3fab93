// tb_row_decoder: exhaustive check of the word-line decoder.
//
// For every address and both values of the enable, compares the 16 word
// lines with a one-hot value built by the testbench (all zero when disabled).
module tb_row_decoder;
  logic [3:0]  a;
  logic        en;
  logic [15:0] wl;
  int checks = 0, failures = 0;

  row_decoder dut (.a(a), .en(en), .wl(wl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expect_wl;
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 16; i++) begin
        a = 4'(i);
        en = e[0];
        #1;
        expect_wl = '0;
        if (e == 1) expect_wl[i] = 1'b1;
        checks++;
        if (wl !== expect_wl) begin
          failures++;
          $display("FAIL: a=%0d en=%0d wl=%04h expected %04h", i, e, wl, expect_wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
