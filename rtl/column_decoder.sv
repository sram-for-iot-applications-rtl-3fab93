// column_decoder: connects the eight columns of the addressed byte to the
// write drivers or to the sense amplifiers.
//
// Each 16-cell row holds two bytes. The address MSB, A[4], picks the half:
// bit i of the byte lives in column A[4]*8 + i. While col is high the
// selected columns are either driven with the write data (wr high) or passed
// to the eight sense amplifiers (wr low). Columns that are not selected are
// left alone, and when col is low the sense amplifier inputs see no
// differential (both lines high). That A[4] selects between the two bytes of
// a row and that the column decoder switches the bit lines between drivers and
// sense amplifiers follows the published architecture; the contiguous column
// order within a row is this design's choice.
//
// Interface: sel (A[4]), col, wr, wdata[DATA_W-1:0], bl/blb[COLS-1:0] in;
// col_we/col_wd[COLS-1:0] to the array, sbl/sblb[DATA_W-1:0] to the sense
// amplifiers. Purely combinational.
module column_decoder #(
  parameter int unsigned DATA_W = sram_pkg::DATA_W,
  parameter int unsigned COLS   = sram_pkg::COLS
) (
  input  logic              sel,
  input  logic              col,
  input  logic              wr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [COLS-1:0]   bl,
  input  logic [COLS-1:0]   blb,
  output logic [COLS-1:0]   col_we,
  output logic [COLS-1:0]   col_wd,
  output logic [DATA_W-1:0] sbl,
  output logic [DATA_W-1:0] sblb
);

  localparam int unsigned GROUPS = COLS / DATA_W;

  always_comb begin
    col_we = '0;
    col_wd = '0;
    sbl    = '1;
    sblb   = '1;
    for (int unsigned g = 0; g < GROUPS; g++) begin
      if (col && sel == g[0]) begin
        for (int unsigned i = 0; i < DATA_W; i++) begin
          col_we[g*DATA_W + i] = wr;
          col_wd[g*DATA_W + i] = wdata[i];
          if (!wr) begin
            sbl[i]  = bl[g*DATA_W + i];
            sblb[i] = blb[g*DATA_W + i];
          end
        end
      end
    end
  end

endmodule
