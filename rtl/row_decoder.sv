// row_decoder: drives one of the word lines from the low address bits.
//
// A[3:0] selects one of 16 rows. The chosen word line is high only while the
// controller's wl strobe is high, so no cell is connected to its bit lines
// outside the access window. Purely combinational. That the low four address
// bits select the word line follows the published architecture; gating the
// decoder with wl is this design's way of timing the word line.
//
// Interface: a[ROW_W-1:0], en in; wl[ROWS-1:0] out (one-hot or all zero).
module row_decoder #(
  parameter int unsigned ROW_W = sram_pkg::ROW_W,
  parameter int unsigned ROWS  = sram_pkg::ROWS
) (
  input  logic [ROW_W-1:0] a,
  input  logic             en,
  output logic [ROWS-1:0]  wl
);

  always_comb begin
    wl = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      wl[r] = en && (a == ROW_W'(r));
  end

endmodule
