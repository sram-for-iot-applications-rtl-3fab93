// sram_array: the 16 x 16 array of six-transistor cells with its bit lines.
//
// Each cell is a pair of cross-coupled inverters reached through two access
// transistors gated by the row's word line; the array is modelled at the level
// of logic values. A cell takes the value driven onto its column while its
// word line is high and the column's write driver is enabled (col_we), and
// keeps it otherwise: the cell is a level-sensitive storage element, so it is
// written as a latch, and the latches this produces are the cells themselves.
//
// Bit lines are modelled as precharged wired-AND nodes: while pc is high both
// lines of every column are pulled high. When a word line is high, a selected
// cell storing 0 pulls bl low and one storing 1 pulls blb low, so the pair
// carries the cell value as a differential signal for the sense amplifiers.
// A column being written carries the driver's value. With nothing selected the
// lines stay at their precharged level. The array size, the 6T cell and the
// precharge-then-select read sequence follow the published design; the
// logic-level bit-line model and the storage at power-up (left unknown, as in
// a real SRAM) are this design's.
//
// Interface: wl[ROWS-1:0] (one-hot word lines), pc, col_we/col_wd[COLS-1:0]
// in; bl/blb[COLS-1:0] out. No clock.
module sram_array #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic [ROWS-1:0] wl,
  input  logic            pc,
  input  logic [COLS-1:0] col_we,
  input  logic [COLS-1:0] col_wd,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb
);

  // cells[r][c]: storage node q of the cell in row r, column c.
  logic [COLS-1:0] cells [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_latch begin
      for (int unsigned c = 0; c < COLS; c++)
        if (wl[r] && col_we[c]) cells[r][c] = col_wd[c];
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      if (pc) begin
        bl[c]  = 1'b1;
        blb[c] = 1'b1;
      end else if (col_we[c]) begin
        bl[c]  = col_wd[c];
        blb[c] = !col_wd[c];
      end else begin
        bl[c]  = 1'b1;
        blb[c] = 1'b1;
        for (int unsigned r = 0; r < ROWS; r++) begin
          if (wl[r] && !cells[r][c]) bl[c]  = 1'b0;
          if (wl[r] &&  cells[r][c]) blb[c] = 1'b0;
        end
      end
    end
  end

endmodule
