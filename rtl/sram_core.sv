// sram_core: the 32-byte memory macro behind the SPI interface.
//
// It puts together the row decoder, the 16 x 16 cell array with its precharge,
// the column decoder with the write drivers, and the eight sense amplifiers.
// It has no clock: the controller's strobes sequence every access.
//   read:  pc high precharges the bit lines; then wl, col and sae together
//          select row A[3:0] and byte half A[4] and let the sense amplifiers
//          resolve; dsns holds the byte after sae falls.
//   write: wl, wr and col together drive the byte on data into the cells of
//          row A[3:0], half A[4]; the cells keep it once wl falls.
// The structure follows the published architecture.
//
// Interface: addr[4:0], data[7:0], ctrl (pc, wl, wr, col, muxen, sae) in;
// dsns[7:0] (sense amplifier outputs) out. muxen is not used here.
module sram_core
  import sram_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  input  sram_ctrl_t        ctrl,
  output logic [DATA_W-1:0] dsns
);

  logic [ROWS-1:0]   wl;
  logic [COLS-1:0]   col_we, col_wd, bl, blb;
  logic [DATA_W-1:0] sbl, sblb;

  row_decoder u_row_decoder (
    .a  (addr[ROW_W-1:0]),
    .en (ctrl.wl),
    .wl (wl)
  );

  sram_array u_array (
    .wl     (wl),
    .pc     (ctrl.pc),
    .col_we (col_we),
    .col_wd (col_wd),
    .bl     (bl),
    .blb    (blb)
  );

  column_decoder u_column_decoder (
    .sel    (addr[ADDR_W-1]),
    .col    (ctrl.col),
    .wr     (ctrl.wr),
    .wdata  (data),
    .bl     (bl),
    .blb    (blb),
    .col_we (col_we),
    .col_wd (col_wd),
    .sbl    (sbl),
    .sblb   (sblb)
  );

  sense_amp u_sense_amp (
    .sae  (ctrl.sae),
    .bl   (sbl),
    .blb  (sblb),
    .dout (dsns)
  );

endmodule
