// sram_pkg: sizes and frame timing shared by the SPI SRAM.
//
// The memory holds 32 bytes, arranged as 16 rows of 16 cells: the low four
// address bits pick a row (word line) and the top bit picks which half of the
// row holds the byte. A transaction is two 8-bit SPI frames, so the cycle
// counter runs from 0 to 16 while chip select is low.
//
// The CYC_* constants are the value of the cycle counter *before* the SCLK
// edge at which an event happens. The counter is cleared while chip select is
// high and counts rising edges, so "the rising edge of the Nth clock cycle"
// is the edge that sees the counter at N-1. The event cycle numbers (1st, 6th,
// 7th, 8th, 9th, 14th, 16th) follow the published read and write timing; the
// choice of which edge closes a one-cycle pulse is this design's reading of
// those diagrams.
package sram_pkg;

  localparam int unsigned ADDR_W   = 5;   // 32 bytes
  localparam int unsigned DATA_W   = 8;   // byte-wide words
  localparam int unsigned ROW_W    = 4;   // A[3:0] selects the word line
  localparam int unsigned ROWS     = 16;
  localparam int unsigned COLS     = 16;  // two bytes per row, chosen by A[4]
  localparam int unsigned CTR_W    = 5;   // 5-bit synchronous counter

  // Opcode carried by the first bit of the first frame.
  typedef enum logic {
    OP_WRITE = 1'b0,
    OP_READ  = 1'b1
  } op_e;

  // Falling edges (counter value seen at the edge).
  localparam logic [CTR_W-1:0] CYC_RW_LATCH    = 5'd1;  // after the 1st cycle
  localparam logic [CTR_W-1:0] CYC_ADDR_LATCH  = 5'd6;  // end of the 6th cycle
  // Rising edges (counter value before the edge).
  localparam logic [CTR_W-1:0] CYC_RD_PC_ON    = 5'd6;  // rising edge of 7th cycle
  localparam logic [CTR_W-1:0] CYC_RD_ACC_ON   = 5'd7;  // rising edge of 8th cycle
  localparam logic [CTR_W-1:0] CYC_RD_ACC_OFF  = 5'd8;  // rising edge of 9th cycle
  localparam logic [CTR_W-1:0] CYC_WR_PC_ON    = 5'd13; // rising edge of 14th cycle
  localparam logic [CTR_W-1:0] CYC_WR_ACC_ON   = 5'd15; // rising edge of 16th cycle

  // Array control strobes produced by the controller.
  typedef struct packed {
    logic pc;     // bit-line precharge
    logic wl;     // word-line enable (row decoder enable)
    logic wr;     // connect the write drivers to the selected columns
    logic col;    // column decoder enable
    logic muxen;  // read: load the MISO shift register from the sense amps
    logic sae;    // sense amplifier enable
  } sram_ctrl_t;

endpackage
