// spi_interface: SPI mode 2 slave that turns two serial frames into one SRAM
// access, using SCLK as its only clock.
//
// The cycle counter counts SCLK rising edges since chip select fell; the MOSI
// shift register collects the opcode, address and write data; the controller
// compares the count against fixed cycle numbers to raise the array strobes;
// and the MISO shift register loads the sense amplifier byte and shifts it
// out on falling edges.
//
// Frame format (MSB first, master changes MOSI on falling edges):
//   frame 1: R/W (1 = read, 0 = write), A4..A0, two unused bits
//   frame 2: write data D7..D0 on MOSI, or read data D7..D0 on MISO
// Read data appears on MISO from the falling edge that starts cycle 9, one bit
// per cycle. A write takes effect at the rising edge of cycle 16 and is closed
// when chip select returns high. This follows the published design; the
// controller's comment lists the cycle-level choices made here.
//
// Interface: sclk, cs_n, mosi, dsns[7:0] in; miso, addr[4:0], data[7:0], rwn,
// ctrl out.
module spi_interface
  import sram_pkg::*;
(
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso,
  input  logic [DATA_W-1:0] dsns,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data,
  output logic              rwn,
  output sram_ctrl_t        ctrl
);

  logic [CTR_W-1:0]  ctr;
  logic [DATA_W-1:0] sdi;

  cycle_counter u_counter (
    .sclk  (sclk),
    .rst_n (!cs_n),
    .q     (ctr)
  );

  rx_shift_reg u_rx (
    .sclk (sclk),
    .cs_n (cs_n),
    .mosi (mosi),
    .q    (sdi)
  );

  sram_controller u_ctrl (
    .sclk (sclk),
    .cs_n (cs_n),
    .mosi (mosi),
    .ctr  (ctr),
    .sdi  (sdi),
    .addr (addr),
    .data (data),
    .rwn  (rwn),
    .ctrl (ctrl)
  );

  tx_shift_reg u_tx (
    .sclk  (sclk),
    .cs_n  (cs_n),
    .muxen (ctrl.muxen),
    .din   (dsns),
    .miso  (miso)
  );

endmodule
