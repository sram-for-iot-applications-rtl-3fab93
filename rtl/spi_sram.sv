// spi_sram: a 32-byte static RAM reached over a four-wire SPI bus, for
// low-rate, low-power sensor nodes.
//
// The chip has no oscillator: every internal event is timed by the master's
// SCLK and chip select. A read or write is one 16-cycle transaction in SPI
// mode 2 (clock idles high; the master changes MOSI on falling edges and
// samples MISO on rising edges; this chip does the opposite). The first byte
// carries the operation bit (1 = read, 0 = write) and the 5-bit address; the
// second carries the data, on MOSI for a write and on MISO for a read. Chip
// select must return high between transactions.
//
// Inside, spi_interface derives the precharge, word-line, column, write and
// sense strobes from a cycle counter, and sram_core holds the 16 x 16 array of
// cells with its decoders and sense amplifiers. The overall architecture
// follows the published design.
//
// Interface: sclk, cs_n, mosi in; miso out (driven at all times).
module spi_sram
  import sram_pkg::*;
(
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);

  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data, dsns;
  logic              rwn;
  sram_ctrl_t        ctrl;

  spi_interface u_spi (
    .sclk (sclk),
    .cs_n (cs_n),
    .mosi (mosi),
    .miso (miso),
    .dsns (dsns),
    .addr (addr),
    .data (data),
    .rwn  (rwn),
    .ctrl (ctrl)
  );

  sram_core u_core (
    .addr (addr),
    .data (data),
    .ctrl (ctrl),
    .dsns (dsns)
  );

endmodule
