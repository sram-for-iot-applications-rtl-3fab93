// rx_shift_reg: serial-to-parallel register for the MOSI line.
//
// While the chip is selected (cs_n low) each rising edge of SCLK shifts the
// MOSI bit in at bit 0 and moves the older bits towards bit WIDTH-1. After
// eight edges q[7] holds the first bit sent, so a byte sent MSB first reads
// back in its natural order. Sampling on the rising edge matches SPI mode 2,
// where the master changes MOSI on the falling edge. The published diagram
// gates the clock and data with chip select; here chip select is a shift
// enable instead, which gives the same register contents without a gated
// clock. The register has no reset: its contents are only used after the
// bits of interest have been shifted in.
//
// Interface: sclk, cs_n, mosi in; q[WIDTH-1:0] out.
module rx_shift_reg #(
  parameter int unsigned WIDTH = sram_pkg::DATA_W
) (
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             mosi,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge sclk) begin
    if (!cs_n) q <= {q[WIDTH-2:0], mosi};
  end

endmodule
