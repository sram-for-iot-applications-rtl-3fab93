// cycle_counter: 5-bit synchronous counter of SCLK cycles in a transaction.
//
// Every rising edge of SCLK adds one to the count; while rst_n is low the
// count is held at zero (asynchronously). In the SPI SRAM rst_n is the
// inverse of chip select, so the count is the number of rising SCLK edges
// seen since the master selected the chip. The counter wraps from 31 to 0.
// A counter clocked by SCLK and reset by the chip select follows the
// published controller diagram; the asynchronous reset polarity and the
// binary (not one-hot) encoding are this design's choice.
//
// Interface: sclk, rst_n in; q[WIDTH-1:0] out, updated just after each
// rising edge of sclk.
module cycle_counter #(
  parameter int unsigned WIDTH = sram_pkg::CTR_W
) (
  input  logic             sclk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q + 1'b1;
  end

endmodule
