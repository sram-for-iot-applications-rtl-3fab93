// tx_shift_reg: parallel-to-serial register that drives MISO.
//
// It works on the falling edge of SCLK, where an SPI mode 2 slave changes
// its output. On a falling edge with muxen high the register loads the byte
// on din (the sense amplifier outputs); on any other falling edge while the
// chip is selected it shifts one place towards the MSB. MISO is the MSB, so
// the loaded byte leaves MSB first: bit 7 right at the load edge, then one
// bit per falling edge. The load/shift select named muxen, the load at the
// falling edge of the 9th cycle and MSB-first order follow the published
// design; using chip select as a shift enable instead of gating the clock,
// and shifting in zeros, are this design's choices.
//
// Interface: sclk, cs_n, muxen, din[WIDTH-1:0] in; miso out.
module tx_shift_reg #(
  parameter int unsigned WIDTH = sram_pkg::DATA_W
) (
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             muxen,
  input  logic [WIDTH-1:0] din,
  output logic             miso
);

  logic [WIDTH-1:0] q;

  always_ff @(negedge sclk) begin
    if (muxen)      q <= din;
    else if (!cs_n) q <= {q[WIDTH-2:0], 1'b0};
  end

  assign miso = q[WIDTH-1];

endmodule
