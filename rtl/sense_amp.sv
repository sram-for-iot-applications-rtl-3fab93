// sense_amp: behavioural model of the eight differential sense amplifiers.
//
// In silicon each amplifier turns the small voltage difference between a pair
// of bit lines into a full-swing logic level. This model works on logic
// values: while sae is high, an amplifier whose two inputs differ outputs the
// value of the true line (bl); with equal inputs (no differential) it keeps
// its previous output. When sae falls the outputs hold, so the MISO shift
// register can load them afterwards. Sense amplifiers on the column-decoder
// outputs, enabled by sae, follow the published design; holding the result
// while sae is low is this model's choice. The outputs are level-sensitive
// storage (latches) by intent.
//
// Interface: sae, bl/blb[W-1:0] in; dout[W-1:0] out. No clock.
module sense_amp #(
  parameter int unsigned W = sram_pkg::DATA_W
) (
  input  logic         sae,
  input  logic [W-1:0] bl,
  input  logic [W-1:0] blb,
  output logic [W-1:0] dout
);

  always_latch begin
    for (int unsigned i = 0; i < W; i++)
      if (sae && (bl[i] != blb[i])) dout[i] = bl[i];
  end

endmodule
