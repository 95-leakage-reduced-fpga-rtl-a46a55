// config_chain: configuration SRAM of one tile, written as a serial chain.
//
// While cfg_en is high every clock shifts the chain one place: cfg_in enters
// bit 0 and bit BITS-1 leaves on cfg_out, so the first bit shifted in ends in
// the most significant position and chains of several tiles are loaded by
// shifting the last tile's bits first. q holds the stored bits for the logic.
// The configuration memory is neither power-gated nor reset, as the SRAM
// cells use high-threshold transistors and only drive static nodes; how it is
// written is this design's choice.
//
// Interface: clk, cfg_en, cfg_in, q[BITS], cfg_out.
// Timing: one bit per clock; BITS clocks load the whole chain.
module config_chain #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk,
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic [BITS-1:0] q,
  output logic            cfg_out
);

  always_ff @(posedge clk) begin
    if (cfg_en) q <= {q[BITS-2:0], cfg_in};
  end

  assign cfg_out = q[BITS-1];

endmodule
