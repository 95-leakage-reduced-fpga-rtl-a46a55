// clk_div2_sel: clock unit of one supply island -- makes f/2 from the
// distributed clock f and switches the island between f and f/2.
//
// Only f is distributed, so islands see no skew between f and f/2; each
// island derives f/2 locally. A phase flip-flop toggles on every falling edge
// of f and is cleared by the power-up reset, so all islands pass the same
// rising edges of f when slow: there is a single f/2 phase in the whole chip.
// The island clock is f gated by (not slow) or the phase bit; gating signals
// change only while f is low, so the island clock has no glitch, and every
// island clock edge coincides with an edge of f. The f/2 clock is thus high
// for a quarter of its period. The local generation and the single phase set
// by reset follow the architecture; the gating form is this design's choice.
//
// Interface: clk (f), rst_n (power-up reset), slow (request f/2), blk_clk
// (island clock), slow_active (island clock is f/2).
// Timing: slow is taken at the next falling edge of f; the following rising
// edges of blk_clk follow the new rate.
module clk_div2_sel (
  input  logic clk,
  input  logic rst_n,
  input  logic slow,
  output logic blk_clk,
  output logic slow_active
);

  logic phase;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= 1'b0;
      slow_active <= 1'b0;
    end else begin
      phase       <= ~phase;
      slow_active <= slow;
    end
  end

  assign blk_clk = clk & (~slow_active | phase);

endmodule
