// ble: basic logic element -- one LUT, one D flip-flop and one 2:1 mux.
//
// The LUT output goes straight to the mux and through the flip-flop; use_ff
// picks the registered (1) or combinational (0) value. This structure follows
// the architecture. The clock is the island clock (f or f/2). ce is low while
// the island is in standby, so the flip-flop keeps its state: the flip-flop's
// standby behaviour, its enable and its reset to 0 are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), ce, sleep, truth
// (2^K LUT bits), use_ff, in (K inputs), out.
// Timing: out follows in combinationally when use_ff=0; otherwise it changes
// one island clock edge after the LUT output.
module ble #(
  parameter int unsigned K = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic            sleep,
  input  logic [2**K-1:0] truth,
  input  logic            use_ff,
  input  logic [K-1:0]    in,
  output logic            out
);

  logic lut_out;
  logic ff_q;

  lut #(.K(K)) u_lut (
    .cfg  (truth),
    .sleep(sleep),
    .in   (in),
    .out  (lut_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ff_q <= 1'b0;
    else if (ce) ff_q <= lut_out;
  end

  assign out = use_ff ? ff_q : lut_out;

endmodule
