// pg_ctrl: zigzag power-gating controller of one supply island.
//
// The island enters standby within one clock: at the clock edge after
// sleep_req rises the output keepers close, the flip-flops stop (keep high,
// ce low) and the zigzag cut-off switches open (sleep high) together; the
// virtual rails drift slowly, so the keepers capture valid outputs. Because
// the zigzag virtual rails stay between the supplies, waking is fast -- about
// 620 ps, under one clock at 500 MHz -- so after sleep falls the island waits
// WAKE_CYCLES clocks before the keepers open and the flip-flops run again.
// Standby entry and wake-up within one clock follow the architecture; the
// state machine is this design's.
//
// Interface: clk (f), rst_n, sleep_req, sleep, keep, ce, active.
// Timing: standby 1 clock after sleep_req rises; active WAKE_CYCLES+1 clocks
// after it falls (sleep low after one, keepers open WAKE_CYCLES later).
module pg_ctrl #(
  parameter int unsigned WAKE_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sleep_req,
  output logic sleep,
  output logic keep,
  output logic ce,
  output logic active
);

  typedef enum logic [1:0] {P_ACTIVE, P_STANDBY, P_WAKE} state_e;

  state_e      state;
  logic [15:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_ACTIVE;
      cnt   <= '0;
    end else begin
      unique case (state)
        P_ACTIVE:  if (sleep_req) state <= P_STANDBY;
        P_STANDBY: if (!sleep_req) begin
                     state <= P_WAKE;
                     cnt   <= 16'(WAKE_CYCLES - 1);
                   end
        P_WAKE:    if (cnt == 0) state <= P_ACTIVE;
                   else          cnt   <= cnt - 16'd1;
        default:   state <= P_ACTIVE;
      endcase
    end
  end

  assign sleep  = (state == P_STANDBY);
  assign keep   = (state != P_ACTIVE);
  assign ce     = (state == P_ACTIVE);
  assign active = (state == P_ACTIVE);

  // The logic is never cut off with open keepers or running flip-flops.
  a_cutoff_held: assert property (
    @(posedge clk) disable iff (!rst_n) sleep |-> (keep && !ce));

endmodule
