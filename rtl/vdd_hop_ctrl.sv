// vdd_hop_ctrl: micro-VDD-hopping sequencer of one supply island.
//
// An island runs either at VDDH with clock f or at VDDL with clock f/2.
// Going down, the clock is slowed to f/2 first and the supply is lowered
// afterwards; going up, the supply is raised first and the clock returns to
// f only once the supply has settled. This order follows the architecture; a
// fixed wait of SETTLE_CYCLES clocks of f for the supply is this design's
// choice. The controller also sets the level shifters at the island inputs:
// SHIFT mode (EN low, Bypass at VDDL) whenever the supply is, or may be,
// above VDDL, and NON-SHIFT mode (EN high, Bypass at VDDH) only once the
// supply has settled at VDDL. A request that changes during a sequence is
// served after the sequence ends.
//
// Interface: clk (f), rst_n, fast_req, slow_active (from the clock unit),
// slow (to the clock unit), sel_h (to the power switches), bels_en,
// bels_bypass (to the level shifters), fast (island at VDDH and f).
// Timing: going down takes 1-2 clocks for the clock switch plus
// SETTLE_CYCLES; going up takes SETTLE_CYCLES plus 1-2 clocks.
module vdd_hop_ctrl
  import fpga_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fast_req,
  input  logic   slow_active,
  output logic   slow,
  output logic   sel_h,
  output logic   bels_en,
  output level_e bels_bypass,
  output logic   fast
);

  typedef enum logic [2:0] {
    S_FAST, S_CLK_DOWN, S_VDD_DOWN, S_SLOW, S_VDD_UP, S_CLK_UP
  } state_e;

  state_e      state;
  logic [15:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FAST;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_FAST:     if (!fast_req) state <= S_CLK_DOWN;
        S_CLK_DOWN: if (slow_active) begin
                      state <= S_VDD_DOWN;
                      cnt   <= 16'(SETTLE_CYCLES - 1);
                    end
        S_VDD_DOWN: if (cnt == 0) state <= S_SLOW;
                    else          cnt   <= cnt - 16'd1;
        S_SLOW:     if (fast_req) begin
                      state <= S_VDD_UP;
                      cnt   <= 16'(SETTLE_CYCLES - 1);
                    end
        S_VDD_UP:   if (cnt == 0) state <= S_CLK_UP;
                    else          cnt   <= cnt - 16'd1;
        S_CLK_UP:   if (!slow_active) state <= S_FAST;
        default:    state <= S_FAST;
      endcase
    end
  end

  always_comb begin
    slow        = (state != S_FAST) && (state != S_CLK_UP);
    sel_h       = (state == S_FAST) || (state == S_CLK_DOWN) ||
                  (state == S_VDD_UP) || (state == S_CLK_UP);
    bels_en     = (state == S_SLOW);
    bels_bypass = (state == S_SLOW) ? LV_VDDH : LV_VDDL;
    fast        = (state == S_FAST);
  end

  // The supply leaves VDDH only while the island runs at f/2, and the level
  // shifters bypass only while the supply is headed for VDDL.
  a_low_supply_slow_clock: assert property (
    @(posedge clk) disable iff (!rst_n) !sel_h |-> slow_active);
  a_bypass_only_low: assert property (
    @(posedge clk) disable iff (!rst_n) bels_en |-> !sel_h);

endmodule
