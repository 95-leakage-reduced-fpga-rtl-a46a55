// power_switch: behavioural model of the VDDH/VDDL supply switches of one
// supply island. It is a model of analog switches, not meant for synthesis.
//
// Each island connects to either the high (VDDH) or the low (VDDL) supply
// grid. After sel_h changes, the island supply needs RAMP_CYCLES clocks of f
// to settle; during the ramp neither vdd_h nor vdd_l is high. The model also
// checks the hopping order: an island clocked at f (blk_fast) must have its
// supply settled at VDDH, otherwise the sticky violation flag rises. The ramp
// time is this model's assumption.
//
// Interface: clk (f), rst_n (power-up reset, supply starts at VDDH), sel_h,
// blk_fast, vdd_h, vdd_l, violation.
// Timing: vdd_h/vdd_l settle RAMP_CYCLES clocks after sel_h changes.
module power_switch #(
  parameter int unsigned RAMP_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sel_h,
  input  logic blk_fast,
  output logic vdd_h,
  output logic vdd_l,
  output logic violation
);

  logic        level_h;   // level the supply is heading for
  logic [15:0] ramp;      // clocks left until settled

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level_h   <= 1'b1;
      ramp      <= '0;
      violation <= 1'b0;
    end else begin
      if (sel_h != level_h) begin
        level_h <= sel_h;
        ramp    <= 16'(RAMP_CYCLES);
      end else if (ramp != 0) begin
        ramp <= ramp - 16'd1;
      end
      if (blk_fast && !vdd_h) violation <= 1'b1;
    end
  end

  assign vdd_h = level_h && (sel_h == level_h) && (ramp == 0);
  assign vdd_l = !level_h && (sel_h == level_h) && (ramp == 0);

endmodule
