// level_shifter_bels: behavioural model of the Bypassing Enabled Level Shifter
// (BELS) that carries a signal from the low-supply interconnect into a supply
// island. This is a transistor circuit, so only its logic behaviour per mode
// is modelled; the model is not meant for synthesis.
//
// Modes, as the circuit defines them:
//   SHIFT      (island at VDDH, or still ramping): EN low, Bypass at VDDL --
//              the bypass transistor eases the contention at the internal
//              node, so the shift is faster; Bypass at 0 V also shifts,
//              only slower.
//   NON-SHIFT  (island settled at VDDL): EN high cuts the shifter from its
//              supplies, Bypass at VDDH lets the pass transistor carry the
//              signal without threshold loss.
// Any other combination leaves the output undriven or, with the shifter cut
// off while the island is above VDDL, too weak; the model then keeps the last
// output value and raises mode_err. Holding the last value is this model's
// choice.
//
// Interface: in, en, bypass (level_e), vdd_l (island supply settled at VDDL),
// out, mode_err.
// Timing: zero delay. The hold is a latch; in some contexts the lint tool
// cannot prove it one and says so, which is harmless.
module level_shifter_bels
  import fpga_pkg::*;
(
  input  logic   in,
  input  logic   en,
  input  level_e bypass,
  input  logic   vdd_l,
  output logic   out,
  output logic   mode_err
);

  logic shift_ok;
  logic bypass_ok;

  assign shift_ok  = !en && (bypass != LV_VDDH);
  assign bypass_ok = en && (bypass == LV_VDDH) && vdd_l;
  assign mode_err  = !(shift_ok || bypass_ok);

  always_latch begin
    if (shift_ok || bypass_ok) out = in;
  end

endmodule
