// fpga_tile: one logic tile -- configuration chain, connection block, level
// shifters, CLB and switch block.
//
// The routing channel enters on trk_in, passes the connection block (where
// the CLB reads five tracks and may drive its three outputs onto tracks) and
// the switch block, and leaves on trk_out towards the next tile. The channel
// runs at the low supply; each CLB input crosses into the island supply
// through a BELS level shifter, whose mode the island's hopping controller
// sets. CLB outputs go down to the channel supply and need no shifter. The
// tile's configuration bits sit in one serial chain clocked by f.
// The CLB and connection block follow the architecture; the serial chain and
// one switch block per tile are this design's choices.
//
// Loop checkers report a possible combinational loop inside each CLB: it
// is the local crossbar feedback, which only a configuration can close (see
// clb).
//
// Interface: clk (f, configuration), blk_clk (island clock), rst_n, cfg_en,
// cfg_in, cfg_out, ce, sleep, keep (power gating), bels_en, bels_bypass,
// vdd_l (level shifter control), trk_in[W], trk_out[W], bels_err.
// While rst_n is low or cfg_en is high the CLB is held as in standby (LUT
// configuration bits forced low): this design's choice, made so that a
// configuration half shifted in cannot form a ring oscillator.
// Timing: channel and CLB paths are combinational; registered BLEs update on
// blk_clk; configuration takes TILE_CFG_BITS clocks with cfg_en high.
module fpga_tile
  import fpga_pkg::*;
(
  input  logic         clk,
  input  logic         blk_clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  input  logic         ce,
  input  logic         sleep,
  input  logic         keep,
  input  logic         bels_en,
  input  level_e       bels_bypass,
  input  logic         vdd_l,
  input  logic [W-1:0] trk_in,
  output logic [W-1:0] trk_out,
  output logic         bels_err
);

  tile_cfg_t    cfg;
  logic [I-1:0] pin_lo;    // CLB inputs at channel supply
  logic [I-1:0] pin_hi;    // CLB inputs after the level shifters
  logic [I-1:0] pin_err;
  logic [O-1:0] clb_out;
  logic [W-1:0] trk_mid;

  config_chain #(.BITS(TILE_CFG_BITS)) u_cfg (
    .clk    (clk),
    .cfg_en (cfg_en),
    .cfg_in (cfg_in),
    .q      (cfg),
    .cfg_out(cfg_out)
  );

  connection_block u_cb (
    .cfg    (cfg.cb),
    .trk_in (trk_in),
    .clb_out(clb_out),
    .clb_in (pin_lo),
    .trk_out(trk_mid)
  );

  for (genvar p = 0; p < I; p++) begin : g_ls
    level_shifter_bels u_ls (
      .in      (pin_lo[p]),
      .en      (bels_en),
      .bypass  (bels_bypass),
      .vdd_l   (vdd_l),
      .out     (pin_hi[p]),
      .mode_err(pin_err[p])
    );
  end

  assign bels_err = |pin_err;

  // LUT configuration bits are forced low in standby, and also while the
  // configuration is reset or being shifted, so that no partial
  // configuration can close an oscillating loop through the CLB crossbar.
  logic force_low;
  assign force_low = sleep || cfg_en || !rst_n;

  clb u_clb (
    .clk  (blk_clk),
    .rst_n(rst_n),
    .ce   (ce),
    .sleep(force_low),
    .keep (keep),
    .cfg  (cfg.clb),
    .in   (pin_hi),
    .out  (clb_out)
  );

  switch_block u_sb (
    .cfg    (cfg.sb),
    .trk_in (trk_mid),
    .trk_out(trk_out)
  );

endmodule
