// vdd_island: one supply island -- TILES logic tiles sharing one supply,
// with the island's clock unit, micro-VDD-hopping controller, zigzag
// power-gating controller and supply switches.
//
// All tiles of the island run at the same supply (VDDH with clock f, or VDDL
// with clock f/2) and enter and leave zigzag standby together. The routing
// channel runs through the tiles in order; so does the configuration chain.
// fast_req asks for full speed; sleep_req asks for standby. Grouping four
// CLBs per island follows the architecture.
//
// Loop checkers report a possible combinational loop inside each CLB: it
// is the local crossbar feedback, which only a configuration can close (see
// clb).
//
// Interface: clk (f), rst_n (power-up reset), cfg_en, cfg_in, cfg_out,
// fast_req, sleep_req, chan_in[W], chan_out[W], fast (at VDDH and f),
// slow_active (clocked at f/2), vdd_high (supply settled at VDDH), active
// (out of standby), vdd_violation
// (clocked at f without VDDH, from the supply model), bels_err (a level
// shifter saw an illegal mode).
// Timing: see vdd_hop_ctrl and pg_ctrl for the mode changes; the channel is
// combinational through the island.
module vdd_island
  import fpga_pkg::*;
#(
  parameter int unsigned TILES = CLBS_PER_ISLAND
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  input  logic         fast_req,
  input  logic         sleep_req,
  input  logic [W-1:0] chan_in,
  output logic [W-1:0] chan_out,
  output logic         fast,
  output logic         slow_active,
  output logic         vdd_high,
  output logic         active,
  output logic         vdd_violation,
  output logic         bels_err
);

  logic   blk_clk;
  logic   slow;
  logic   sel_h;
  logic   vdd_l;
  logic   bels_en;
  level_e bels_bypass;
  logic   sleep;
  logic   keep;
  logic   ce;

  clk_div2_sel u_clk (
    .clk        (clk),
    .rst_n      (rst_n),
    .slow       (slow),
    .blk_clk    (blk_clk),
    .slow_active(slow_active)
  );

  vdd_hop_ctrl u_hop (
    .clk        (clk),
    .rst_n      (rst_n),
    .fast_req   (fast_req),
    .slow_active(slow_active),
    .slow       (slow),
    .sel_h      (sel_h),
    .bels_en    (bels_en),
    .bels_bypass(bels_bypass),
    .fast       (fast)
  );

  power_switch u_psw (
    .clk      (clk),
    .rst_n    (rst_n),
    .sel_h    (sel_h),
    .blk_fast (!slow_active),
    .vdd_h    (vdd_high),
    .vdd_l    (vdd_l),
    .violation(vdd_violation)
  );

  pg_ctrl u_pg (
    .clk      (clk),
    .rst_n    (rst_n),
    .sleep_req(sleep_req),
    .sleep    (sleep),
    .keep     (keep),
    .ce       (ce),
    .active   (active)
  );

  logic [TILES:0][W-1:0] chan;
  logic [TILES:0]        cchain;
  logic [TILES-1:0]      terr;

  assign chan[0]   = chan_in;
  assign cchain[0] = cfg_in;

  for (genvar t = 0; t < TILES; t++) begin : g_tile
    fpga_tile u_tile (
      .clk        (clk),
      .blk_clk    (blk_clk),
      .rst_n      (rst_n),
      .cfg_en     (cfg_en),
      .cfg_in     (cchain[t]),
      .cfg_out    (cchain[t+1]),
      .ce         (ce),
      .sleep      (sleep),
      .keep       (keep),
      .bels_en    (bels_en),
      .bels_bypass(bels_bypass),
      .vdd_l      (vdd_l),
      .trk_in     (chan[t]),
      .trk_out    (chan[t+1]),
      .bels_err   (terr[t])
    );
  end

  assign chan_out = chan[TILES];
  assign cfg_out  = cchain[TILES];
  assign bels_err = |terr;

endmodule
