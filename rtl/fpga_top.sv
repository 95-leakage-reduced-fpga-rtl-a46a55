// fpga_top: low-power FPGA fabric with micro-VDD-hopping and zigzag power
// gating, built from ISLANDS supply islands of four logic tiles each.
//
// The islands are chained by one unidirectional routing channel of W tracks
// (chan_in enters island 0, chan_out leaves the last island) and by one
// serial configuration chain. Each island has its own speed request
// (fast_req: VDDH and f, otherwise VDDL and f/2) and standby request
// (sleep_req: zigzag power gating with output keepers). Only the clock f is
// distributed; each island derives f/2 locally, and the common power-up reset
// puts every island's f/2 in the same phase. Two islands match the two rows
// of four tiles of the fabricated array; the island count, the channel and
// the chain are this design's choices.
//
// Loop checkers report a possible combinational loop inside each CLB: it
// is the local crossbar feedback, which only a configuration can close (see
// clb).
//
// Interface: clk (f), rst_n, cfg_en, cfg_in, cfg_out, fast_req[ISLANDS],
// sleep_req[ISLANDS], chan_in[W], chan_out[W], island_fast, island_slow,
// island_vdd_h, island_active, vdd_violation, bels_err (per island).
// Timing: the channel is combinational end to end; registered BLEs update on
// their island's clock edges, which are edges of f; loading the configuration
// takes ISLANDS*4*TILE_CFG_BITS clocks.
module fpga_top
  import fpga_pkg::*;
#(
  parameter int unsigned ISLANDS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  logic               cfg_in,
  output logic               cfg_out,
  input  logic [ISLANDS-1:0] fast_req,
  input  logic [ISLANDS-1:0] sleep_req,
  input  logic [W-1:0]       chan_in,
  output logic [W-1:0]       chan_out,
  output logic [ISLANDS-1:0] island_fast,
  output logic [ISLANDS-1:0] island_slow,
  output logic [ISLANDS-1:0] island_vdd_h,
  output logic [ISLANDS-1:0] island_active,
  output logic [ISLANDS-1:0] vdd_violation,
  output logic [ISLANDS-1:0] bels_err
);

  logic [ISLANDS:0][W-1:0] chan;
  logic [ISLANDS:0]        cchain;

  assign chan[0]   = chan_in;
  assign cchain[0] = cfg_in;

  for (genvar i = 0; i < ISLANDS; i++) begin : g_isl
    vdd_island u_isl (
      .clk          (clk),
      .rst_n        (rst_n),
      .cfg_en       (cfg_en),
      .cfg_in       (cchain[i]),
      .cfg_out      (cchain[i+1]),
      .fast_req     (fast_req[i]),
      .sleep_req    (sleep_req[i]),
      .chan_in      (chan[i]),
      .chan_out     (chan[i+1]),
      .fast         (island_fast[i]),
      .slow_active  (island_slow[i]),
      .vdd_high     (island_vdd_h[i]),
      .active       (island_active[i]),
      .vdd_violation(vdd_violation[i]),
      .bels_err     (bels_err[i])
    );
  end

  assign chan_out = chan[ISLANDS];
  assign cfg_out  = cchain[ISLANDS];

endmodule
