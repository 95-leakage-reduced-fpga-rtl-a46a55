// connection_block: joins one CLB to its routing channel.
//
// Each CLB input reads the track named by cfg.ipin_sel (a select at or above
// W reads 0). Each track leaving the block either passes the incoming track
// on (opin_drv = 0) or carries CLB output k (opin_drv = k+1). In silicon the
// switches are single NMOS pass transistors, which suffices because the
// channel runs at the low supply; here they are unidirectional multiplexers.
// The multiplexer form and the one-driver-per-track rule are this design's
// choices.
//
// Interface: cfg (cb_cfg_t), trk_in[W], clb_out[O], clb_in[I], trk_out[W].
// Timing: combinational.
module connection_block
  import fpga_pkg::*;
(
  input  cb_cfg_t      cfg,
  input  logic [W-1:0] trk_in,
  input  logic [O-1:0] clb_out,
  output logic [I-1:0] clb_in,
  output logic [W-1:0] trk_out
);

  always_comb begin
    for (int p = 0; p < I; p++) begin
      if (int'(cfg.ipin_sel[p]) < W) clb_in[p] = trk_in[cfg.ipin_sel[p]];
      else                           clb_in[p] = 1'b0;
    end
    for (int t = 0; t < W; t++) begin
      if (cfg.opin_drv[t] == 2'd0) trk_out[t] = trk_in[t];
      else                         trk_out[t] = clb_out[cfg.opin_drv[t] - 2'd1];
    end
  end

endmodule
