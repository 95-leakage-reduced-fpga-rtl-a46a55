// switch_block: connects the channel of one tile to the next.
//
// Every outgoing track t takes incoming track t, t+1 or t-1 (modulo W), or
// is left without a switch on and reads 0. Moving a signal to a neighbouring
// track lets routes cross; the channel is unidirectional. The pattern is
// this design's choice; in silicon each switch is one NMOS pass transistor,
// since the channel runs at the low supply.
//
// Interface: cfg (sb_cfg_t), trk_in[W], trk_out[W].
// Timing: combinational.
module switch_block
  import fpga_pkg::*;
(
  input  sb_cfg_t      cfg,
  input  logic [W-1:0] trk_in,
  output logic [W-1:0] trk_out
);

  always_comb begin
    for (int t = 0; t < W; t++) begin
      unique case (cfg.route[t])
        SB_STRAIGHT: trk_out[t] = trk_in[t];
        SB_NEXT:     trk_out[t] = trk_in[(t + 1) % W];
        SB_PREV:     trk_out[t] = trk_in[(t + W - 1) % W];
        default:     trk_out[t] = 1'b0;
      endcase
    end
  end

endmodule
