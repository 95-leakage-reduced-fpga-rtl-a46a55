// clb: configurable logic block -- four BLEs, five inputs, three outputs, with
// output keepers for zigzag standby.
//
// A full local crossbar feeds every BLE input from any of the five CLB inputs
// or any of the four BLE outputs (select values I..I+N-1 are the feedback
// paths; unused select codes read 0). Each CLB output takes one BLE output.
// The BLE/CLB counts, the power-gated logic and the keepers at the CLB
// outputs follow the architecture; the full crossbar and the output
// selection are this design's choices.
//
// Standby: sleep forces the LUT configuration bits low (see lut), so the
// internal nets settle at 0; keep closes the output keepers first, so the
// outputs hold their last value while the block is cut off. A keeper is a
// transparent latch that is open while keep is low.
//
// The crossbar lets a configuration close a combinational loop through BLE
// feedback, so static loop checkers see a possible loop through the crossbar;
// a legal configuration never closes one without a flip-flop in it.
//
// Interface: clk (island clock), rst_n, ce (flip-flop enable), sleep, keep,
// cfg (clb_cfg_t), in[I], out[O].
// Timing: combinational from in to out through unregistered BLEs; one island
// clock edge through registered BLEs.
module clb
  import fpga_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         sleep,
  input  logic         keep,
  input  clb_cfg_t     cfg,
  input  logic [I-1:0] in,
  output logic [O-1:0] out
);

  logic [N-1:0]   ble_out;
  logic [I+N-1:0] xbar_src;
  logic [N-1:0][K-1:0] ble_in;
  logic [O-1:0]   out_int;

  assign xbar_src = {ble_out, in};

  always_comb begin
    for (int b = 0; b < N; b++) begin
      for (int k = 0; k < K; k++) begin
        if (int'(cfg.ble[b].in_sel[k]) < I + N) ble_in[b][k] = xbar_src[cfg.ble[b].in_sel[k]];
        else                                    ble_in[b][k] = 1'b0;
      end
    end
  end

  for (genvar b = 0; b < N; b++) begin : g_ble
    ble #(.K(K)) u_ble (
      .clk   (clk),
      .rst_n (rst_n),
      .ce    (ce),
      .sleep (sleep),
      .truth (cfg.ble[b].truth),
      .use_ff(cfg.ble[b].use_ff),
      .in    (ble_in[b]),
      .out   (ble_out[b])
    );
  end

  always_comb begin
    for (int o = 0; o < O; o++) out_int[o] = ble_out[cfg.out_sel[o]];
  end

  // Output keepers.
  always_latch begin
    if (!keep) out = out_int;
  end

endmodule
