// lut: K-input look-up table with standby forcing of its configuration bits.
//
// The 2^K configuration SRAM bits feed a multiplexer tree that the K inputs
// steer; input bit 0 selects at the leaf level, so truth table bit j is the
// output for input value j. In the architecture the tree is built from
// transmission gates driven by zigzag power-gated logic, and a small
// high-threshold NOR gate at every SRAM output pulls all tree data inputs low
// in standby, which removes the sneak leakage path between the gated logic
// and the transmission gates. Here that is the AND with ~sleep: in standby
// every tree input is 0, so the output is 0.
//
// Interface: cfg (truth table), sleep (standby), in (K inputs), out.
// Timing: purely combinational. The value of K is this design's choice.
module lut #(
  parameter int unsigned K = 4
) (
  input  logic [2**K-1:0] cfg,
  input  logic            sleep,
  input  logic [K-1:0]    in,
  output logic            out
);

  // SRAM outputs after the standby NOR gates.
  logic [2**K-1:0] leaf;
  assign leaf = cfg & {(2**K){~sleep}};

  // Mux tree, one level per input: level l holds 2^(K-l) nodes.
  logic [K:0][2**K-1:0] node;

  always_comb begin
    node = '0;
    node[0] = leaf;
    for (int l = 0; l < K; l++) begin
      for (int j = 0; j < 2**(K-l-1); j++) begin
        node[l+1][j] = in[l] ? node[l][2*j+1] : node[l][2*j];
      end
    end
  end

  assign out = node[K][0];

endmodule
