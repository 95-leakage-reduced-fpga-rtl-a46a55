// tb_rca8_workload: the 8-bit ripple-carry adder used to evaluate the fabric,
// run exhaustively (all 2^17 operand and carry-in combinations) on the full
// default fabric. Island 0 holds the adder and runs at VDDL and f/2, with its
// level shifters in NON-SHIFT mode, i.e. the half-speed operating point of the
// power measurement; island 1 registers every result at VDDH and f. Each
// result is checked one clock after its operands were applied, and the run
// also counts clocks: one addition per clock of f.
module tb_rca8_workload;
  import fpga_pkg::*;
  import tb_cfg_pkg::*;
  localparam int unsigned NT = 2 * CLBS_PER_ISLAND;
  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [1:0] fast_req = 2'b11, sleep_req = '0;
  logic [W-1:0] chan_in = '0, chan_out;
  logic [1:0] island_fast, island_slow, island_vdd_h, island_active, vdd_violation, bels_err;
  int checks = 0, failures = 0;
  longint cycles = 0;

  fpga_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tile_cfg_t tc[NT];
    longint start;
    int bad = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4; t++) tc[t] = rca_tile(t);
    tc[4] = reg_tile(0, 1, 2); tc[5] = reg_tile(3, 4, 5);
    tc[6] = reg_tile(6, 7, CARRY_TRK); tc[7] = reg_tile(W, W, W);
    for (int t = NT - 1; t >= 0; t--)
      for (int b = TILE_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = tc[t][b];
      end
    @(negedge clk); cfg_en = 0;
    fast_req[0] = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (!(island_slow[0] && !island_vdd_h[0] && island_fast[1])) begin
      failures++; $display("FAIL operating point not reached");
    end
    start = cycles;
    for (int v = 0; v < 2**17; v++) begin
      logic [7:0] a, b; logic c;
      {c, b, a} = 17'(v);
      @(negedge clk) chan_in = rca_chan(a, b, c);
      @(posedge clk); #1;
      checks++;
      if (rca_sum(chan_out) !== 9'(a) + 9'(b) + 9'(c)) begin
        failures++;
        if (bad++ < 10) $display("FAIL %0d + %0d + %0d gave %0d", a, b, c, rca_sum(chan_out));
      end
    end
    checks++;
    // one idle clock passes before the first operands are applied
    if (cycles - start != 2**17 + 1) begin failures++; $display("FAIL %0d clocks for 2^17 additions", cycles - start); end
    checks++;
    if (vdd_violation != '0 || bels_err != '0) begin failures++; $display("FAIL supply or shifter violation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
