// tb_fpga_tile: loads a tile through its configuration chain as bits 2..3 of
// a ripple-carry adder and checks the channel leaving the tile, with the level
// shifters in SHIFT and in NON-SHIFT mode, and the shifter error flag.
module tb_fpga_tile;
  import fpga_pkg::*;
  import tb_cfg_pkg::*;
  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic ce = 1, sleep = 0, keep = 0, bels_en = 0, vdd_l = 0, bels_err;
  level_e bels_bypass = LV_VDDL;
  logic [W-1:0] trk_in = '0, trk_out, exp;
  tile_cfg_t tc;
  int checks = 0, failures = 0;

  fpga_tile dut (.clk(clk), .blk_clk(clk), .*);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_adds(string what);
    for (int r = 0; r < 64; r++) begin
      logic [2:0] s;
      trk_in = W'({$urandom});
      s = 3'(trk_in[3:2]) + 3'(trk_in[11:10]) + 3'(trk_in[CARRY_TRK]);
      exp = trk_in;
      exp[3:2] = s[1:0];
      exp[CARRY_TRK] = s[2];
      #1 chk(trk_out === exp && !bels_err, $sformatf("%s in=%h out=%h exp=%h", what, trk_in, trk_out, exp));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tc = rca_tile(1);
    @(posedge clk); #1 rst_n = 1;
    for (int b = TILE_CFG_BITS - 1; b >= 0; b--) begin
      @(negedge clk); cfg_en = 1; cfg_in = tc[b];
    end
    @(negedge clk); cfg_en = 0;
    chk(cfg_out === tc[TILE_CFG_BITS-1], "chain output shows the first bit loaded");
    run_adds("shift mode");
    bels_en = 1; bels_bypass = LV_VDDH; vdd_l = 1;
    run_adds("non-shift mode");
    vdd_l = 0;
    #1 chk(bels_err, "illegal shifter mode flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
