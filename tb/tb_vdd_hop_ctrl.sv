// tb_vdd_hop_ctrl: drives the hopping controller with a clock-unit model that
// answers one cycle late, and checks the order of events: going down the
// clock is slow before the supply leaves VDDH and the level shifters turn to
// NON-SHIFT only SETTLE cycles later; going up the shifters return to SHIFT
// before the supply rises, and the clock returns to f only SETTLE cycles after
// the supply was raised.
module tb_vdd_hop_ctrl;
  import fpga_pkg::*;
  localparam int unsigned SETTLE = 8;
  logic clk = 0, rst_n = 0, fast_req = 1, slow_active = 0;
  logic slow, sel_h, bels_en, fast;
  level_e bels_bypass;
  int checks = 0, failures = 0;
  int cyc = 0, t_sel_low = -1, t_nonshift = -1, t_sel_high = -1, t_fast_clk = -1;
  int bad_order = 0;

  vdd_hop_ctrl #(.SETTLE_CYCLES(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    slow_active <= slow;
    cyc <= cyc + 1;
  end

  // rules that hold at every cycle
  always @(negedge clk) if (rst_n) begin
    if (!slow_active && !sel_h) bad_order++;                   // f without VDDH request
    if (bels_en && sel_h) bad_order++;                          // NON-SHIFT while heading up
    if (bels_en != (bels_bypass == LV_VDDH)) bad_order++;       // mode pair
    if (fast && !(sel_h && !slow)) bad_order++;
  end

  always @(negedge clk) begin
    if (t_sel_low < 0 && !sel_h) t_sel_low = cyc;
    if (t_nonshift < 0 && bels_en) t_nonshift = cyc;
    if (t_nonshift >= 0 && t_sel_high < 0 && sel_h) t_sel_high = cyc;
    if (t_sel_high >= 0 && t_fast_clk < 0 && !slow) t_fast_clk = cyc;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 chk(fast && sel_h && !slow && !bels_en, "reset state fast");
    @(negedge clk) rst_n = 1;
    @(negedge clk) fast_req = 0;
    repeat (30) @(negedge clk);
    chk(!sel_h && slow && bels_en && bels_bypass == LV_VDDH && !fast, "slow state");
    chk(t_nonshift - t_sel_low == SETTLE, $sformatf("supply settle down %0d", t_nonshift - t_sel_low));
    fast_req = 1;
    repeat (30) @(negedge clk);
    chk(fast && sel_h && !slow && !bels_en && bels_bypass == LV_VDDL, "fast again");
    chk(t_fast_clk - t_sel_high == SETTLE, $sformatf("supply settle up %0d", t_fast_clk - t_sel_high));
    // rapid toggling must never break the ordering rules
    for (int r = 0; r < 200; r++) begin
      @(negedge clk) if ($urandom_range(0, 7) == 0) fast_req = ~fast_req;
    end
    chk(bad_order == 0, $sformatf("ordering violations %0d", bad_order));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
