// tb_vdd_island: one supply island configured as an 8-bit ripple-carry adder
// (the evaluation circuit), checked at VDDH/f, after hopping to VDDL/f/2 and
// back, and in zigzag standby (outputs held). The island is then reconfigured
// as a 9-bit register and its update rate is counted at f and at f/2.
module tb_vdd_island;
  import fpga_pkg::*;
  import tb_cfg_pkg::*;
  localparam int unsigned T = CLBS_PER_ISLAND;
  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic fast_req = 1, sleep_req = 0;
  logic [W-1:0] chan_in = '0, chan_out;
  logic fast, slow_active, vdd_high, active, vdd_violation, bels_err;
  int checks = 0, failures = 0;

  vdd_island dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(tile_cfg_t tc[T]);
    for (int t = T - 1; t >= 0; t--)
      for (int b = TILE_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = tc[t][b];
      end
    @(negedge clk); cfg_en = 0;
  endtask

  task automatic adds(int n, string what);
    for (int r = 0; r < n; r++) begin
      logic [7:0] a, b; logic c;
      a = 8'($urandom); b = 8'($urandom); c = 1'($urandom);
      @(negedge clk) chan_in = rca_chan(a, b, c);
      #1 chk(rca_sum(chan_out) === 9'(a) + 9'(b) + 9'(c), $sformatf("%s %0d+%0d+%0d got %0d", what, a, b, c, rca_sum(chan_out)));
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tile_cfg_t tc[T];
    logic [8:0] held, prev;
    int updates;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < T; t++) tc[t] = rca_tile(t);
    load(tc);
    adds(200, "add at VDDH");
    fast_req = 0;
    repeat (30) @(negedge clk);
    chk(!fast && slow_active && !vdd_high, "hopped down");
    adds(200, "add at VDDL");
    fast_req = 1;
    repeat (30) @(negedge clk);
    chk(fast && !slow_active && vdd_high, "hopped up");
    // standby: outputs kept
    sleep_req = 1;
    repeat (3) @(negedge clk);
    chk(!active, "in standby");
    held = rca_sum(chan_out);
    for (int r = 0; r < 20; r++) begin
      @(negedge clk) chan_in = rca_chan(8'($urandom), 8'($urandom), 1'b0);
      #1 chk(rca_sum(chan_out) === held, "outputs kept in standby");
    end
    @(negedge clk) sleep_req = 0;
    repeat (2) @(posedge clk);
    #1 chk(active, "awake two clocks after the request falls");
    adds(20, "add after wake-up");
    chk(!vdd_violation && !bels_err, "no supply or shifter violation");
    // register configuration: count updates per clock of f
    tc[0] = reg_tile(0, 1, 2); tc[1] = reg_tile(3, 4, 5);
    tc[2] = reg_tile(6, 7, CARRY_TRK); tc[3] = reg_tile(W, W, W);
    load(tc);
    for (int m = 0; m < 2; m++) begin
      fast_req = (m == 0);
      repeat (30) @(negedge clk);
      updates = 0;
      for (int r = 0; r < 40; r++) begin
        logic [W-1:0] v;
        prev = rca_sum(chan_out);
        do v = W'({$urandom}); while (rca_sum(v) == prev);
        @(negedge clk) chan_in = v;
        @(posedge clk); #1;
        if (rca_sum(chan_out) === rca_sum(v)) updates++;
        else chk(rca_sum(chan_out) === prev, "register holds between f/2 edges");
      end
      chk(updates == (m == 0 ? 40 : 20), $sformatf("register updates %0d in 40 clocks (mode %0d)", updates, m));
    end
    chk(!vdd_violation && !bels_err, "no violation after hopping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
