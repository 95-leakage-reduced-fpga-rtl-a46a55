// tb_fpga_top: the whole fabric at its default size, end to end. Island 0 is
// configured as an 8-bit ripple-carry adder, island 1 as a register for the
// sum and carry; the channel carries the operands in and the registered result
// out. The test loads the full configuration chain, then runs additions while
// the islands hop between VDDH/f and VDDL/f/2 and enter and leave zigzag
// standby. It counts each mechanism: configuration load, addition at f,
// register update at f, hop down and up of each island, f/2 register rate,
// level shifters in NON-SHIFT mode, standby with kept outputs and wake-up
// within the required time; a mechanism never seen counts as a failure.
module tb_fpga_top;
  import fpga_pkg::*;
  import tb_cfg_pkg::*;
  localparam int unsigned ISL = 2;
  localparam int unsigned NT  = ISL * CLBS_PER_ISLAND;
  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [ISL-1:0] fast_req = '1, sleep_req = '0;
  logic [W-1:0] chan_in = '0, chan_out;
  logic [ISL-1:0] island_fast, island_slow, island_vdd_h, island_active, vdd_violation, bels_err;
  int checks = 0, failures = 0;

  typedef enum int {
    M_CONFIG, M_ADD_F, M_REG_F, M_HOP_DOWN, M_HOP_UP, M_REG_F2, M_NONSHIFT,
    M_STANDBY_KEEP, M_WAKE, M_NUM
  } mech_e;
  int mech [M_NUM];

  fpga_top dut (.*);

  always #5 clk = ~clk;

  // hop events seen on the status outputs
  logic [ISL-1:0] fast_q;
  always @(posedge clk) begin
    fast_q <= island_fast;
    if (mech[M_CONFIG] > 0) for (int i = 0; i < ISL; i++) begin
      if (fast_q[i] && !island_fast[i]) mech[M_HOP_DOWN]++;
      if (!fast_q[i] && island_fast[i]) mech[M_HOP_UP]++;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One clock: new operands before the edge; after the edge the registered
  // result is either the new sum (island 1 clocked) or the previous one.
  task automatic step(output logic updated);
    logic [7:0] a, b; logic c; logic [8:0] prev, s;
    prev = rca_sum(chan_out);
    do begin
      a = 8'($urandom); b = 8'($urandom); c = 1'($urandom);
      s = 9'(a) + 9'(b) + 9'(c);
    end while (s == prev);
    @(negedge clk) chan_in = rca_chan(a, b, c);
    @(posedge clk); #1;
    updated = (rca_sum(chan_out) === s);
    if (!updated) chk(rca_sum(chan_out) === prev, "result holds between island clock edges");
  endtask

  task automatic run(int n, output int updates);
    logic u;
    updates = 0;
    for (int r = 0; r < n; r++) begin
      step(u);
      if (u) updates++;
    end
  endtask

  task automatic settle();
    repeat (30) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tile_cfg_t tc[NT];
    int u;
    logic [8:0] held;
    @(posedge clk); #1 rst_n = 1;
    // island 0: adder; island 1: result register
    for (int t = 0; t < 4; t++) tc[t] = rca_tile(t);
    tc[4] = reg_tile(0, 1, 2); tc[5] = reg_tile(3, 4, 5);
    tc[6] = reg_tile(6, 7, CARRY_TRK); tc[7] = reg_tile(W, W, W);
    for (int t = NT - 1; t >= 0; t--)
      for (int b = TILE_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = tc[t][b];
      end
    @(negedge clk); cfg_en = 0;
    mech[M_CONFIG]++;

    // both islands at VDDH and f: every clock gives a new registered sum
    run(100, u);
    chk(u == 100, $sformatf("updates at f: %0d of 100", u));
    if (u == 100) begin mech[M_ADD_F]++; mech[M_REG_F]++; end

    // island 0 (adder) hops down: level shifters bypass, result still exact
    fast_req[0] = 0; settle();
    chk(!island_fast[0] && island_slow[0] && !island_vdd_h[0], "island 0 at VDDL and f/2");
    run(100, u);
    chk(u == 100, $sformatf("adder at VDDL, register at f: %0d of 100", u));
    if (u == 100) mech[M_NONSHIFT]++;

    // island 1 (register) hops down too: half the clocks update
    fast_req[1] = 0; settle();
    chk(island_slow == '1, "both islands at f/2");
    run(100, u);
    chk(u == 50, $sformatf("updates at f/2: %0d of 100", u));
    if (u == 50) mech[M_REG_F2]++;

    // island 1 in zigzag standby: registered result kept
    sleep_req[1] = 1;
    repeat (3) @(negedge clk);
    chk(!island_active[1], "island 1 in standby");
    held = rca_sum(chan_out);
    run(40, u);
    chk(u == 0 && rca_sum(chan_out) === held, "result kept in standby");
    if (u == 0 && rca_sum(chan_out) === held) mech[M_STANDBY_KEEP]++;

    // wake-up and hop up both islands
    @(negedge clk) sleep_req[1] = 0;
    repeat (2) @(posedge clk);
    #1 chk(island_active[1], "active one wake clock after the request");
    if (island_active[1]) mech[M_WAKE]++;
    fast_req = '1; settle();
    chk(island_fast == '1 && island_vdd_h == '1, "both islands back at VDDH and f");
    run(100, u);
    chk(u == 100, $sformatf("updates at f after hopping up: %0d of 100", u));

    chk(vdd_violation == '0, "no island clocked at f without VDDH");
    chk(bels_err == '0, "no level shifter in an illegal mode");
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
      else $display("mechanism %s: %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
