// tb_power_switch: checks the settling time after each supply change and the
// sticky violation flag for clocking at f without VDDH.
module tb_power_switch;
  localparam int unsigned RAMP = 4;
  logic clk = 0, rst_n = 0, sel_h = 1, blk_fast = 0;
  logic vdd_h, vdd_l, violation;
  int checks = 0, failures = 0;

  power_switch #(.RAMP_CYCLES(RAMP)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // number of rising edges until cond becomes true
  task automatic settle(input logic to_h, output int n);
    n = 0;
    while ((to_h ? vdd_h : vdd_l) !== 1'b1 && n < 100) begin
      @(posedge clk); #1 n++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    @(posedge clk); #1 chk(vdd_h && !vdd_l && !violation, "reset at VDDH");
    @(negedge clk) rst_n = 1;
    @(negedge clk) sel_h = 0;
    #1 chk(!vdd_h && !vdd_l, "ramping down");
    settle(1'b0, n);
    chk(n == RAMP + 1, $sformatf("down settle %0d", n));
    @(negedge clk) sel_h = 1;
    #1 chk(!vdd_h && !vdd_l, "ramping up");
    settle(1'b1, n);
    chk(n == RAMP + 1, $sformatf("up settle %0d", n));
    chk(!violation, "no violation yet");
    blk_fast = 1;
    repeat (3) @(posedge clk);
    #1 chk(!violation, "fast at VDDH is legal");
    @(negedge clk) sel_h = 0;
    @(posedge clk); #1 chk(violation, "fast while leaving VDDH flagged");
    blk_fast = 0; sel_h = 1;
    repeat (10) @(posedge clk);
    #1 chk(violation, "flag sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
