// tb_clk_div2_sel: counts island clock edges per 100 cycles of f at full and
// half rate, checks that every island clock edge is an edge of f, that two
// units reset together keep one f/2 phase, and that switching is glitch-free
// (no high pulse shorter than half a period of f).
module tb_clk_div2_sel;
  logic clk = 0, rst_n = 0, slow = 0;
  logic blk_clk, slow_active, blk_clk2, slow_active2;
  int checks = 0, failures = 0;
  int edges = 0, edges2 = 0, misaligned = 0, glitches = 0, phase_diff = 0;
  realtime rise_t;

  clk_div2_sel dut  (.clk(clk), .rst_n(rst_n), .slow(slow), .blk_clk(blk_clk),  .slow_active(slow_active));
  clk_div2_sel dut2 (.clk(clk), .rst_n(rst_n), .slow(slow), .blk_clk(blk_clk2), .slow_active(slow_active2));

  always #5 clk = ~clk;

  always @(posedge blk_clk) begin
    edges++;
    rise_t = $realtime;
    if (clk !== 1'b1) misaligned++;
  end
  always @(negedge blk_clk) if (rst_n && $realtime - rise_t < 4.9) begin glitches++; $display("short pulse at %0t", $realtime); end
  always @(posedge blk_clk2) edges2++;
  always @(posedge clk) #1 if (blk_clk !== blk_clk2) phase_diff++;

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
    #12 rst_n = 1;
    @(posedge clk); #1;
    edges = 0;
    repeat (100) @(posedge clk);
    #1 chk(edges == 100, $sformatf("full rate edges %0d", edges));
    @(posedge clk) slow = 1;
    @(negedge clk); #1 chk(slow_active, "slow taken at falling edge");
    @(posedge clk); #1 edges = 0;
    repeat (100) @(posedge clk);
    #1 chk(edges == 50, $sformatf("half rate edges %0d", edges));
    @(posedge clk) slow = 0;
    @(negedge clk); #1 chk(!slow_active, "fast taken");
    edges = 0;
    repeat (100) @(posedge clk);
    #1 chk(edges == 100, $sformatf("full rate again %0d", edges));
    for (int r = 0; r < 40; r++) begin
      @(posedge clk) #2 slow = $urandom_range(0, 1);
    end
    repeat (4) @(posedge clk);
    #1;
    chk(misaligned == 0, "edges aligned with f");
    chk(glitches == 0, "no glitch");
    chk(phase_diff == 0, "single f/2 phase");
    chk(edges2 > 0, "second unit runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
