// tb_pg_ctrl: checks that standby (cut-off, keepers closed, flip-flops
// stopped) is reached one clock after the request, that the cut-off is
// released one clock after the request falls while the keepers stay closed,
// and that the island is active one wake-up clock later.
module tb_pg_ctrl;
  logic clk = 0, rst_n = 0, sleep_req = 0;
  logic sleep, keep, ce, active;
  int checks = 0, failures = 0, bad = 0;

  pg_ctrl #(.WAKE_CYCLES(1)) dut (.*);

  always #5 clk = ~clk;

  // sleep must never be high while the keepers are open or flip-flops run
  always @(negedge clk) if (sleep && (!keep || ce)) bad++;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 chk(active && ce && !keep && !sleep, "reset active");
    @(negedge clk) rst_n = 1;
    @(negedge clk) sleep_req = 1;
    @(posedge clk) #1 chk(sleep && keep && !ce && !active, "standby within one clock");
    repeat (5) @(posedge clk);
    #1 chk(sleep, "stays in standby");
    @(negedge clk) sleep_req = 0;
    @(posedge clk) #1 chk(!sleep && keep && !active, "cut-off released, waking");
    @(posedge clk) #1 chk(active && ce && !keep, "active after one wake clock");
    // a one-clock request still passes through standby and wake-up
    @(negedge clk) sleep_req = 1;
    @(negedge clk) sleep_req = 0;
    #1 chk(sleep, "short request enters standby");
    @(posedge clk) #1 chk(!sleep && keep, "short request waking");
    @(posedge clk) #1 chk(active, "short request active again");
    for (int r = 0; r < 200; r++) @(negedge clk) sleep_req = $urandom_range(0, 1);
    chk(bad == 0, "ordering");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
