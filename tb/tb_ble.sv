// tb_ble: checks the combinational path, the registered path (one clock of
// latency), the flip-flop enable and reset of one BLE, with random tables.
module tb_ble;
  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0, ce = 1, sleep = 0, use_ff = 0;
  logic [2**K-1:0] truth;
  logic [K-1:0] in;
  logic out;
  int checks = 0, failures = 0;

  ble #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: out=%b exp=%b", what, out, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    truth = 16'($urandom);
    in = '0;
    use_ff = 1;
    #1 check(1'b0, "reset");
    @(negedge clk) rst_n = 1;
    // combinational
    use_ff = 0;
    for (int r = 0; r < 100; r++) begin
      truth = 16'($urandom); in = K'($urandom);
      #1 check(truth[in], "comb");
    end
    // registered: output is the LUT value sampled at the last rising edge
    use_ff = 1;
    for (int r = 0; r < 100; r++) begin
      @(negedge clk);
      truth = 16'($urandom); in = K'($urandom);
      prev = truth[in];
      @(posedge clk); #1;
      check(prev, "reg");
    end
    // enable low: flip-flop holds
    @(negedge clk); prev = out; ce = 0;
    for (int r = 0; r < 10; r++) begin
      @(negedge clk); in = K'($urandom); truth = ~truth;
      @(posedge clk); #1 check(prev, "hold");
    end
    // sleep: LUT output 0, captured once enabled
    @(negedge clk); ce = 1; sleep = 1; truth = '1;
    @(posedge clk); #1 check(1'b0, "sleep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
