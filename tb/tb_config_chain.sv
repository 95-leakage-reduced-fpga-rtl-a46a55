// tb_config_chain: shifts random words through a 37-bit chain and checks the
// parallel contents, the serial output and that the chain holds with cfg_en low.
module tb_config_chain;
  localparam int unsigned BITS = 37;
  logic clk = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [BITS-1:0] q, word, prev;
  int checks = 0, failures = 0;

  config_chain #(.BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 6; r++) begin
      prev = q;
      word = {$urandom, $urandom};
      for (int b = BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = word[b];
        @(posedge clk); #1;
        checks++;
        // after shifting in bits BITS-1..b, the oldest bit still in the chain leaves
        if (b > 0 && cfg_out !== prev[b-1]) begin
          failures++; $display("FAIL serial out at bit %0d", b);
        end
      end
      checks++;
      if (q !== word) begin failures++; $display("FAIL q=%h exp=%h", q, word); end
      @(negedge clk); cfg_en = 0; cfg_in = ~cfg_in;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (q !== word) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
