// tb_switch_block: random routing patterns against a model of the
// straight / next / previous / off choices, wrap-around included.
module tb_switch_block;
  import fpga_pkg::*;
  sb_cfg_t cfg;
  logic [W-1:0] trk_in, trk_out, exp;
  int checks = 0, failures = 0;

  switch_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      for (int t = 0; t < W; t++) cfg.route[t] = sb_sel_e'($urandom_range(0, 3));
      trk_in = W'($urandom);
      #1;
      for (int t = 0; t < W; t++) begin
        int src;
        src = -1;
        if (cfg.route[t] == SB_STRAIGHT) src = t;
        if (cfg.route[t] == SB_NEXT)     src = (t == W - 1) ? 0 : t + 1;
        if (cfg.route[t] == SB_PREV)     src = (t == 0) ? W - 1 : t - 1;
        exp[t] = (src < 0) ? 1'b0 : trk_in[src];
      end
      checks++;
      if (trk_out !== exp) begin failures++; $display("FAIL %h exp %h", trk_out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
