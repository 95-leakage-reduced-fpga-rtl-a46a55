// tb_level_shifter_bels: the shifter passes its input in SHIFT mode (Bypass at
// VDDL or 0 V) and in NON-SHIFT mode at VDDL, and keeps its last value and
// flags an error for illegal combinations.
module tb_level_shifter_bels;
  import fpga_pkg::*;
  logic in, en, vdd_l, out, mode_err;
  level_e bypass;
  int checks = 0, failures = 0;

  level_shifter_bels dut (.*);

  task automatic expect_pass(string what);
    for (int r = 0; r < 8; r++) begin
      in = r[0] ^ r[2];
      #1 checks++;
      if (out !== in || mode_err !== 1'b0) begin failures++; $display("FAIL %s in=%b out=%b err=%b", what, in, out, mode_err); end
    end
  endtask

  task automatic expect_hold(string what);
    logic last;
    last = out;
    in = ~last;
    #1 checks++;
    if (out !== last || mode_err !== 1'b1) begin failures++; $display("FAIL %s out=%b err=%b", what, out, mode_err); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; bypass = LV_VDDL; vdd_l = 0; in = 0;
    expect_pass("shift at VDDH");
    vdd_l = 1;
    expect_pass("shift at VDDL");
    bypass = LV_0V; vdd_l = 0;
    expect_pass("shift with bypass 0V");
    en = 1; bypass = LV_VDDH; vdd_l = 1;
    expect_pass("non-shift");
    vdd_l = 0;
    expect_hold("non-shift above VDDL");
    en = 0; bypass = LV_VDDH;
    expect_hold("bypass VDDH while shifting");
    en = 1; bypass = LV_VDDL; vdd_l = 1;
    expect_hold("cut off with bypass at VDDL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
