// tb_clb: maps a 2-bit slice of a ripple-carry adder on one CLB (four BLEs,
// feedback through the local crossbar) and checks it exhaustively; then the
// registered outputs, the output keepers in standby and the standby forcing.
module tb_clb;
  import fpga_pkg::*;
  import tb_cfg_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, sleep = 0, keep = 0;
  clb_cfg_t cfg;
  logic [I-1:0] in;
  logic [O-1:0] out;
  int checks = 0, failures = 0;

  clb dut (.*);

  always #5 clk = ~clk;

  // pins: 0 a0, 1 b0, 2 a1, 3 b1, 4 cin; outputs {cout, s1, s0}
  function automatic logic [2:0] slice(logic [I-1:0] v);
    logic [2:0] s;
    s = 3'({v[2], v[0]}) + 3'({v[3], v[1]}) + 3'(v[4]);
    return s;
  endfunction

  task automatic chk(logic [O-1:0] exp, string what);
    checks++;
    if (out !== exp) begin failures++; $display("FAIL %s in=%b out=%b exp=%b", what, in, out, exp); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [O-1:0] held, exp;
    cfg = rca_clb();
    in = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 2**I; v++) begin
      in = I'(v);
      #1 chk(slice(in), "comb add");
    end
    // sums registered, carry combinational
    cfg.ble[0].use_ff = 1; cfg.ble[2].use_ff = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk); in = I'($urandom);
      exp = slice(in);
      @(posedge clk); #1;
      // BLE2 computes from BLE1 (combinational), so both sums hold the values
      // of the inputs present at the edge
      chk({exp[2], exp[1:0]}, "registered sums");
    end
    cfg.ble[0].use_ff = 0; cfg.ble[2].use_ff = 0;
    // keepers: hold the outputs while cut off
    @(negedge clk); in = 5'b10101; #1 held = out;
    keep = 1; ce = 0;
    @(negedge clk); sleep = 1;
    for (int r = 0; r < 10; r++) begin
      in = I'($urandom); #1 chk(held, "keeper hold");
    end
    sleep = 0; keep = 0; ce = 1;
    #1 chk(slice(in), "after wake");
    // standby without keepers: all LUT outputs forced low
    sleep = 1; in = '1;
    #1 chk('0, "standby forcing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
