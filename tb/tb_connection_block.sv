// tb_connection_block: random configurations and channel values, compared
// with an independent model of pin selection and track driving.
module tb_connection_block;
  import fpga_pkg::*;
  cb_cfg_t cfg;
  logic [W-1:0] trk_in, trk_out, exp_trk;
  logic [O-1:0] clb_out;
  logic [I-1:0] clb_in, exp_in;
  int checks = 0, failures = 0;

  connection_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      for (int p = 0; p < I; p++) cfg.ipin_sel[p] = TSEL_W'($urandom_range(0, 2**TSEL_W - 1));
      for (int t = 0; t < W; t++) cfg.opin_drv[t] = ($urandom_range(0, 3) == 0) ? 2'($urandom_range(1, 3)) : 2'd0;
      trk_in = W'($urandom); clb_out = O'($urandom);
      #1;
      for (int p = 0; p < I; p++) exp_in[p] = (cfg.ipin_sel[p] < W) ? trk_in[cfg.ipin_sel[p]] : 1'b0;
      for (int t = 0; t < W; t++)
        case (cfg.opin_drv[t])
          2'd0: exp_trk[t] = trk_in[t];
          2'd1: exp_trk[t] = clb_out[0];
          2'd2: exp_trk[t] = clb_out[1];
          default: exp_trk[t] = clb_out[2];
        endcase
      checks += 2;
      if (clb_in !== exp_in) begin failures++; $display("FAIL pins %b exp %b", clb_in, exp_in); end
      if (trk_out !== exp_trk) begin failures++; $display("FAIL tracks %h exp %h", trk_out, exp_trk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
