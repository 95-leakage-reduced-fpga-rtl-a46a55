// tb_lut: exhaustive check of the K-input LUT against its truth table, and of
// the standby forcing (output 0 whatever the table and inputs).
module tb_lut;
  localparam int unsigned K = 4;
  logic [2**K-1:0] cfg;
  logic            sleep;
  logic [K-1:0]    in;
  logic            out;
  int checks = 0, failures = 0;

  lut #(.K(K)) dut (.cfg(cfg), .sleep(sleep), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      cfg = 16'($urandom);
      if (r == 0) cfg = 16'h8000;
      if (r == 1) cfg = 16'h0001;
      for (int s = 0; s < 2; s++) begin
        sleep = s[0];
        for (int v = 0; v < 2**K; v++) begin
          in = K'(v);
          #1;
          checks++;
          if (out !== (sleep ? 1'b0 : cfg[v])) begin
            failures++;
            $display("FAIL cfg=%h sleep=%b in=%h out=%b", cfg, sleep, in, out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
