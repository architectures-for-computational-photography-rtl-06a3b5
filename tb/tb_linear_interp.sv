// tb_linear_interp: exhaustive-ish random check of the weighted average
// against an integer model, for every spacing from 1 to 128.
module tb_linear_interp;
  logic [15:0] v0, v1, out;
  logic [7:0]  d;
  logic [2:0]  log2_sigma;
  int checks = 0, failures = 0;

  linear_interp dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint s, e;
      log2_sigma = 3'($urandom_range(0, 7));
      s = 1 << log2_sigma;
      v0 = 16'($urandom); v1 = 16'($urandom);
      d  = 8'($urandom_range(0, int'(s) - 1));
      #1;
      e = (longint'(v0) * (s - longint'(d)) + longint'(v1) * longint'(d)) / s;
      checks++;
      if (longint'(out) != e) begin
        failures++;
        if (failures < 5) $display("v0=%0d v1=%0d d=%0d s=%0d got %0d exp %0d", v0, v1, d, s, out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
