// tb_contrast_adjust: random base/detail/anchor/factor values, including
// ones that saturate, compared with an integer model.
module tb_contrast_adjust;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic signed [15:0] base, detail, anchor, adj, merged;
  logic [15:0]        factor;
  int checks = 0, failures = 0;

  contrast_adjust dut (.*);

  function automatic longint sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; base = 0; detail = 0; anchor = 0; factor = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint ea, em, sc;
      @(negedge clk);
      base = 16'($urandom); detail = 16'($urandom_range(0, 4000) - 2000);
      anchor = 16'($urandom_range(0, 3000));
      factor = (n % 3 == 0) ? 16'($urandom) : 16'($urandom_range(64, 512));
      in_valid = 1;
      sc = (longint'(base) - longint'(anchor)) * longint'(factor);
      ea = sat(longint'(anchor) + (sc >>> 8));
      em = sat(ea + longint'(detail));
      @(posedge clk); #1;
      checks += 2;
      if (!out_valid) failures++;
      if (longint'(adj) != ea) failures++;
      if (longint'(merged) != em) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
