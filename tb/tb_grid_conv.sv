// tb_grid_conv: random grid neighbourhoods (including empty ones) through the
// convolution engine, one per cycle, compared with the normalised 3x3x3
// binomial convolution computed in the testbench; checks the 5-cycle latency.
module tb_grid_conv;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [21:0] sum [3][3][3];
  logic [14:0] wt  [3][3][3];
  logic [15:0] out;
  int checks = 0, failures = 0;

  grid_conv dut (.*);

  longint expq[$];
  int cyc = 0, tin[$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e;
    e = expq.pop_front();
    checks++;
    if (longint'(out) != e) begin
      failures++;
      if (failures < 5) $display("got %0d exp %0d", out, e);
    end
    if (cyc - tin.pop_front() != 5) failures++;
  end

  initial begin
    int k1 [3] = '{1, 2, 1};
    in_valid = 0;
    foreach (sum[r, j, i]) begin sum[r][j][i] = 0; wt[r][j][i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint cs, cw, e;
      @(negedge clk);
      cs = 0; cw = 0;
      foreach (sum[r, j, i]) begin
        int w, avg;
        w = (n % 7 == 0) ? 0 : $urandom_range(0, (n % 2) ? 16384 : 40);
        avg = $urandom_range(0, 255);
        wt[r][j][i] = 15'(w);
        sum[r][j][i] = 22'(w * avg);
        cs += longint'(k1[r] * k1[j] * k1[i]) * w * avg;
        cw += longint'(k1[r] * k1[j] * k1[i]) * w;
      end
      e = (cw == 0) ? 0 : (cs * 256) / cw;
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin expq.push_back(e); tin.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
