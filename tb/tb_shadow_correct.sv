// tb_shadow_correct: random blocks (flat, noisy and with a strong edge)
// through the shadow-correction datapath; the mask and merged pixels are
// compared with a model of the block-mean edge test, the binomial mask
// smoothing and the detail merge, and the two-cycle latency is checked.
module tb_shadow_correct;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid, out_valid;
  logic [7:0]        nf [5][5];
  logic [7:0]        base [4][4];
  logic signed [8:0] detail [4][4];
  logic [15:0]       mask;
  logic [7:0]        out [4][4];
  int checks = 0, failures = 0;

  shadow_correct dut (.*);

  int edge_blocks = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int v); return v < 0 ? 0 : v > 3 ? 3 : v; endfunction
  function automatic int ad(int a, int b); return a > b ? a - b : b - a; endfunction

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int g [4][4];
      int sum, em [4][4], eo [4][4];
      bit [15:0] emask;
      @(negedge clk);
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          case (n % 3)
            0: nf[r][c] = 8'(100 + $urandom_range(0, 3));
            1: nf[r][c] = 8'($urandom);
            default: nf[r][c] = (c >= 2) ? 8'(200 + $urandom_range(0, 5)) : 8'(20 + $urandom_range(0, 5));
          endcase
      foreach (base[r, c]) begin
        base[r][c] = 8'($urandom);
        detail[r][c] = 9'($urandom_range(0, 400) - 200);
      end
      sum = 0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          g[r][c] = ad(nf[r][c+1], nf[r][c]) + ad(nf[r+1][c], nf[r][c]);
          sum += g[r][c];
        end
      emask = '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) emask[4*r+c] = (16 * g[r][c] > sum);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          int a, v, k [3];
          k = '{1, 2, 1};
          a = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              a += emask[4*cl(r+dr)+cl(c+dc)] * k[dr+1] * k[dc+1];
          v = int'(base[r][c]) + ((int'(detail[r][c]) * a) >>> 4);
          eo[r][c] = v < 0 ? 0 : v > 255 ? 255 : v;
        end
      in_valid = 1;
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (!out_valid || mask != emask) failures++;
      if (n % 3 == 2 && emask != 0) edge_blocks++;
      foreach (out[r, c]) begin
        checks++;
        if (int'(out[r][c]) != eo[r][c]) failures++;
      end
      @(negedge clk) in_valid = 0;
    end
    // the edge test must actually have fired on the edge blocks
    checks++;
    if (edge_blocks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
