// tb_interp_engine: builds a random filtered grid, streams pixels through
// the interpolation engine one per cycle (fetching the eight cells from the
// engine's cell indices) and compares each result with the three-step
// interpolation model of the filter description (equations for x, y, then r).
// Also checks the three-cycle latency.
module tb_interp_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  log2_sigma_s, log2_sigma_r;
  logic        in_valid, out_valid;
  logic [11:0] x, y, cell_i, cell_j;
  logic [7:0]  intensity, cell_r;
  logic [15:0] f [2][2][2];
  logic [15:0] out;
  int checks = 0, failures = 0;

  interp_engine dut (.*);

  logic [15:0] grid [0:16][0:16][0:16];   // [r][j][i]
  longint expq[$];
  int cyc = 0, tin[$];
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int r = 0; r < 2; r++) for (int j = 0; j < 2; j++) for (int i = 0; i < 2; i++)
      f[r][j][i] = grid[cell_r + 8'(r)][cell_j + 12'(j)][cell_i + 12'(i)];

  function automatic longint lerp(longint a, longint b, longint d, longint s);
    return (a * (s - d) + b * d) / s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (longint'(out) != expq.pop_front()) failures++;
    if (cyc - tin.pop_front() != 3) failures++;
  end

  initial begin
    foreach (grid[r, j, i]) grid[r][j][i] = 16'($urandom);
    in_valid = 0; x = 0; y = 0; intensity = 0;
    log2_sigma_s = 4; log2_sigma_r = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint ss, sr, i, j, r, xd, yd, id, fj0, fj1, fk0, fk1, fr0, fr1;
      @(negedge clk);
      if (n % 500 == 0) begin
        log2_sigma_s = 3'($urandom_range(4, 7));
        log2_sigma_r = 3'($urandom_range(4, 6));
      end
      ss = 1 << log2_sigma_s; sr = 1 << log2_sigma_r;
      x = 12'($urandom_range(0, 16 * int'(ss) - 1));
      y = 12'($urandom_range(0, 16 * int'(ss) - 1));
      intensity = 8'($urandom);
      in_valid = ($urandom_range(0, 4) != 0);
      i = x / ss; j = y / ss; r = intensity / sr;
      xd = x - ss * i; yd = y - ss * j; id = intensity - sr * r;
      fj0 = lerp(grid[r][j][i], grid[r][j][i+1], xd, ss);
      fj1 = lerp(grid[r][j+1][i], grid[r][j+1][i+1], xd, ss);
      fk0 = lerp(grid[r+1][j][i], grid[r+1][j][i+1], xd, ss);
      fk1 = lerp(grid[r+1][j+1][i], grid[r+1][j+1][i+1], xd, ss);
      fr0 = lerp(fj0, fj1, yd, ss);
      fr1 = lerp(fk0, fk1, yd, ss);
      if (in_valid) begin
        expq.push_back(lerp(fr0, fr1, id, sr));
        tin.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
