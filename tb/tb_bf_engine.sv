// tb_bf_engine: self-checking testbench of the bilateral filter engine.
//
// Filters small images with several grid settings, one of them
// cross-bilateral (bins from one image, summed values from another), and compares every output
// pixel with a bit-exact model written in plain SystemVerilog: the grid is
// built by summing intensities and counting pixels per block and bin, the
// 3x3x3 binomial kernel (1 2 1 per axis) is applied with empty cells outside
// the grid, each filtered cell is (sum << 8) / weight, and the output is the
// trilinear interpolation computed as three truncating linear steps, with
// the last row/column/bin repeated at the far edges. The image is sent twice
// (block order, then raster order) with random gaps on pix_valid. Also
// checks the number of results, the phase sequence and done. The model and
// the clamping follow this design's choices, not numbers from the original.
// A watchdog ends the run if the engine hangs.
module tb_bf_engine;
  localparam int GWM = 4, GHM = 4, NB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] ls, lr;
  logic [2:0] gw, gh;
  logic start = 0, pix_valid = 0, pix_ready, out_valid, done;
  logic [7:0] pix, pix_val;
  logic [15:0] out;
  logic [1:0] phase;

  bf_engine #(.NBINS(NB), .GW_MAX(GWM), .GH_MAX(GHM)) dut (
    .clk, .rst_n, .log2_sigma_s(ls), .log2_sigma_r(lr), .gw, .gh, .start,
    .pix_valid, .pix_ready, .pix, .pix_val, .out_valid, .out, .phase, .done);

  int checks = 0, failures = 0;
  byte unsigned img [64*4][64*4];
  byte unsigned vimg [64*4][64*4];   // filtered values (cross-bilateral)
  longint gs [NB][GHM][GWM];
  longint gwt[NB][GHM][GWM];
  int     flt[NB][GHM][GWM];
  int     W, H, S, R, NBN;
  int     expq[$];
  int     nout;
  bit     seen_phase [4];

  function automatic int k1(int d); return (d == 0) ? 2 : 1; endfunction

  function automatic int li(int v0, int v1, int d, int l);
    return (v0 * ((1 << l) - d) + v1 * d) >> l;
  endfunction

  task automatic build_model();
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < GHM; j++)
        for (int i = 0; i < GWM; i++) begin gs[b][j][i] = 0; gwt[b][j][i] = 0; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int b = img[y][x] >> lr;
        gs[b][y >> ls][x >> ls] += vimg[y][x];
        gwt[b][y >> ls][x >> ls] += 1;
      end
    for (int b = 0; b < NBN; b++)
      for (int j = 0; j < gh; j++)
        for (int i = 0; i < gw; i++) begin
          longint s = 0, w = 0;
          for (int db = -1; db <= 1; db++)
            for (int dj = -1; dj <= 1; dj++)
              for (int di = -1; di <= 1; di++) begin
                int bb = b + db, jj = j + dj, ii = i + di;
                if (bb >= 0 && bb < NBN && jj >= 0 && jj < gh && ii >= 0 && ii < gw) begin
                  int k = k1(db) * k1(dj) * k1(di);
                  s += k * gs[bb][jj][ii];
                  w += k * gwt[bb][jj][ii];
                end
              end
          flt[b][j][i] = (w == 0) ? 0 : int'((s << 8) / w);
          if (flt[b][j][i] > 65535) flt[b][j][i] = 65535;
        end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int i = x >> ls, j = y >> ls, r = img[y][x] >> lr;
        int i1 = (i + 1 >= gw) ? gw - 1 : i + 1;
        int j1 = (j + 1 >= gh) ? gh - 1 : j + 1;
        int r1 = (r + 1 >= NBN) ? r : r + 1;
        int xd = x & (S - 1), yd = y & (S - 1), id = img[y][x] & (R - 1);
        int fx[2][2], fy[2];
        int rr[2] = '{r, r1};
        for (int a = 0; a < 2; a++) begin
          fx[a][0] = li(flt[rr[a]][j][i],  flt[rr[a]][j][i1],  xd, ls);
          fx[a][1] = li(flt[rr[a]][j1][i], flt[rr[a]][j1][i1], xd, ls);
          fy[a]    = li(fx[a][0], fx[a][1], yd, ls);
        end
        expq.push_back(li(fy[0], fy[1], id, lr));
      end
  endtask

  always @(posedge clk) begin
    seen_phase[phase] <= 1'b1;
    if (out_valid) begin
      int e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: pixel %0d got %0d expected %0d", nout, out, e);
        end
      end
      nout++;
    end
  end

  task automatic send_pixel(byte unsigned v, byte unsigned vv);
    if ($urandom_range(3) == 0) begin
      pix_valid <= 0;
      repeat ($urandom_range(2) + 1) @(posedge clk);
    end
    pix <= v; pix_val <= vv; pix_valid <= 1;
    // the transfer happens on the first rising edge with pix_ready high
    @(negedge clk);
    while (!pix_ready) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic run(int l2s, int l2r, int bw, int bh, int kind, bit xbil = 0);
    ls = 3'(l2s); lr = 3'(l2r); gw = 3'(bw); gh = 3'(bh);
    S = 1 << l2s; R = 1 << l2r; NBN = 256 >> l2r; W = bw * S; H = bh * S;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        case (kind)
          0: v = (x * 255) / W;                                  // ramp
          1: v = ((x < W / 2) ? 40 : 200) + $urandom_range(20) - 10; // edge+noise
          default: v = $urandom_range(255);
        endcase
        if (v < 0) v = 0; if (v > 255) v = 255;
        img[y][x] = 8'(v);
        vimg[y][x] = xbil ? 8'($urandom_range(255)) : 8'(v);
      end
    build_model();
    nout = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    // block order
    for (int by = 0; by < bh; by++)
      for (int bx = 0; bx < bw; bx++)
        for (int py = 0; py < S; py++)
          for (int px = 0; px < S; px++)
            send_pixel(img[by * S + py][bx * S + px], vimg[by * S + py][bx * S + px]);
    pix_valid <= 0;
    // raster order
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        send_pixel(img[y][x], 8'd0);
    pix_valid <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (nout != W * H || expq.size() != 0) begin
      failures++; $display("FAIL: %0d outputs for %0d pixels", nout, W * H);
    end
    $display("run sigma_s=%0d sigma_r=%0d grid %0dx%0d: %0d pixels", S, R, bw, bh, nout);
  endtask

  initial begin
    ls = 4; lr = 5; gw = 1; gh = 1; pix = 0; pix_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 5, 3, 2, 1);
    run(4, 4, 2, 2, 2);
    run(5, 6, 2, 1, 0);
    run(4, 5, 4, 4, 1);
    run(4, 5, 3, 3, 1, 1);   // cross-bilateral
    checks++;
    if (!(seen_phase[1] && seen_phase[2] && seen_phase[3])) begin
      failures++; $display("FAIL: not all phases seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("FAIL: watchdog (state %0d phase %0d outputs %0d, waiting %0d))", dut.st, phase, nout, expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
