// bf_engine: bilateral filter engine built on a bilateral grid.
//
// Runs the three steps of grid-based bilateral filtering on one grey image:
//  1. assignment: the image arrives block by block (sigma_s x sigma_s
//     pixels, blocks in row-major order, pixels row-major inside a block);
//     NBINS grid assignment engines build each block's intensity histogram
//     (summed intensity and pixel count per bin) and the cells are stored in
//     the grid memory, one bank per bin;
//  2. filtering: for every grid position the 3x3 spatial neighbourhood of
//     all bins is gathered (nine cycles, one per position, all bins in
//     parallel) and NBINS convolution engines, one per bin, filter their
//     3x3x3 windows at once; the normalised results go to the filtered-grid
//     memory;
//  3. interpolation: the image is streamed again in raster order; for every
//     pixel the 2x2 spatial neighbourhood of filtered cells is fetched (four
//     cycles, bins r and r+1 at once; five cycles per pixel in all) and the interpolation engine slices
//     the output value (unsigned, 8 fraction bits).
// Grid sizes: sigma_s = 16..128, sigma_r = 16, 32 or 64 (16, 8 or 4 bins;
// unused engines are idle). Cells outside the grid count as empty; the
// interpolation repeats the last row/column/bin at the far edges.
//
// This engine keeps the whole grid of one image on chip (GW_MAX x GH_MAX
// blocks). The original engine instead streams: it keeps two grid rows plus
// a few blocks, starts filtering as soon as 3x3x3 cells exist and
// interpolating once 2x2 filtered cells exist, so its memory does not grow
// with image height. That scheduling is not reproduced here.
//
// Cross-bilateral filtering (used to merge flash and no-flash images): pix
// chooses the intensity bin during assignment and slicing, while pix_val is
// the value summed into the grid, so edges come from one image and the
// filtered values from the other. For ordinary filtering pix_val = pix.
//
// Interface: configure log2 sigma_s/sigma_r and the grid size in blocks,
// pulse start, then stream the image twice through pix_valid/pix_ready/pix
// (first block order, then raster order); results leave on out_valid/out
// (no back-pressure) in raster order. phase tells where the engine is and
// done pulses after the last result.
module bf_engine #(
  parameter int unsigned NBINS  = 16,
  parameter int unsigned GW_MAX = 16,   // grid width in blocks
  parameter int unsigned GH_MAX = 16,   // grid height in blocks
  parameter int unsigned XW     = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    log2_sigma_s,
  input  logic [2:0]    log2_sigma_r,
  input  logic [$clog2(GW_MAX+1)-1:0] gw,
  input  logic [$clog2(GH_MAX+1)-1:0] gh,
  input  logic          start,
  input  logic          pix_valid,
  output logic          pix_ready,
  input  logic [7:0]    pix,
  input  logic [7:0]    pix_val,      // value to filter (= pix unless cross-bilateral)
  output logic          out_valid,
  output logic [15:0]   out,
  output logic [1:0]    phase,        // 0 idle, 1 assign, 2 filter, 3 slice
  output logic          done
);
  localparam int unsigned NC   = GW_MAX * GH_MAX;
  localparam int unsigned CAW  = $clog2(NC);
  localparam int unsigned SUMW = 22;
  localparam int unsigned WTW  = 15;
  localparam int unsigned BW   = $clog2(NBINS);

  typedef enum logic [2:0] {S_IDLE, S_ASSIGN, S_GATHER, S_CONV, S_FETCH, S_SLICE} st_t;
  st_t st;

  // ------------------------------------------------------------ memories
  logic [SUMW-1:0] gsum [NBINS][NC];
  logic [WTW-1:0]  gwt  [NBINS][NC];
  logic [15:0]     gflt [NBINS][NC];

  function automatic logic [CAW-1:0] cidx(int j, int i);
    return CAW'(j * GW_MAX + i);
  endfunction

  logic [4:0] nbins;
  assign nbins = 5'(256 >> log2_sigma_r);

  // -------------------------------------------------------------- counters
  logic [XW-1:0] px, py;          // pixel position within block / image
  logic [XW-1:0] bx, by;          // block position (assignment)
  logic [XW-1:0] smax;
  logic [XW-1:0] width, height;
  assign smax   = (XW'(1) << log2_sigma_s) - XW'(1);
  assign width  = XW'(gw) << log2_sigma_s;
  assign height = XW'(gh) << log2_sigma_s;

  // ------------------------------------------------------------ assignment
  logic            a_valid, a_start, a_end, a_cell_valid;
  logic [SUMW-1:0] a_sum [NBINS];
  logic [WTW-1:0]  a_wt  [NBINS];
  logic [XW-1:0]   a_bx, a_by;      // block whose cells are coming out

  assign a_valid = (st == S_ASSIGN) && pix_valid;
  assign a_start = (px == '0) && (py == '0);
  assign a_end   = (px == smax) && (py == smax);

  grid_assign #(.NBINS(NBINS), .SUMW(SUMW), .WTW(WTW)) u_assign (
    .clk, .rst_n, .log2_sigma_r,
    .pix_valid(a_valid), .pix, .val(pix_val), .blk_start(a_start), .blk_end(a_end),
    .cell_valid(a_cell_valid), .cell_sum(a_sum), .cell_wt(a_wt));

  // ------------------------------------------------------------ filtering
  logic [XW-1:0]   ci, cj;          // grid position being filtered
  logic [3:0]      gk;              // gather step 0..8
  logic [SUMW-1:0] win_s [9][NBINS];
  logic [WTW-1:0]  win_w [9][NBINS];
  logic            c_fire;
  logic [SUMW-1:0] c_sum [NBINS][3][3][3];
  logic [WTW-1:0]  c_wt  [NBINS][3][3][3];
  logic            c_ov  [NBINS];
  logic [15:0]     c_out [NBINS];

  always_comb begin
    for (int b = 0; b < NBINS; b++)
      for (int rr = 0; rr < 3; rr++)
        for (int jj = 0; jj < 3; jj++)
          for (int ii = 0; ii < 3; ii++) begin
            int src;
            src = b + rr - 1;
            if (src >= 0 && src < int'(nbins) && src < int'(NBINS)) begin
              c_sum[b][rr][jj][ii] = win_s[jj*3 + ii][src];
              c_wt[b][rr][jj][ii]  = win_w[jj*3 + ii][src];
            end else begin
              c_sum[b][rr][jj][ii] = '0;
              c_wt[b][rr][jj][ii]  = '0;
            end
          end
  end

  for (genvar b = 0; b < NBINS; b++) begin : g_conv
    grid_conv #(.SUMW(SUMW), .WTW(WTW)) u_conv (
      .clk, .rst_n, .in_valid(c_fire), .sum(c_sum[b]), .wt(c_wt[b]),
      .out_valid(c_ov[b]), .out(c_out[b]));
  end

  // ---------------------------------------------------------- interpolation
  logic [XW-1:0] sx, sy;            // raster position
  logic [7:0]    sI;
  logic [2:0]    fk;                // 0 waits for a pixel, 1..4 fetch
  logic [15:0]   fcell [2][2][2];
  logic          i_valid;
  logic [XW-1:0] cell_i, cell_j;
  logic [7:0]    cell_r;
  logic          i_ov;
  logic [15:0]   i_out;

  interp_engine #(.DW(16), .XW(XW)) u_interp (
    .clk, .rst_n, .log2_sigma_s, .log2_sigma_r,
    .in_valid(i_valid), .x(sx), .y(sy), .intensity(sI),
    .cell_i, .cell_j, .cell_r, .f(fcell), .out_valid(i_ov), .out(i_out));

  assign out_valid = i_ov;
  assign out       = i_out;

  // fetch address for step fk: clamp at the far edges
  logic [1:0]    fq;
  logic [XW-1:0] fj, fi;
  assign fq = 2'(fk - 3'd1);
  logic [BW-1:0] fr0, fr1;
  always_comb begin
    fi  = cell_i + XW'(fq[0]);
    fj  = cell_j + XW'(fq[1]);
    if (fi >= XW'(gw)) fi = XW'(gw) - XW'(1);
    if (fj >= XW'(gh)) fj = XW'(gh) - XW'(1);
    fr0 = BW'(cell_r);
    fr1 = (cell_r + 8'd1 >= 8'(nbins)) ? BW'(cell_r) : BW'(cell_r + 8'd1);
  end

  // pixels still inside the interpolation pipeline; last pixel taken
  logic [2:0]  inflight;
  logic        last_in;

  assign pix_ready = (st == S_ASSIGN) ||
                     (st == S_FETCH && fk == 3'd0 && !i_valid && !last_in);
  assign phase = (st == S_IDLE) ? 2'd0 : (st == S_ASSIGN) ? 2'd1 :
                 (st == S_GATHER || st == S_CONV) ? 2'd2 : 2'd3;

  // ----------------------------------------------------------- memory writes
  always_ff @(posedge clk) begin
    if (a_cell_valid)
      for (int b = 0; b < NBINS; b++) begin
        gsum[b][cidx(int'(a_by), int'(a_bx))] <= a_sum[b];
        gwt[b][cidx(int'(a_by), int'(a_bx))]  <= a_wt[b];
      end
    if (c_ov[0])
      for (int b = 0; b < NBINS; b++) gflt[b][cidx(int'(cj), int'(ci))] <= c_out[b];
  end

  // gather window
  always_ff @(posedge clk) begin
    if (st == S_GATHER) begin
      int jj, ii;
      jj = int'(cj) + int'(gk) / 3 - 1;
      ii = int'(ci) + int'(gk) % 3 - 1;
      for (int b = 0; b < NBINS; b++) begin
        if (jj >= 0 && ii >= 0 && jj < int'(gh) && ii < int'(gw)) begin
          win_s[gk][b] <= gsum[b][cidx(jj, ii)];
          win_w[gk][b] <= gwt[b][cidx(jj, ii)];
        end else begin
          win_s[gk][b] <= '0;
          win_w[gk][b] <= '0;
        end
      end
    end
  end

  // fetched cells
  always_ff @(posedge clk) begin
    if (st == S_FETCH && fk != 3'd0) begin
      fcell[0][fq[1]][fq[0]] <= gflt[fr0][cidx(int'(fj), int'(fi))];
      fcell[1][fq[1]][fq[0]] <= gflt[fr1][cidx(int'(fj), int'(fi))];
    end
  end

  // ----------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; px <= '0; py <= '0; bx <= '0; by <= '0; a_bx <= '0; a_by <= '0;
      ci <= '0; cj <= '0; gk <= '0; c_fire <= 1'b0;
      sx <= '0; sy <= '0; sI <= '0; fk <= '0; i_valid <= 1'b0;
      inflight <= '0; last_in <= 1'b0; done <= 1'b0;
    end else begin
      done    <= 1'b0;
      c_fire  <= 1'b0;
      i_valid <= 1'b0;
      inflight <= inflight + (i_valid ? 3'd1 : 3'd0) - (i_ov ? 3'd1 : 3'd0);
      case (st)
        S_IDLE: if (start) begin
          st <= S_ASSIGN; px <= '0; py <= '0; bx <= '0; by <= '0;
        end
        S_ASSIGN: if (pix_valid) begin
          if (a_end) begin
            a_bx <= bx; a_by <= by;
            px <= '0; py <= '0;
            if (bx + 1'b1 == XW'(gw)) begin
              bx <= '0;
              if (by + 1'b1 == XW'(gh)) begin
                st <= S_GATHER; ci <= '0; cj <= '0; gk <= '0;
              end else by <= by + 1'b1;
            end else bx <= bx + 1'b1;
          end else if (px == smax) begin
            px <= '0; py <= py + 1'b1;
          end else px <= px + 1'b1;
        end
        S_GATHER: begin
          // the last block's cells are written the cycle after its last pixel
          if (gk == 4'd8) begin
            gk <= '0; c_fire <= 1'b1; st <= S_CONV;
          end else gk <= gk + 1'b1;
        end
        S_CONV: if (c_ov[0]) begin
          if (ci + 1'b1 == XW'(gw)) begin
            ci <= '0;
            if (cj + 1'b1 == XW'(gh)) begin
              st <= S_FETCH; sx <= '0; sy <= '0; fk <= '0; last_in <= 1'b0;
            end else begin
              cj <= cj + 1'b1; st <= S_GATHER;
            end
          end else begin
            ci <= ci + 1'b1; st <= S_GATHER;
          end
        end
        S_FETCH: begin
          if (fk == 3'd0) begin
            if (last_in) begin
              if (inflight == '0 && !i_valid) begin st <= S_IDLE; done <= 1'b1; end
            end else if (pix_valid && !i_valid) begin
              sI <= pix; fk <= 3'd1;
            end
          end else if (fk == 3'd4) begin
            fk <= 3'd0;
            i_valid <= 1'b1;
          end else fk <= fk + 3'd1;
          // advance the raster position after the pixel has been issued
          if (i_valid) begin
            if (sx + 1'b1 == width) begin
              sx <= '0;
              if (sy + 1'b1 == height) last_in <= 1'b1;
              else sy <= sy + 1'b1;
            end else sx <= sx + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
