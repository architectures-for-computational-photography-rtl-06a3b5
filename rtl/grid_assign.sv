// grid_assign: grid assignment engines of the bilateral filter.
//
// The image is scanned block by block (sigma_s x sigma_s pixels, 16x16 up to
// 128x128). NBINS engines run in parallel, one per intensity bin of the
// bilateral grid. Each engine compares every pixel with the boundaries of its
// own bin, [b*sigma_r, (b+1)*sigma_r), and when the pixel falls inside it adds
// the pixel into its intensity sum and increments its weight (pixel count).
// With 16, 8 or 4 bins (sigma_r = 16, 32, 64) only the first 256/sigma_r
// engines are enabled; the others are gated off and report zero.
//
// The bin is chosen by pix and the value summed is val: for bilateral
// filtering both are the same pixel; for cross-bilateral filtering (flash /
// no-flash merging) pix comes from the image that defines the edges and val
// from the image being filtered, as the original's low-light mode does.
//
// Interface: blk_start marks the first pixel of a block (the accumulators
// restart with it); blk_end marks the last. One cycle after the last pixel
// cell_valid pulses and cell_sum[b] / cell_wt[b] hold the finished grid
// cells of the block, one per bin, for the grid memory. One pixel per cycle
// (this design's choice; the bins of one pixel are all examined at once).
module grid_assign #(
  parameter int unsigned NBINS = 16,   // engines = maximum number of bins
  parameter int unsigned IW    = 8,    // pixel intensity width
  parameter int unsigned SUMW  = IW + 14,  // 128x128 block of IW-bit pixels
  parameter int unsigned WTW   = 15        // up to 16384 pixels
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          log2_sigma_r,   // 4, 5 or 6
  input  logic                pix_valid,
  input  logic [IW-1:0]       pix,
  input  logic [IW-1:0]       val,     // value summed into the cell
  input  logic                blk_start,
  input  logic                blk_end,
  output logic                cell_valid,
  output logic [SUMW-1:0]     cell_sum [NBINS],
  output logic [WTW-1:0]      cell_wt  [NBINS]
);
  logic [4:0] nact;      // enabled engines
  assign nact = 5'((1 << IW) >> log2_sigma_r);

  for (genvar b = 0; b < NBINS; b++) begin : g_eng
    logic [IW:0] lo, hi;
    logic        en, hit;
    assign lo  = (IW+1)'(b) << log2_sigma_r;
    assign hi  = (IW+1)'(b + 1) << log2_sigma_r;
    assign en  = (5'(b) < nact);
    assign hit = en && pix_valid && ({1'b0, pix} >= lo) && ({1'b0, pix} < hi);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cell_sum[b] <= '0;
        cell_wt[b]  <= '0;
      end else if (pix_valid && blk_start) begin
        cell_sum[b] <= hit ? SUMW'(val) : '0;
        cell_wt[b]  <= hit ? WTW'(1) : '0;
      end else if (hit) begin
        cell_sum[b] <= cell_sum[b] + SUMW'(val);
        cell_wt[b]  <= cell_wt[b] + WTW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_valid <= 1'b0;
    else        cell_valid <= pix_valid && blk_end;
  end
endmodule
