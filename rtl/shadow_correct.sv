// shadow_correct: flash-shadow correction for low-light enhancement.
//
// Merges the detail layer of the flash image into the filtered non-flash
// image only where the non-flash scene has real edges, so that edges caused
// by flash shadows are not transferred. Works on 4x4 pixel blocks:
//  1. mask: the gradient of each pixel of the filtered non-flash image,
//     |I(x+1,y) - I(x,y)| + |I(x,y+1) - I(x,y)|, is compared with the mean
//     gradient of its 4x4 block; pixels above the mean are edge pixels;
//  2. smoothing: the binary mask is filtered with a 3x3 binomial kernel
//     ([1 2 1] x [1 2 1] / 16, edge samples of the block repeated), giving a
//     blend weight alpha in sixteenths so that the result has no seams;
//  3. merge: out = base + alpha * detail / 16, clamped to 0..255.
// The block-mean test follows the original; the gradient operator, the
// smoothing kernel and the number formats are this design's choices.
//
// Interface: each cycle one block: nf is the filtered non-flash image over
// the block plus one extra column and row (5x5, [row][col]); base is the
// base layer to keep and detail the flash detail layer (signed) for the 4x4
// block. out and the 16-bit edge mask follow two cycles after in_valid.
module shadow_correct (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        nf     [5][5],
  input  logic [7:0]        base   [4][4],
  input  logic signed [8:0] detail [4][4],
  output logic              out_valid,
  output logic [15:0]       mask,          // bit 4*row+col
  output logic [7:0]        out    [4][4]
);
  // stage 1: gradients and mask
  logic [8:0]  grad [4][4];
  logic [12:0] gsum;
  logic [15:0] m1;
  logic [7:0]        base1   [4][4];
  logic signed [8:0] detail1 [4][4];

  function automatic logic [7:0] absdiff(logic [7:0] a, logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_comb begin
    gsum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        grad[r][c] = 9'(absdiff(nf[r][c+1], nf[r][c])) + 9'(absdiff(nf[r+1][c], nf[r][c]));
        gsum = gsum + 13'(grad[r][c]);
      end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m1[4*r + c] <= {grad[r][c], 4'd0} > gsum;   // above the block mean
    base1   <= base;
    detail1 <= detail;
  end

  // stage 2: smoothing and merge
  function automatic int clampi(int v);
    return (v < 0) ? 0 : (v > 3) ? 3 : v;
  endfunction

  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        logic [4:0]         alpha;
        logic signed [15:0] v;
        int unsigned        k1 [3];
        k1 = '{1, 2, 1};
        alpha = '0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (m1[4*clampi(r+dr) + clampi(c+dc)])
              alpha = alpha + 5'(k1[dr+1] * k1[dc+1]);
        v = $signed({8'd0, base1[r][c]}) + ((16'(detail1[r][c]) * $signed({11'd0, alpha})) >>> 4);
        out[r][c] <= (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
    mask <= m1;
  end

  logic v1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; out_valid <= 1'b0; end
    else begin v1 <= in_valid; out_valid <= v1; end
  end
endmodule
