// grid_conv: convolution engine of the bilateral filter.
//
// Filters the bilateral grid with a 3x3x3 Gaussian kernel. For every output
// cell it takes the 3x3x3 neighbourhood of grid cells, each holding a summed
// intensity and a weight (pixel count), multiplies both by the 27 kernel
// coefficients, sums the products in a three-stage adder tree (27 -> 9 -> 3
// -> 1, three operands per adder) and finally divides the convolved intensity
// by the convolved weight, so that filtering never scales intensities. The
// result is the filtered grid value in unsigned fixed point with FRAC
// fraction bits; a cell whose neighbourhood is empty yields zero.
//
// The kernel is the separable binomial approximation of a Gaussian,
// k(a,b,c) = K1[a]*K1[b]*K1[c] with K1 = {1,2,1}; the coefficients are not
// given by the original design and are this design's choice. Intensity and
// weight go through identical pipelines side by side.
//
// Timing: one neighbourhood per cycle; out_valid five cycles after in_valid
// (multiply, three adder stages, divide). The full design has 16 such
// engines, one per intensity bin, of which 4 or 8 are used with fewer bins.
module grid_conv #(
  parameter int unsigned SUMW = 22,   // grid cell intensity sum width
  parameter int unsigned WTW  = 15,   // grid cell weight width
  parameter int unsigned FRAC = 8,    // fraction bits of the result
  parameter int unsigned OW   = 16    // result width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [SUMW-1:0] sum [3][3][3],   // [r][j][i]
  input  logic [WTW-1:0]  wt  [3][3][3],
  output logic            out_valid,
  output logic [OW-1:0]   out
);
  localparam int unsigned PS = SUMW + 3;   // product widths (coefficient <= 8)
  localparam int unsigned PW = WTW + 3;
  localparam int unsigned AS = PS + 5;     // 27 terms
  localparam int unsigned AWT = PW + 5;

  function automatic int unsigned coef(int a, int b, int c);
    int unsigned k1 [3] = '{1, 2, 1};
    return k1[a] * k1[b] * k1[c];
  endfunction

  // stage 1: coefficient products
  logic [PS-1:0] ps [27];
  logic [PW-1:0] pw [27];
  always_ff @(posedge clk) begin
    for (int r = 0; r < 3; r++)
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++) begin
          ps[r*9 + j*3 + i] <= PS'(sum[r][j][i]) * PS'(coef(r, j, i));
          pw[r*9 + j*3 + i] <= PW'(wt[r][j][i])  * PW'(coef(r, j, i));
        end
  end

  // stages 2..4: three-input adder tree
  logic [AS-1:0]  s9 [9], s3 [3], s1;
  logic [AWT-1:0] w9 [9], w3 [3], w1;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 9; k++) begin
      s9[k] <= AS'(ps[3*k]) + AS'(ps[3*k+1]) + AS'(ps[3*k+2]);
      w9[k] <= AWT'(pw[3*k]) + AWT'(pw[3*k+1]) + AWT'(pw[3*k+2]);
    end
    for (int k = 0; k < 3; k++) begin
      s3[k] <= s9[3*k] + s9[3*k+1] + s9[3*k+2];
      w3[k] <= w9[3*k] + w9[3*k+1] + w9[3*k+2];
    end
    s1 <= s3[0] + s3[1] + s3[2];
    w1 <= w3[0] + w3[1] + w3[2];
  end

  // stage 5: fixed-point normalisation
  logic [AS+FRAC-1:0] q;
  always_comb begin
    q = '0;
    if (w1 != '0) q = {s1, FRAC'(0)} / (AS+FRAC)'(w1);
  end
  always_ff @(posedge clk) out <= (q > (AS+FRAC)'({OW{1'b1}})) ? {OW{1'b1}} : OW'(q);

  logic [3:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0; out_valid <= 1'b0;
    end else begin
      vpipe <= {vpipe[2:0], in_valid};
      out_valid <= vpipe[3];
    end
  end
endmodule
