// hdri_create: HDR image creation for one colour channel.
//
// Merges the same pixel from three differently exposed 8-bit images into one
// 16-bit radiance value, following the camera-curve method: each intensity
// is mapped through the camera curve g (log exposure), corrected by the log
// of its exposure time (log radiance), the three log radiances are averaged
// with weights that favour intensities in the middle of the response, and
// the average is exponentiated.
//
// Number formats and tables (this design's choices; the original keeps its
// measured curves in combinational look-up tables):
//  * logarithms are base 2, signed fixed point with 8 fraction bits (Q7.8);
//  * the camera curve table is g(I) = GAMMA * log2((I + 0.5) / 256), the
//    inverse of a gamma camera, built at elaboration;
//  * the weight is the hat function w(I) = min(I + 1, 256 - I);
//  * the radiance is 2**(logR + OUT_LOG2_OFFSET), saturated to 16 bits,
//    computed as a 256-entry table of 2**(f/256) shifted by the integer part.
// log_dt[j] is the log2 exposure time of image j in Q7.8 (for -1, 0, +1 EV:
// -256, 0, 256).
//
// Timing: one pixel per cycle, out_valid four cycles after in_valid.
module hdri_create #(
  parameter real         GAMMA           = 2.2,
  parameter int unsigned OUT_LOG2_OFFSET = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        pix [3],
  input  logic signed [15:0] log_dt [3],
  output logic              out_valid,
  output logic [15:0]       radiance,
  output logic signed [15:0] log_radiance
);
  typedef logic signed [15:0] q8_t;
  typedef q8_t        [255:0] gtab_t;
  typedef logic [255:0][15:0] etab_t;

  function automatic gtab_t make_g();
    gtab_t t;
    for (int i = 0; i < 256; i++)
      t[i] = q8_t'($rtoi(GAMMA * $ln((real'(i) + 0.5) / 256.0) / $ln(2.0) * 256.0 - 0.5));
    return t;
  endfunction
  // 2**(f/256) in Q1.15
  function automatic etab_t make_e();
    etab_t t;
    for (int f = 0; f < 256; f++)
      t[f] = 16'($rtoi($pow(2.0, real'(f) / 256.0) * 32768.0 + 0.5));
    return t;
  endfunction
  localparam gtab_t GTAB = make_g();
  localparam etab_t ETAB = make_e();

  // stage 1: curve look-up, exposure correction, weights
  q8_t        lr1 [3];
  logic [8:0] w1  [3];
  always_ff @(posedge clk) begin
    for (int j = 0; j < 3; j++) begin
      lr1[j] <= GTAB[pix[j]] - log_dt[j];
      w1[j]  <= (pix[j] < 8'd128) ? 9'(pix[j]) + 9'd1 : 9'd256 - 9'(pix[j]);
    end
  end

  // stage 2: weighted sum
  logic signed [27:0] num2;
  logic [10:0]        den2;
  always_ff @(posedge clk) begin
    num2 <= 28'(lr1[0]) * $signed({1'b0, w1[0]}) + 28'(lr1[1]) * $signed({1'b0, w1[1]}) +
            28'(lr1[2]) * $signed({1'b0, w1[2]});
    den2 <= 11'(w1[0]) + 11'(w1[1]) + 11'(w1[2]);
  end

  // stage 3: weighted average (round toward minus infinity)
  q8_t lr3;
  always_ff @(posedge clk) begin
    logic signed [27:0] q;
    q = num2 / $signed({17'd0, den2});
    if (num2 < 0 && q * $signed({17'd0, den2}) != num2) q = q - 28'sd1;
    lr3 <= q8_t'(q);
  end

  // stage 4: exponentiation
  always_ff @(posedge clk) begin
    logic signed [16:0] v;
    logic signed [8:0]  k;
    logic [31:0]        m;
    v = 17'(lr3) + 17'(OUT_LOG2_OFFSET * 256);
    k = 9'(v >>> 8);
    if (k < 0) radiance <= '0;
    else if (k >= 16) radiance <= 16'hffff;
    else begin
      m = 32'(ETAB[v[7:0]]) << k;
      radiance <= 16'(m >> 15);
    end
    log_radiance <= lr3;
  end

  logic [2:0] vp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin vp <= '0; out_valid <= 1'b0; end
    else begin vp <= {vp[1:0], in_valid}; out_valid <= vp[2]; end
  end
endmodule
