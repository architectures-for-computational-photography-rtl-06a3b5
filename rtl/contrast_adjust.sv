// contrast_adjust: contrast adjustment of the bilateral-filter base layer,
// with the merge that rebuilds the output image.
//
// Used by HDR tone mapping and glare reduction. The base (low-frequency)
// layer, in the log domain, is scaled about an anchor level by the
// adjustment factor: a factor below one compresses its dynamic range
// (HDR tone mapping), above one increases contrast (glare reduction):
//   adj    = anchor + (base - anchor) * factor
//   merged = adj + detail
// where detail is the untouched high-frequency layer (input minus base).
// The anchor and the merge output are this design's choices: the original
// only states that the factor raises or lowers the contrast and that the
// adjusted base, the detail layer and the colour are merged afterwards.
//
// Formats: base, anchor, detail, adj and merged are signed Q7.8; factor is
// unsigned Q8.8. Results saturate to the 16-bit range.
// Timing: one pixel per cycle, one cycle latency.
module contrast_adjust (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] base,
  input  logic signed [15:0] detail,
  input  logic signed [15:0] anchor,
  input  logic [15:0]        factor,
  output logic               out_valid,
  output logic signed [15:0] adj,
  output logic signed [15:0] merged
);
  function automatic logic signed [15:0] sat16(logic signed [35:0] v);
    if (v > 36'sd32767)  return 16'sh7fff;
    if (v < -36'sd32768) return 16'sh8000;
    return 16'(v);
  endfunction

  logic signed [35:0] scaled, a_full, m_full;
  always_comb begin
    scaled = (36'(base) - 36'(anchor)) * $signed({20'd0, factor});
    a_full = 36'(anchor) + (scaled >>> 8);
    m_full = 36'(sat16(a_full)) + 36'(detail);
  end

  always_ff @(posedge clk) begin
    adj    <= sat16(a_full);
    merged <= sat16(m_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
