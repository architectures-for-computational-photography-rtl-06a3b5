// weights_engine: prior weights of the deblurring E-step.
//
// For every pixel i of the gradient image it turns the mean mu_i and the
// variance c_i into the diagonal entry W(i,i) of the weight matrix of the
// sparse (mixture-of-Gaussians) image prior with NCOMP components:
//   E_i   = mu_i^2 + c_i
//   a_j   = ln(pi_j / sigma_j) - E_i / (2 sigma_j^2)         (j < NCOMP)
//   e_j   = exp(a_j - max_k a_k)                             (inputs <= 0)
//   W(i,i) = sum_j e_j / sigma_j^2  /  sum_j e_j
// which is sum_j w_ij / sigma_j^2 with the normalised responsibilities w_ij.
// As in the original, the components are computed in parallel, the largest
// contribution is subtracted before the exponential so that its input is
// never positive, and the exponential is a constant look-up table indexed
// by the 16 most significant bits of the single-precision input below the
// sign bit (8 exponent bits and the top 8 mantissa bits). The table is
// built at elaboration for |x| in [2^-12, 128): each entry holds exp of the
// centre of its input interval; smaller |x| gives 1.0 and larger gives 0
// (exp(-128) is below the smallest normal number). The table range, the
// per-component constants given as ln(pi/sigma), 1/(2 sigma^2) and
// 1/sigma^2, and the placement of the pipeline registers are this design's
// choices. Arithmetic uses the single-precision functions of cp_pkg.
//
// Interface: the constants are static during a frame. One pixel per cycle
// on in_valid/mu/c; W leaves on out_valid/w six cycles later. Two engines
// side by side give the original's two pixels per cycle.
module weights_engine
  import cp_pkg::*;
#(
  parameter int unsigned NCOMP = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t ln_k    [NCOMP],   // ln(pi_j / sigma_j)
  input  fp32_t inv2var [NCOMP],   // 1 / (2 sigma_j^2)
  input  fp32_t invvar  [NCOMP],   // 1 / sigma_j^2
  input  logic  in_valid,
  input  fp32_t mu,
  input  fp32_t c,
  output logic  out_valid,
  output fp32_t w
);
  localparam int unsigned EMIN = 127 - 12;
  localparam int unsigned EMAX = 127 + 6;
  localparam int unsigned NE   = (EMAX - EMIN + 1) * 256;

  typedef fp32_t [NE-1:0] etab_t;
  function automatic etab_t make_exp();
    etab_t t;
    for (int k = 0; k < int'(NE); k++) begin
      real x, v;
      x = (2.0 ** real'(int'(EMIN) + k / 256 - 127)) * (1.0 + (real'(k % 256) + 0.5) / 256.0);
      v = $exp(-x);
      t[k] = (v < 1.1754944e-38) ? FP_ZERO : real_to_fp(v);
    end
    return t;
  endfunction
  localparam etab_t ETAB = make_exp();

  function automatic fp32_t exp_neg(fp32_t d);
    logic [7:0] e;
    e = d[30:23];
    if (e < 8'(EMIN)) return 32'h3f80_0000;      // exp(-0) = 1.0
    if (e > 8'(EMAX)) return FP_ZERO;
    return ETAB[{e - 8'(EMIN), d[22:15]}];
  endfunction

  logic  v [6];
  fp32_t e1;
  fp32_t a2 [NCOMP];
  fp32_t d3 [NCOMP];
  fp32_t x4 [NCOMP];
  fp32_t s5, n5;

  always_ff @(posedge clk) begin
    fp32_t m, s, n;
    // 1: expected squared gradient
    e1 <= fp_add(fp_mul(mu, mu), c);
    // 2: log contribution of each component
    for (int j = 0; j < int'(NCOMP); j++) a2[j] <= fp_sub(ln_k[j], fp_mul(e1, inv2var[j]));
    // 3: subtract the largest contribution
    m = a2[0];
    for (int j = 1; j < int'(NCOMP); j++) if (fp_lt(m, a2[j])) m = a2[j];
    for (int j = 0; j < int'(NCOMP); j++) d3[j] <= fp_sub(a2[j], m);
    // 4: exponentials from the table
    for (int j = 0; j < int'(NCOMP); j++) x4[j] <= exp_neg(d3[j]);
    // 5: normaliser and weighted sum
    s = FP_ZERO; n = FP_ZERO;
    for (int j = 0; j < int'(NCOMP); j++) begin
      s = fp_add(s, x4[j]);
      n = fp_add(n, fp_mul(x4[j], invvar[j]));
    end
    s5 <= s; n5 <= n;
    // 6: W(i,i)
    w <= fp_div(n5, s5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) v[k] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      for (int k = 1; k < 6; k++) v[k] <= v[k-1];
    end
  end
  assign out_valid = v[5];
endmodule
