// cp_pkg: types and arithmetic shared by the two image processors in this
// repository (the blind-deblurring processor and the bilateral-filter
// processor).
//
// The deblurring datapath is IEEE-754 single precision throughout. The
// functions fp_add, fp_mul, fp_div and fp_lt below are the floating-point operators
// every deblurring block uses. They are purely combinational, round to
// nearest even, flush subnormal inputs and results to zero, saturate to
// infinity on overflow and do not generate or propagate NaN; these
// simplifications are this design's choice. real_to_fp / fp_to_real convert
// at elaboration time (twiddle and exponential tables) and in testbenches.
//
// The bank mapping function implements the four-bank matrix layout used by
// all deblurring modules: element (row, col) lives in bank {row[0], col[0]},
// so two adjacent elements of any row or column sit in different banks.
package cp_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // ---------------------------------------------------------------- add
  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    logic        sa, sb, sr, sticky;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [49:0] xa, xb, xs;
    logic [50:0] sum;
    logic [8:0]  d;
    logic [9:0]  er;
    logic [23:0] mr;
    logic        g, st, rnd;
    int          lz;
    fp32_t       t;
    // order by magnitude so that |a| >= |b|
    if (a[30:0] < b[30:0]) begin t = a; a = b; b = t; end
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    if (ea == 8'd0) return FP_ZERO;               // both zero / subnormal
    if (ea == 8'hff) return a;                    // infinity dominates
    if (eb == 8'd0) return a;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    d  = {1'b0, ea} - {1'b0, eb};
    xa = {ma, 26'd0};
    xb = {mb, 26'd0};
    sticky = 1'b0;
    if (d > 9'd49) begin
      sticky = 1'b1; xs = '0;
    end else begin
      xs = xb >> d;
      for (int i = 0; i < 50; i++) if (i < int'(d) && xb[i]) sticky = 1'b1;
    end
    xs[0] = xs[0] | sticky;                       // jam the sticky bit
    if (sa == sb) sum = {1'b0, xa} + {1'b0, xs};
    else          sum = {1'b0, xa} - {1'b0, xs};
    if (sum == '0) return FP_ZERO;
    sr = sa;
    // leading one position
    lz = 0;
    for (int i = 0; i <= 50; i++) if (sum[i]) lz = 50 - i;
    // normalise so the leading one is at bit 50
    sum = sum << lz;
    er  = {2'b0, ea} + 10'd1 - 10'(lz);
    mr  = sum[50:27];
    g   = sum[26];
    st  = |sum[25:0];
    rnd = g & (st | mr[0]);
    if (rnd) begin
      if (mr == 24'hff_ffff) begin mr = 24'h80_0000; er = er + 10'd1; end
      else mr = mr + 24'd1;
    end
    if ($signed(er) <= 0) return FP_ZERO;
    if (er >= 10'd255) return {sr, 8'hff, 23'd0};
    return {sr, er[7:0], mr[22:0]};
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  // ---------------------------------------------------------------- mul
  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic        sr, g, st;
    logic [47:0] p;
    logic [23:0] mr;
    logic [9:0]  er;
    sr = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {sr, 31'd0};
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) return {sr, 8'hff, 23'd0};
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    er = {2'b0, a[30:23]} + {2'b0, b[30:23]} - 10'd127;
    if (p[47]) begin
      mr = p[47:24]; g = p[23]; st = |p[22:0]; er = er + 10'd1;
    end else begin
      mr = p[46:23]; g = p[22]; st = |p[21:0];
    end
    if (g & (st | mr[0])) begin
      if (mr == 24'hff_ffff) begin mr = 24'h80_0000; er = er + 10'd1; end
      else mr = mr + 24'd1;
    end
    if ($signed(er) <= 0) return {sr, 31'd0};
    if (er >= 10'd255) return {sr, 8'hff, 23'd0};
    return {sr, er[7:0], mr[22:0]};
  endfunction

  // ---------------------------------------------------------------- div
  // division of the mantissas to 26 quotient bits, remainder as sticky bit
  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic        sr, g, st;
    logic [49:0] num;
    logic [25:0] q;
    logic [24:0] rem;
    logic [23:0] mr;
    logic [9:0]  er;
    sr = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {sr, 8'hff, 23'd0};        // x / 0 -> infinity
    if (a[30:23] == 8'd0) return {sr, 31'd0};
    if (a[30:23] == 8'hff) return {sr, 8'hff, 23'd0};
    if (b[30:23] == 8'hff) return {sr, 31'd0};
    er  = {2'b0, a[30:23]} - {2'b0, b[30:23]} + 10'd127;
    // quotient of 1.ma / 1.mb lies in (0.5, 2): 26 bits, point after bit 25
    num = {1'b1, a[22:0], 26'd0} >> 1;
    q   = 26'(num / {26'd0, 1'b1, b[22:0]});
    rem = 25'(num % {26'd0, 1'b1, b[22:0]});
    if (q[25]) begin
      mr = q[25:2]; g = q[1]; st = q[0] | (rem != 0);
    end else begin
      mr = q[24:1]; g = q[0]; st = (rem != 0); er = er - 10'd1;
    end
    if (g & (st | mr[0])) begin
      if (mr == 24'hff_ffff) begin mr = 24'h80_0000; er = er + 10'd1; end
      else mr = mr + 24'd1;
    end
    if ($signed(er) <= 0) return {sr, 31'd0};
    if (er >= 10'd255) return {sr, 8'hff, 23'd0};
    return {sr, er[7:0], mr[22:0]};
  endfunction

  // a < b for ordinary (non-NaN) values; +0 and -0 compare equal
  function automatic logic fp_lt(fp32_t a, fp32_t b);
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 1'b0;
    if (a[31] != b[31]) return a[31];
    if (!a[31]) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  // complex helpers
  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    return '{re: fp_add(a.re, b.re), im: fp_add(a.im, b.im)};
  endfunction
  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    return '{re: fp_sub(a.re, b.re), im: fp_sub(a.im, b.im)};
  endfunction
  function automatic cplx_t c_mul(cplx_t a, cplx_t b);
    return '{re: fp_sub(fp_mul(a.re, b.re), fp_mul(a.im, b.im)),
             im: fp_add(fp_mul(a.re, b.im), fp_mul(a.im, b.re))};
  endfunction

  // ------------------------------------------------ real <-> fp32 (constant)
  function automatic fp32_t real_to_fp(real r);
    logic [63:0] d;
    logic [10:0] e;
    int          ex;
    logic [52:0] m;
    logic [23:0] mr;
    logic        g, st;
    d  = $realtobits(r);
    e  = d[62:52];
    if (e == 11'd0) return {d[63], 31'd0};
    ex = int'(e) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    mr = m[52:29];
    g  = m[28];
    st = |m[27:0];
    if (g & (st | mr[0])) begin
      if (mr == 24'hff_ffff) begin mr = 24'h80_0000; ex = ex + 1; end
      else mr = mr + 24'd1;
    end
    if (ex <= 0) return {d[63], 31'd0};
    if (ex >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(ex), mr[22:0]};
  endfunction

  function automatic real fp_to_real(fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // ------------------------------------------------------ SRAM bank mapping
  // Four-bank layout of an n x n matrix (n a power of two, n <= 128).
  // Row r, column c goes to bank {r[0], c[0]}: even/even, even/odd, odd/even
  // and odd/odd elements each have a bank of their own.
  function automatic logic [1:0] bank_of(logic [6:0] r, logic [6:0] c);
    return {r[0], c[0]};
  endfunction
  // address inside a bank: the row pair index and the column pair index
  function automatic logic [11:0] addr_of(logic [6:0] r, logic [6:0] c);
    return {r[6:1], c[6:1]};
  endfunction

endpackage
