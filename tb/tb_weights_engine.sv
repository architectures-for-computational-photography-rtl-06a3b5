// tb_weights_engine: self-checking testbench of the prior weights engine.
//
// Uses a three-component mixture (weights 0.6/0.3/0.1, standard deviations
// 0.02/0.1/0.5, of the kind used for natural-image gradient priors) and
// random mean/variance pairs spread over several decades, one per cycle
// with random gaps. Each result is compared with the weight computed in
// double precision with the exact exponential; the tolerance (3% relative)
// covers the sub-sampled exponential table. Checks the six-cycle latency
// and the number of results, and separately checks fp_div against real
// division. A watchdog ends the run if the pipeline stalls.
module tb_weights_engine;
  import cp_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fp32_t ln_k [3], inv2var [3], invvar [3];
  logic in_valid = 0, out_valid;
  fp32_t mu = 0, c = 0, w;

  weights_engine dut (.clk, .rst_n, .ln_k, .inv2var, .invvar, .in_valid, .mu, .c,
                      .out_valid, .w);

  int checks = 0, failures = 0;
  real PI [3] = '{0.6, 0.3, 0.1};
  real SG [3] = '{0.02, 0.1, 0.5};
  real expq [$];
  int  tq [$];
  int  cyc = 0;
  int  nin = 0, nout = 0;

  function automatic real model(real m, real cc);
    real e, s, n, a [3], mx;
    e = m * m + cc;
    for (int j = 0; j < 3; j++) a[j] = $ln(PI[j] / SG[j]) - e / (2.0 * SG[j] * SG[j]);
    mx = a[0];
    for (int j = 1; j < 3; j++) if (a[j] > mx) mx = a[j];
    s = 0.0; n = 0.0;
    for (int j = 0; j < 3; j++) begin
      s += $exp(a[j] - mx);
      n += $exp(a[j] - mx) / (SG[j] * SG[j]);
    end
    return n / s;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      expq.push_back(model(fp_to_real(mu), fp_to_real(c)));
      tq.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      real e;
      int  t;
      e = expq.pop_front();
      t = tq.pop_front();
      nout++;
      checks++;
      if (!close(w, e, 0.03, 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL: W = %g expected %g", fp_to_real(w), e);
      end
      checks++;
      if (cyc - t != 6) begin failures++; $display("FAIL: latency %0d", cyc - t); end
    end
  end

  initial begin
    for (int j = 0; j < 3; j++) begin
      ln_k[j]    = real_to_fp($ln(PI[j] / SG[j]));
      inv2var[j] = real_to_fp(1.0 / (2.0 * SG[j] * SG[j]));
      invvar[j]  = real_to_fp(1.0 / (SG[j] * SG[j]));
    end
    // divider against real division
    for (int k = 0; k < 2000; k++) begin
      real x, y;
      x = rand_real(100.0); y = rand_real(100.0);
      if (y == 0.0) y = 1.0;
      x = fp_to_real(real_to_fp(x)); y = fp_to_real(real_to_fp(y));
      checks++;
      // correctly rounded: within half a unit in the last place
      if (!close(fp_div(real_to_fp(x), real_to_fp(y)), x / y, 6.0e-8, 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL: fp_div %g / %g = %g", x, y, fp_to_real(fp_div(real_to_fp(x), real_to_fp(y))));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      real m, cc;
      m  = rand_real(1.0) * (2.0 ** -real'($urandom_range(8)));
      cc = (2.0 ** -real'($urandom_range(14))) * real'($urandom_range(1000)) / 1000.0;
      @(posedge clk);
      in_valid <= ($urandom_range(4) != 0);
      mu <= real_to_fp(m);
      c  <= real_to_fp(cc);
    end
    @(posedge clk) in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nout == 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
