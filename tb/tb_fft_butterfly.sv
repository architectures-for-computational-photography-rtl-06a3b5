// tb_fft_butterfly: drives random complex operands through both butterfly
// forms every cycle and compares against a double-precision model, also
// checking that results follow one clock edge after the operands.
module tb_fft_butterfly;
  import cp_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, dif, out_valid;
  cplx_t a, b, w, x0, x1;
  int checks = 0, failures = 0;

  fft_butterfly dut (.*);

  real ar[$], ai[$], br[$], bi[$], wr[$], wi[$];
  bit  md[$];
  int  cyc = 0, issued_at[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // check the outputs
  always @(negedge clk) if (rst_n && out_valid) begin
    real r0, i0, r1, i1, tr, ti, xr, xi;
    xr = ar.pop_front(); xi = ai.pop_front();
    tr = br.pop_front(); ti = bi.pop_front();
    r0 = wr.pop_front(); i0 = wi.pop_front();
    if (md.pop_front()) begin
      r1 = (xr - tr) * r0 - (xi - ti) * i0;
      i1 = (xr - tr) * i0 + (xi - ti) * r0;
      r0 = xr + tr; i0 = xi + ti;
    end else begin
      real pr, pi;
      pr = tr * r0 - ti * i0; pi = tr * i0 + ti * r0;
      r0 = xr + pr; i0 = xi + pi; r1 = xr - pr; i1 = xi - pi;
    end
    checks += 5;
    if (!close(x0.re, r0, 1e-5, 1e-3)) failures++;
    if (!close(x0.im, i0, 1e-5, 1e-3)) failures++;
    if (!close(x1.re, r1, 1e-5, 1e-3)) failures++;
    if (!close(x1.im, i1, 1e-5, 1e-3)) begin
      failures++;
      $display("x1.im got %f exp %f", fp_to_real(x1.im), i1);
    end
    if (cyc - issued_at.pop_front() != 1) failures++;
  end

  initial begin
    in_valid = 0; dif = 0; a = '0; b = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      real v[6];
      @(negedge clk);
      foreach (v[k]) v[k] = rand_real(100.0);
      v[4] = rand_real(1.0); v[5] = rand_real(1.0);
      in_valid = ($urandom_range(0, 3) != 0);
      dif = $urandom_range(0, 1);
      a = '{re: real_to_fp(v[0]), im: real_to_fp(v[1])};
      b = '{re: real_to_fp(v[2]), im: real_to_fp(v[3])};
      w = '{re: real_to_fp(v[4]), im: real_to_fp(v[5])};
      if (in_valid) begin
        ar.push_back(fp_to_real(a.re)); ai.push_back(fp_to_real(a.im));
        br.push_back(fp_to_real(b.re)); bi.push_back(fp_to_real(b.im));
        wr.push_back(fp_to_real(w.re)); wi.push_back(fp_to_real(w.im));
        md.push_back(dif); issued_at.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    if (ar.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
