// tb_util_pkg: helpers shared by the testbenches. Random single-precision
// values, a relative-tolerance comparison for floating-point results, and
// an exact bit-reversal used by the FFT reference models.
package tb_util_pkg;
  import cp_pkg::*;

  // uniform random real in [-mag, mag)
  function automatic real rand_real(real mag);
    return mag * (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0);
  endfunction

  function automatic bit close(fp32_t got, real expect_v, real rel, real abs_tol);
    real g, err;
    g = fp_to_real(got);
    err = g - expect_v;
    if (err < 0.0) err = -err;
    return err <= abs_tol + rel * ((expect_v < 0.0) ? -expect_v : expect_v);
  endfunction
endpackage
