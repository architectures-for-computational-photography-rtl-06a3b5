// tb_fft_engine: streams back-to-back frames of random complex data through
// the FFT engine at each supported size (128, 64, 32 points) and compares
// every output with a double-precision DFT. Also checks the compute time of
// log2(N)*(N/16+1) cycles per frame, that a steady stream is accepted at two
// samples per cycle (one bubble per frame at the bank swap), and that the last frame is delivered without a
// following one (flush).
module tb_fft_engine;
  import cp_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  cfg_log2n;
  logic        in_valid, in_ready, out_valid, out_ready, busy;
  cplx_t [1:0] in_data, out_data;
  int checks = 0, failures = 0;

  fft_engine dut (.*);

  localparam int FRAMES = 4;
  real xr [FRAMES][128], xi [FRAMES][128];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy-time measurement
  int busy_len = 0, busy_runs = 0, exp_busy = 0;
  always @(posedge clk) begin
    if (busy) busy_len <= busy_len + 1;
    else if (busy_len != 0) begin
      checks++; busy_runs++;
      if (busy_len != exp_busy) begin
        failures++;
        $display("compute took %0d cycles, expected %0d", busy_len, exp_busy);
      end
      busy_len <= 0;
    end
  end

  task automatic run_size(int l2);
    int n, in_cycles, t0, t_first_in, t_last_in;
    int of, ok;
    n = 1 << l2;
    cfg_log2n = 3'(l2);
    exp_busy = l2 * (n / 16 + 1);
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < n; k++) begin
        xr[f][k] = fp_to_real(real_to_fp(rand_real(10.0)));
        xi[f][k] = fp_to_real(real_to_fp(rand_real(10.0)));
      end
    fork
      begin : feed
        in_cycles = 0;
        for (int f = 0; f < FRAMES; f++)
          for (int p = 0; p < n / 2; p++) begin
            @(negedge clk);
            in_valid = 1;
            in_data[0] = '{re: real_to_fp(xr[f][2*p]),   im: real_to_fp(xi[f][2*p])};
            in_data[1] = '{re: real_to_fp(xr[f][2*p+1]), im: real_to_fp(xi[f][2*p+1])};
            @(posedge clk);
            in_cycles++;
            while (!in_ready) begin @(posedge clk); in_cycles++; end
          end
        @(negedge clk) in_valid = 0;
      end
      begin : drain
        of = 0;
        while (of < FRAMES) begin
          for (int p = 0; p < n / 2; p++) begin
            @(posedge clk);
            while (!out_valid) @(posedge clk);
            for (int s = 0; s < 2; s++) begin
              real er, ei, ang;
              int kk;
              kk = 2 * p + s;
              er = 0.0; ei = 0.0;
              for (int t = 0; t < n; t++) begin
                ang = -2.0 * 3.14159265358979323846 * real'(kk * t) / real'(n);
                er += xr[of][t] * $cos(ang) - xi[of][t] * $sin(ang);
                ei += xr[of][t] * $sin(ang) + xi[of][t] * $cos(ang);
              end
              checks += 2;
              ok = close(out_data[s].re, er, 1e-4, 2e-3) && close(out_data[s].im, ei, 1e-4, 2e-3);
              if (!ok) begin
                failures++;
                if (failures < 10)
                  $display("N=%0d frame %0d bin %0d: got %f %f exp %f %f", n, of, kk,
                           fp_to_real(out_data[s].re), fp_to_real(out_data[s].im), er, ei);
              end
            end
          end
          of++;
        end
      end
    join
    // a steady stream must be accepted at one pair per cycle
    checks++;
    if (in_cycles > FRAMES * n / 2 + FRAMES + 1) begin
      failures++;
      $display("N=%0d: %0d cycles to accept %0d pairs", n, in_cycles, FRAMES * n / 2);
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0; cfg_log2n = 3'd7;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_size(7);
    run_size(6);
    run_size(5);
    checks++;
    if (busy_runs != 3 * FRAMES) begin
      failures++;
      $display("%0d transforms computed, expected %0d", busy_runs, 3 * FRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
