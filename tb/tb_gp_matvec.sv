// tb_gp_matvec: a DRAM model streams columns of a random matrix with random
// gaps; the testbench checks a full product y = A x, then an incremental
// update y += A dx over a few enabled columns with some rows masked, and the
// number of column fetches, against a double-precision model.
module tb_gp_matvec;
  import cp_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 37;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         x_we, start, accumulate, col_req_valid, col_req_ready, a_valid, busy, done;
  logic [9:0]   x_addr, col_req, y_addr;
  logic [10:0]  n;
  logic [1023:0] col_mask, row_mask;
  fp32_t        x_data, y_data;
  fp32_t [1:0]  a_data;
  int checks = 0, failures = 0;

  gp_matvec dut (.*);

  real A [N][N];
  real x [N];
  real y [N];
  int  fetches = 0;
  int  chg [3] = '{3, 17, 36};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DRAM model: on a request, stream the column two rows per beat
  initial begin
    col_req_ready = 0; a_valid = 0; a_data = '0;
    forever begin
      @(negedge clk);
      col_req_ready = 0; a_valid = 0;
      if (col_req_valid) begin
        int j;
        j = int'(col_req);
        col_req_ready = 1;
        fetches++;
        @(negedge clk);
        col_req_ready = 0;
        for (int r = 0; r < N; r += 2) begin
          while ($urandom_range(0, 2) == 0) begin a_valid = 0; @(negedge clk); end
          a_valid = 1;
          a_data[0] = real_to_fp(A[r][j]);
          a_data[1] = (r + 1 < N) ? real_to_fp(A[r+1][j]) : '0;
          @(negedge clk);
        end
        a_valid = 0;
      end
    end
  end

  task automatic run(bit acc);
    @(negedge clk);
    start = 1; accumulate = acc; n = 11'(N);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int r = 0; r < N; r++) begin
      y_addr = 10'(r); #1;
      checks++;
      if (!close(y_data, y[r], 1e-4, 1e-3)) begin
        failures++;
        if (failures < 6) $display("row %0d got %f exp %f", r, fp_to_real(y_data), y[r]);
      end
    end
  endtask

  initial begin
    x_we = 0; start = 0; accumulate = 0; n = 0; x_addr = 0; x_data = 0; y_addr = 0;
    col_mask = '0; row_mask = '0;
    foreach (A[r, c]) A[r][c] = fp_to_real(real_to_fp(rand_real(4.0)));
    foreach (x[k]) x[k] = fp_to_real(real_to_fp(rand_real(4.0)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); x_we = 1; x_addr = 10'(k); x_data = real_to_fp(x[k]);
    end
    @(negedge clk) x_we = 0;
    // full product
    for (int k = 0; k < N; k++) begin col_mask[k] = 1; row_mask[k] = 1; end
    foreach (y[r]) begin
      y[r] = 0;
      for (int c = 0; c < N; c++) y[r] += A[r][c] * x[c];
    end
    run(0);
    checks++;
    if (fetches != N) failures++;
    // incremental update: three entries change by dx, rows 5..9 frozen
    col_mask = '0;
    for (int t = 0; t < 3; t++) begin
      int k;
      real dx;
      k = chg[t];
      col_mask[k] = 1;
      dx = fp_to_real(real_to_fp(rand_real(2.0)));
      for (int r = 0; r < N; r++) if (r < 5 || r >= 10) y[r] += A[r][k] * dx;
      @(negedge clk); x_we = 1; x_addr = 10'(k); x_data = real_to_fp(dx);
    end
    @(negedge clk) x_we = 0;
    for (int r = 5; r < 10; r++) row_mask[r] = 0;
    fetches = 0;
    run(1);
    checks++;
    if (fetches != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
