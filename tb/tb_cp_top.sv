// tb_cp_top: end-to-end testbench of the top level at its default sizes.
//
// Drives both processors through complete operations and checks results
// worked out independently:
//  * bilateral filter, direct input: a flat grey image (value 100, sigma_s 16,
//    sigma_r 32, 3x2 blocks) must come back as exactly 100.0 at every pixel;
//    the contrast stage (anchor 0, factor 1.0, detail +16/256) must return
//    the halved base and base + detail;
//  * bilateral filter, HDR mode: a flat scene given as three exposures goes
//    through radiance creation into the engine; every output must equal the
//    (constant) radiance code, and the credit-based hdr_ready must stall
//    the source while the engine filters the grid;
//  * shadow correction: one tile, result count only (values are checked by
//    the block's own testbench);
//  * FFT: three back-to-back 128-point frames of constant 1.0 with a slow
//    reader; bin 0 must be 128 and every other bin 0;
//  * scratch memory: two ports write the same bank in the same cycle (one
//    must wait), then both words are read back;
//  * merge sort of five values (three passes, so the result is copied back);
//  * matrix-vector product y = 2x followed by an incremental update of one
//    column with accumulate set;
//  * prior weights with three identical mixture components, where W must
//    equal 1/sigma^2 exactly for any input.
// Each mechanism (engine phases, mode switch, HDR stall, FFT input and
// output stalls, bank swaps, SRAM collision, sort copy-back, matvec
// accumulate and request stalls) is counted; one that never happened is a
// failure. A watchdog ends the run if anything hangs.
module tb_cp_top;
  import cp_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------- signals
  logic [2:0] bf_ls = 4, bf_lr = 5;
  logic [4:0] bf_gw = 3, bf_gh = 2;
  logic bf_start = 0, bf_src_hdr = 0, bf_pix_valid = 0, bf_pix_ready;
  logic [7:0] bf_pix = 0, bf_pix_val = 0;
  logic bf_out_valid, bf_done;
  logic [15:0] bf_out;
  logic [1:0] bf_phase;
  logic hdr_valid = 0, hdr_ready, hdr_out_valid;
  logic [7:0] hdr_pix [3];
  logic signed [15:0] hdr_log_dt [3];
  logic [15:0] hdr_radiance;
  logic signed [15:0] hdr_log_radiance;
  logic signed [15:0] ca_detail = 16, ca_anchor = 0;
  logic [15:0] ca_factor = 16'd256;
  logic ca_valid;
  logic signed [15:0] ca_adj, ca_merged;
  logic sc_in_valid = 0, sc_out_valid;
  logic [7:0] sc_nf [5][5];
  logic [7:0] sc_base [4][4];
  logic signed [8:0] sc_detail [4][4];
  logic [15:0] sc_mask;
  logic [7:0] sc_result [4][4];

  logic [2:0] fft_log2n = 7;
  logic fft_in_valid = 0, fft_in_ready, fft_out_valid, fft_out_ready = 0, fft_busy;
  cplx_t [1:0] fft_in_data, fft_out_data;

  logic sp_req [8], sp_we [8], sp_gnt [8], sp_rvalid [8];
  logic [1:0] sp_sram [8], sp_bank [8];
  logic [11:0] sp_addr [8];
  logic [31:0] sp_wdata [8], sp_rdata [8];

  logic srt_wr_en = 0, srt_start = 0, srt_busy, srt_done;
  logic [9:0] srt_wr_addr = 0, srt_rd_addr = 0;
  fp32_t srt_wr_data = 0, srt_rd_data;
  logic [10:0] srt_n = 0;

  logic mv_x_we = 0, mv_start = 0, mv_accumulate = 0;
  logic [9:0] mv_x_addr = 0, mv_y_addr = 0, mv_col_req;
  fp32_t mv_x_data = 0, mv_y_data;
  logic [10:0] mv_n = 0;
  logic [1023:0] mv_col_mask = '0, mv_row_mask = '0;
  logic mv_col_req_valid, mv_col_req_ready = 0, mv_a_valid = 0, mv_busy, mv_done;
  fp32_t [1:0] mv_a_data;
  fp32_t wt_ln_k [3], wt_inv2var [3], wt_invvar [3];
  logic wt_in_valid = 0, wt_out_valid;
  fp32_t wt_mu = 0, wt_c = 0, wt_w;

  cp_top dut (
    .clk, .rst_n,
    .bf_log2_sigma_s(bf_ls), .bf_log2_sigma_r(bf_lr), .bf_gw, .bf_gh, .bf_start,
    .bf_src_hdr, .bf_pix_valid, .bf_pix_ready, .bf_pix, .bf_pix_val, .bf_out_valid, .bf_out,
    .bf_phase, .bf_done,
    .hdr_valid, .hdr_ready, .hdr_pix, .hdr_log_dt, .hdr_radiance, .hdr_log_radiance,
    .hdr_out_valid,
    .ca_detail, .ca_anchor, .ca_factor, .ca_valid, .ca_adj, .ca_merged,
    .sc_in_valid, .sc_nf, .sc_base, .sc_detail, .sc_out_valid, .sc_mask, .sc_result,
    .fft_log2n, .fft_in_valid, .fft_in_ready, .fft_in_data, .fft_out_valid,
    .fft_out_ready, .fft_out_data, .fft_busy,
    .sp_req, .sp_sram, .sp_bank, .sp_addr, .sp_we, .sp_wdata, .sp_gnt, .sp_rvalid,
    .sp_rdata,
    .srt_wr_en, .srt_wr_addr, .srt_wr_data, .srt_rd_addr, .srt_rd_data, .srt_start,
    .srt_n, .srt_busy, .srt_done,
    .mv_x_we, .mv_x_addr, .mv_x_data, .mv_start, .mv_n, .mv_accumulate,
    .mv_col_mask, .mv_row_mask, .mv_col_req_valid, .mv_col_req_ready, .mv_col_req,
    .mv_a_valid, .mv_a_data, .mv_y_addr, .mv_y_data, .mv_busy, .mv_done,
    .wt_ln_k, .wt_inv2var, .wt_invvar, .wt_in_valid, .wt_mu, .wt_c, .wt_out_valid, .wt_w);

  // --------------------------------------------------- mechanism counters
  int n_phase [4];
  int n_mode_switch = 0, n_hdr_stall = 0, n_fft_in_stall = 0, n_fft_out_stall = 0;
  int n_fft_swap = 0, n_sp_collision = 0, n_sort_copy = 0, n_mv_acc = 0;
  int n_mv_req_stall = 0, n_sc = 0;
  logic prev_busy = 0, prev_hdr = 0;
  logic [1:0] prev_phase = 0;

  always @(posedge clk) if (rst_n) begin
    if (bf_phase != prev_phase) n_phase[bf_phase]++;
    prev_phase <= bf_phase;
    if (bf_src_hdr != prev_hdr) n_mode_switch++;
    prev_hdr <= bf_src_hdr;
    if (hdr_valid && !hdr_ready) n_hdr_stall++;
    if (fft_in_valid && !fft_in_ready) n_fft_in_stall++;
    if (fft_out_valid && !fft_out_ready) n_fft_out_stall++;
    if (fft_busy && !prev_busy) n_fft_swap++;
    prev_busy <= fft_busy;
    for (int p = 1; p < 8; p++)
      if (sp_req[p] && sp_req[0] && sp_sram[p] == sp_sram[0] && sp_bank[p] == sp_bank[0]
          && (sp_gnt[p] != sp_gnt[0])) n_sp_collision++;
    if (dut.u_sort.st == 3'd4) n_sort_copy++;
    if (mv_start && mv_accumulate) n_mv_acc++;
    if (mv_col_req_valid && !mv_col_req_ready) n_mv_req_stall++;
    if (sc_out_valid) n_sc++;
  end

  // -------------------------------------------------- bilateral checking
  int bf_count = 0, ca_count = 0;
  int bf_expect = 0;
  always @(posedge clk) if (rst_n) begin
    if (bf_out_valid) begin
      bf_count++;
      check(int'(bf_out) == bf_expect, $sformatf("bf pixel %0d = %0d, expected %0d", bf_count, bf_out, bf_expect));
    end
    if (ca_valid) begin
      ca_count++;
      check(int'(ca_adj) == bf_expect / 2 && int'(ca_merged) == bf_expect / 2 + 16,
            $sformatf("contrast adj %0d merged %0d for base %0d", ca_adj, ca_merged, bf_expect));
    end
  end

  task automatic bf_run_direct(byte unsigned v);
    int npix = int'(bf_gw) * int'(bf_gh) * 256;
    bf_expect = int'(v) << 8;
    bf_count = 0; ca_count = 0;
    @(posedge clk) bf_start <= 1;
    @(posedge clk) bf_start <= 0;
    for (int k = 0; k < 2 * npix; k++) begin
      bf_pix <= v; bf_pix_val <= v; bf_pix_valid <= 1;
      @(negedge clk);
      while (!bf_pix_ready) @(negedge clk);
      @(posedge clk);
    end
    bf_pix_valid <= 0;
    while (!bf_done) @(posedge clk);
    repeat (3) @(posedge clk);
    check(bf_count == npix && ca_count == npix,
          $sformatf("direct run: %0d outputs, %0d contrast results, %0d pixels", bf_count, ca_count, npix));
  endtask

  // HDR: a flat scene seen through three exposures
  int hdr_code = -1;
  bit hdr_const = 1;
  always @(posedge clk)
    if (rst_n && hdr_out_valid) begin
      int t;
      t = int'(hdr_log_radiance) >>> 4;
      if (t < 0) t = 0;
      if (t > 255) t = 255;
      if (hdr_code < 0) begin hdr_code = t; bf_expect = t << 8; end
      else if (t != hdr_code) hdr_const = 0;
    end

  task automatic bf_run_hdr();
    int npix = int'(bf_gw) * int'(bf_gh) * 256;
    bf_count = 0; ca_count = 0;
    bf_src_hdr <= 1;
    hdr_pix[0] = 8'd40;  hdr_log_dt[0] = -16'sd512;   // 1/4 of the middle exposure
    hdr_pix[1] = 8'd90;  hdr_log_dt[1] = 16'sd0;
    hdr_pix[2] = 8'd200; hdr_log_dt[2] = 16'sd512;
    @(posedge clk) bf_start <= 1;
    @(posedge clk) bf_start <= 0;
    for (int k = 0; k < 2 * npix; k++) begin
      hdr_valid <= 1;
      @(negedge clk);
      while (!hdr_ready) @(negedge clk);
      @(posedge clk);
    end
    hdr_valid <= 0;
    while (!bf_done) @(posedge clk);
    repeat (3) @(posedge clk);
    bf_src_hdr <= 0;
    check(hdr_const, "HDR radiance of a flat scene is not constant");
    check(bf_count == npix && ca_count == npix,
          $sformatf("HDR run: %0d outputs for %0d pixels", bf_count, npix));
  endtask

  // ------------------------------------------------------------ FFT
  int fft_frames_out = 0;
  int fft_k = 0;
  always @(posedge clk) begin
    fft_out_ready <= ($urandom_range(2) != 0);
    if (rst_n && fft_out_valid && fft_out_ready) begin
      for (int s = 0; s < 2; s++) begin
        real er;
        er = (fft_k == 0 && s == 0) ? 128.0 : 0.0;
        check(close(fft_out_data[s].re, er, 1e-5, 1e-3) &&
              close(fft_out_data[s].im, 0.0, 1e-5, 1e-3),
              $sformatf("FFT bin %0d = %f %f", 2 * fft_k + s, fp_to_real(fft_out_data[s].re), fp_to_real(fft_out_data[s].im)));
      end
      fft_k++;
      if (fft_k == 64) begin fft_k = 0; fft_frames_out++; end
    end
  end

  task automatic fft_run();
    fft_in_data[0] <= '{re: real_to_fp(1.0), im: FP_ZERO};
    fft_in_data[1] <= '{re: real_to_fp(1.0), im: FP_ZERO};
    for (int k = 0; k < 3 * 64; k++) begin
      fft_in_valid <= 1;
      @(negedge clk);
      while (!fft_in_ready) @(negedge clk);
      @(posedge clk);
    end
    fft_in_valid <= 0;
    for (int t = 0; t < 2000 && fft_frames_out < 3; t++) @(posedge clk);
    check(fft_frames_out == 3, $sformatf("FFT delivered %0d frames", fft_frames_out));
  endtask

  // ------------------------------------------------------ scratch memory
  task automatic sp_run();
    int got0 = 0, got1 = 0;
    sp_req[0] <= 1; sp_we[0] <= 1; sp_sram[0] <= 2; sp_bank[0] <= 1; sp_addr[0] <= 12'd7;
    sp_wdata[0] <= 32'hCAFE_0000;
    sp_req[1] <= 1; sp_we[1] <= 1; sp_sram[1] <= 2; sp_bank[1] <= 1; sp_addr[1] <= 12'd9;
    sp_wdata[1] <= 32'hCAFE_0001;
    for (int t = 0; t < 10 && !(got0 && got1); t++) begin
      @(negedge clk);
      if (sp_gnt[0] && !got0) got0 = 1;
      if (sp_gnt[1] && !got1) got1 = 1;
      @(posedge clk);
      if (got0) sp_req[0] <= 0;
      if (got1) sp_req[1] <= 0;
    end
    check(got0 && got1, "scratch writes not both granted");
    // read back through port 2
    foreach (sp_addr[p]) if (p != 0 && p != 1) sp_req[p] <= 0;
    for (int k = 0; k < 2; k++) begin
      sp_req[2] <= 1; sp_we[2] <= 0; sp_sram[2] <= 2; sp_bank[2] <= 1;
      sp_addr[2] <= k ? 12'd9 : 12'd7;
      @(posedge clk);
      sp_req[2] <= 0;
      @(negedge clk);
      while (!sp_rvalid[2]) @(negedge clk);
      check(sp_rdata[2] == (32'hCAFE_0000 | 32'(k)), $sformatf("scratch read %0d = %h", k, sp_rdata[2]));
      @(posedge clk);
    end
  endtask

  // --------------------------------------------------------------- sort
  task automatic sort_run();
    real v [5] = '{5.0, -3.0, 4.5, 1.0, 2.0};
    real s [5] = '{-3.0, 1.0, 2.0, 4.5, 5.0};
    for (int k = 0; k < 5; k++) begin
      srt_wr_en <= 1; srt_wr_addr <= 10'(k); srt_wr_data <= real_to_fp(v[k]);
      @(posedge clk);
    end
    srt_wr_en <= 0;
    srt_n <= 11'd5; srt_start <= 1;
    @(posedge clk) srt_start <= 0;
    while (!srt_done) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      srt_rd_addr <= 10'(k);
      @(posedge clk); @(negedge clk);
      check(fp_to_real(srt_rd_data) == s[k], $sformatf("sorted[%0d] = %f", k, fp_to_real(srt_rd_data)));
    end
  endtask

  // ------------------------------------------------------------- matvec
  // A = 2 I (4 x 4), served one column per request with random gaps
  always @(posedge clk) mv_col_req_ready <= ($urandom_range(1) == 0);

  bit mv_done_seen = 0;
  always @(posedge clk) if (mv_done) mv_done_seen <= 1;

  task automatic mv_serve_until_done();
    while (!mv_done_seen) begin
      @(negedge clk);
      if (mv_col_req_valid && mv_col_req_ready) begin
        int j = int'(mv_col_req);
        @(posedge clk);
        for (int b = 0; b < 2; b++) begin
          mv_a_valid <= 1;
          mv_a_data[0] <= (2 * b == j) ? real_to_fp(2.0) : FP_ZERO;
          mv_a_data[1] <= (2 * b + 1 == j) ? real_to_fp(2.0) : FP_ZERO;
          @(posedge clk);
        end
        mv_a_valid <= 0;
      end
    end
    mv_done_seen <= 0;
    @(posedge clk);
  endtask

  task automatic mv_run();
    for (int k = 0; k < 4; k++) begin
      mv_x_we <= 1; mv_x_addr <= 10'(k); mv_x_data <= real_to_fp(real'(k + 1));
      @(posedge clk);
    end
    mv_x_we <= 0;
    mv_n <= 11'd4; mv_col_mask <= 1024'hF; mv_row_mask <= 1024'hF; mv_accumulate <= 0;
    mv_start <= 1;
    @(posedge clk) mv_start <= 0;
    mv_done_seen <= 0;
    mv_serve_until_done();
    for (int k = 0; k < 4; k++) begin
      mv_y_addr <= 10'(k);
      @(posedge clk); @(negedge clk);
      check(fp_to_real(mv_y_data) == 2.0 * real'(k + 1), $sformatf("y[%0d] = %f", k, fp_to_real(mv_y_data)));
    end
    // incremental update: column 1 only, x[1] grows by 10
    mv_x_we <= 1; mv_x_addr <= 10'd1; mv_x_data <= real_to_fp(10.0);
    @(posedge clk) mv_x_we <= 0;
    mv_col_mask <= 1024'h2; mv_accumulate <= 1; mv_start <= 1;
    @(posedge clk) mv_start <= 0;
    mv_done_seen <= 0;
    mv_serve_until_done();
    for (int k = 0; k < 4; k++) begin
      mv_y_addr <= 10'(k);
      @(posedge clk); @(negedge clk);
      check(fp_to_real(mv_y_data) == ((k == 1) ? 24.0 : 2.0 * real'(k + 1)),
            $sformatf("updated y[%0d] = %f", k, fp_to_real(mv_y_data)));
    end
  endtask

  // ------------------------------------------------------ weights engine
  // two equal components: W = 1/sigma^2 of either, whatever mu and c are
  int n_wt = 0;
  always @(posedge clk)
    if (rst_n && wt_out_valid) begin
      n_wt++;
      check(close(wt_w, 25.0, 1e-6, 0.0), $sformatf("weight %g", fp_to_real(wt_w)));
    end

  task automatic wt_run();
    for (int j = 0; j < 3; j++) begin
      wt_ln_k[j]    <= real_to_fp($ln(0.5 / 0.2));
      wt_inv2var[j] <= real_to_fp(12.5);
      wt_invvar[j]  <= real_to_fp(25.0);
    end
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      wt_in_valid <= 1; wt_mu <= real_to_fp(0.1 * k); wt_c <= real_to_fp(0.01);
    end
    @(posedge clk) wt_in_valid <= 0;
    repeat (8) @(posedge clk);
    check(n_wt == 4, $sformatf("%0d weights", n_wt));
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    foreach (sp_req[p]) begin
      sp_req[p] = 0; sp_we[p] = 0; sp_sram[p] = 0; sp_bank[p] = 0; sp_addr[p] = 0; sp_wdata[p] = 0;
    end
    foreach (sc_nf[r, c]) sc_nf[r][c] = 8'(30 + 40 * ((r + c) % 3));
    foreach (sc_base[r, c]) begin sc_base[r][c] = 8'(60 + 10 * r); sc_detail[r][c] = 9'sd5; end
    foreach (hdr_pix[k]) begin hdr_pix[k] = 0; hdr_log_dt[k] = 0; end
    fft_in_data = '0; mv_a_data = '0;
    foreach (wt_ln_k[j]) begin wt_ln_k[j] = 0; wt_inv2var[j] = 0; wt_invvar[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    fork
      bf_run_direct(8'd100);
      fft_run();
      begin
        sp_run(); $display("scratch memory done at %0t", $time);
        sort_run(); $display("sort done at %0t", $time);
        mv_run(); $display("matvec done at %0t", $time);
        wt_run();
      end
      begin
        @(posedge clk) sc_in_valid <= 1;
        @(posedge clk) sc_in_valid <= 0;
      end
    join
    bf_run_hdr();
    repeat (5) @(posedge clk);

    check(n_phase[1] >= 2 && n_phase[2] >= 2 && n_phase[3] >= 2, "engine phases not all seen twice");
    check(n_mode_switch >= 2, "HDR mode switch never happened");
    check(n_hdr_stall > 0, "HDR source never stalled");
    check(n_fft_in_stall > 0, "FFT input never stalled");
    check(n_fft_out_stall > 0, "FFT output never stalled");
    check(n_fft_swap >= 3, "fewer than three FFT transforms");
    check(n_sp_collision > 0, "no scratch bank collision");
    check(n_sort_copy > 0, "sort never copied back");
    check(n_mv_acc > 0, "matvec never accumulated");
    check(n_mv_req_stall > 0, "matvec request never stalled");
    check(n_sc == 1, "shadow correction result count");
    $display("mechanisms: phases %0d/%0d/%0d mode %0d hdr_stall %0d fft_in_stall %0d fft_out_stall %0d fft_runs %0d collision %0d copy %0d acc %0d req_stall %0d",
             n_phase[1], n_phase[2], n_phase[3], n_mode_switch, n_hdr_stall, n_fft_in_stall,
             n_fft_out_stall, n_fft_swap, n_sp_collision, n_sort_copy, n_mv_acc, n_mv_req_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    $display("FAIL: watchdog bf %0d/%0d phase %0d fft %0d sort %0d mv %0d t %0t", bf_count, ca_count, bf_phase, fft_frames_out, srt_busy, mv_busy, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
