// cp_top: the two image processors of this repository side by side.
//
// Bilateral-filter processor (ports bf_*, hdr_*, ca_*, sc_*):
//  * bf_engine filters a grey image through the bilateral grid (assignment,
//    3x3x3 grid convolution, trilinear interpolation); with bf_pix_val
//    different from bf_pix it performs cross-bilateral filtering.
//  * Its input comes either from the bf_pix port or, in HDR mode
//    (bf_src_hdr = 1), from hdri_create, which merges three exposures into a
//    log-radiance value. The log radiance (signed, 8 fraction bits, in units
//    of log2) is mapped to the engine's 8-bit scale as log2 * 16, clipped to
//    0..255, i.e. 16 codes per stop over 16 stops. The scale is this design's
//    choice. A small FIFO absorbs the radiance pipeline so hdr_ready can be a
//    credit signal: a new exposure triple is accepted only while the FIFO
//    has room for every one already in flight.
//  * The filtered base layer feeds contrast_adjust (base = engine output
//    halved, so 255.0 maps below the signed limit), together with a detail
//    layer, anchor and factor from ports; adjusted and merged values leave
//    on ca_*.
//  * shadow_correct works on 4x4 pixel tiles given on its own ports.
// Deblurring processor (ports fft_*, sp_*, srt_*, mv_*, wt_*): the shared
// FFT engine, the 16-bank scratch memory with its arbiters, the prior
// weights engine of the E-step, and the two gradient-projection units
// (merge sort and masked matrix-vector product),
// each with its ports brought out. The scheduler that sequences them over
// DRAM is not part of this design; its side of every unit is a top port.
//
// Timing: see the individual blocks; the top adds one FIFO (registered
// output, no extra latency beyond the queueing) and no other registers.
module cp_top
  import cp_pkg::*;
#(
  parameter int unsigned BF_NBINS  = 16,
  parameter int unsigned BF_GW_MAX = 16,
  parameter int unsigned BF_GH_MAX = 16,
  parameter int unsigned LOG2_NMAX = 7,
  parameter int unsigned NPORT     = 8,
  parameter int unsigned GP_DEPTH  = 1024,
  localparam int unsigned GPAW     = $clog2(GP_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,

  // ---------------------------------------------------- bilateral filter
  input  logic [2:0]    bf_log2_sigma_s,
  input  logic [2:0]    bf_log2_sigma_r,
  input  logic [$clog2(BF_GW_MAX+1)-1:0] bf_gw,
  input  logic [$clog2(BF_GH_MAX+1)-1:0] bf_gh,
  input  logic          bf_start,
  input  logic          bf_src_hdr,
  input  logic          bf_pix_valid,
  output logic          bf_pix_ready,
  input  logic [7:0]    bf_pix,
  input  logic [7:0]    bf_pix_val,     // cross-bilateral value (= bf_pix otherwise)
  output logic          bf_out_valid,
  output logic [15:0]   bf_out,
  output logic [1:0]    bf_phase,
  output logic          bf_done,

  input  logic          hdr_valid,
  output logic          hdr_ready,
  input  logic [7:0]    hdr_pix    [3],
  input  logic signed [15:0] hdr_log_dt [3],
  output logic [15:0]   hdr_radiance,
  output logic signed [15:0] hdr_log_radiance,
  output logic          hdr_out_valid,

  input  logic signed [15:0] ca_detail,
  input  logic signed [15:0] ca_anchor,
  input  logic [15:0]   ca_factor,
  output logic          ca_valid,
  output logic signed [15:0] ca_adj,
  output logic signed [15:0] ca_merged,

  input  logic          sc_in_valid,
  input  logic [7:0]    sc_nf     [5][5],
  input  logic [7:0]    sc_base   [4][4],
  input  logic signed [8:0] sc_detail [4][4],
  output logic          sc_out_valid,
  output logic [15:0]   sc_mask,
  output logic [7:0]    sc_result [4][4],

  // --------------------------------------------------------- deblurring
  input  logic [2:0]    fft_log2n,
  input  logic          fft_in_valid,
  output logic          fft_in_ready,
  input  cplx_t [1:0]   fft_in_data,
  output logic          fft_out_valid,
  input  logic          fft_out_ready,
  output cplx_t [1:0]   fft_out_data,
  output logic          fft_busy,

  input  logic          sp_req   [NPORT],
  input  logic [1:0]    sp_sram  [NPORT],
  input  logic [1:0]    sp_bank  [NPORT],
  input  logic [11:0]   sp_addr  [NPORT],
  input  logic          sp_we    [NPORT],
  input  logic [31:0]   sp_wdata [NPORT],
  output logic          sp_gnt   [NPORT],
  output logic          sp_rvalid[NPORT],
  output logic [31:0]   sp_rdata [NPORT],

  input  logic          srt_wr_en,
  input  logic [GPAW-1:0] srt_wr_addr,
  input  fp32_t         srt_wr_data,
  input  logic [GPAW-1:0] srt_rd_addr,
  output fp32_t         srt_rd_data,
  input  logic          srt_start,
  input  logic [GPAW:0] srt_n,
  output logic          srt_busy,
  output logic          srt_done,

  input  logic          mv_x_we,
  input  logic [GPAW-1:0] mv_x_addr,
  input  fp32_t         mv_x_data,
  input  logic          mv_start,
  input  logic [GPAW:0] mv_n,
  input  logic          mv_accumulate,
  input  logic [GP_DEPTH-1:0] mv_col_mask,
  input  logic [GP_DEPTH-1:0] mv_row_mask,
  output logic          mv_col_req_valid,
  input  logic          mv_col_req_ready,
  output logic [GPAW-1:0] mv_col_req,
  input  logic          mv_a_valid,
  input  fp32_t [1:0]   mv_a_data,
  input  logic [GPAW-1:0] mv_y_addr,
  output fp32_t         mv_y_data,
  output logic          mv_busy,
  output logic          mv_done,

  input  fp32_t         wt_ln_k    [3],
  input  fp32_t         wt_inv2var [3],
  input  fp32_t         wt_invvar  [3],
  input  logic          wt_in_valid,
  input  fp32_t         wt_mu,
  input  fp32_t         wt_c,
  output logic          wt_out_valid,
  output fp32_t         wt_w
);

  // ======================================================== HDR front end
  hdri_create u_hdri (
    .clk, .rst_n, .in_valid(hdr_valid && hdr_ready), .pix(hdr_pix), .log_dt(hdr_log_dt),
    .out_valid(hdr_out_valid), .radiance(hdr_radiance), .log_radiance(hdr_log_radiance));

  localparam int unsigned FD = 8;
  logic [7:0] fifo [FD];
  logic [2:0] f_rd, f_wr;
  logic [3:0] f_cnt;        // entries stored
  logic [2:0] f_fly;        // triples inside hdri_create
  logic       f_push, f_pop;
  logic       e_valid, e_ready;   // bilateral engine input handshake
  logic [7:0] hdr_code;

  always_comb begin
    logic signed [15:0] t;
    t = hdr_log_radiance >>> 4;           // log2 * 16
    if (t < 0)        hdr_code = 8'd0;
    else if (t > 255) hdr_code = 8'd255;
    else              hdr_code = 8'(t);
  end

  assign hdr_ready = bf_src_hdr && (4'(f_cnt) + 4'(f_fly) < 4'(FD));
  assign f_push    = hdr_out_valid;
  assign f_pop     = bf_src_hdr && f_cnt != 0 && e_ready;

  always_ff @(posedge clk) if (f_push) fifo[f_wr] <= hdr_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_rd <= '0; f_wr <= '0; f_cnt <= '0; f_fly <= '0;
    end else begin
      if (f_push) f_wr <= f_wr + 3'd1;
      if (f_pop)  f_rd <= f_rd + 3'd1;
      f_cnt <= f_cnt + (f_push ? 4'd1 : 4'd0) - (f_pop ? 4'd1 : 4'd0);
      f_fly <= f_fly + ((hdr_valid && hdr_ready) ? 3'd1 : 3'd0) - (hdr_out_valid ? 3'd1 : 3'd0);
    end
  end

  // ===================================================== bilateral engine
  logic [7:0] e_pix, e_val;
  assign e_valid      = bf_src_hdr ? (f_cnt != 0) : bf_pix_valid;
  assign e_pix        = bf_src_hdr ? fifo[f_rd] : bf_pix;
  assign e_val        = bf_src_hdr ? fifo[f_rd] : bf_pix_val;
  assign bf_pix_ready = e_ready && !bf_src_hdr;

  bf_engine #(.NBINS(BF_NBINS), .GW_MAX(BF_GW_MAX), .GH_MAX(BF_GH_MAX)) u_bf (
    .clk, .rst_n, .log2_sigma_s(bf_log2_sigma_s), .log2_sigma_r(bf_log2_sigma_r),
    .gw(bf_gw), .gh(bf_gh), .start(bf_start),
    .pix_valid(e_valid), .pix_ready(e_ready), .pix(e_pix), .pix_val(e_val),
    .out_valid(bf_out_valid), .out(bf_out), .phase(bf_phase), .done(bf_done));

  contrast_adjust u_ca (
    .clk, .rst_n, .in_valid(bf_out_valid),
    .base($signed({1'b0, bf_out[15:1]})), .detail(ca_detail),
    .anchor(ca_anchor), .factor(ca_factor),
    .out_valid(ca_valid), .adj(ca_adj), .merged(ca_merged));

  shadow_correct u_sc (
    .clk, .rst_n, .in_valid(sc_in_valid), .nf(sc_nf), .base(sc_base),
    .detail(sc_detail), .out_valid(sc_out_valid), .mask(sc_mask), .out(sc_result));

  // ========================================================== deblurring
  fft_engine #(.LOG2_NMAX(LOG2_NMAX)) u_fft (
    .clk, .rst_n, .cfg_log2n(fft_log2n),
    .in_valid(fft_in_valid), .in_ready(fft_in_ready), .in_data(fft_in_data),
    .out_valid(fft_out_valid), .out_ready(fft_out_ready), .out_data(fft_out_data),
    .busy(fft_busy));

  scratch_sram #(.NPORT(NPORT)) u_sp (
    .clk, .rst_n, .req(sp_req), .sram(sp_sram), .bank(sp_bank), .addr(sp_addr),
    .we(sp_we), .wdata(sp_wdata), .gnt(sp_gnt), .rvalid(sp_rvalid), .rdata(sp_rdata));

  gp_sort #(.DEPTH(GP_DEPTH)) u_sort (
    .clk, .rst_n, .wr_en(srt_wr_en), .wr_addr(srt_wr_addr), .wr_data(srt_wr_data),
    .rd_addr(srt_rd_addr), .rd_data(srt_rd_data), .start(srt_start), .n(srt_n),
    .busy(srt_busy), .done(srt_done));

  gp_matvec #(.DEPTH(GP_DEPTH)) u_mv (
    .clk, .rst_n, .x_we(mv_x_we), .x_addr(mv_x_addr), .x_data(mv_x_data),
    .start(mv_start), .n(mv_n), .accumulate(mv_accumulate),
    .col_mask(mv_col_mask), .row_mask(mv_row_mask),
    .col_req_valid(mv_col_req_valid), .col_req_ready(mv_col_req_ready),
    .col_req(mv_col_req), .a_valid(mv_a_valid), .a_data(mv_a_data),
    .y_addr(mv_y_addr), .y_data(mv_y_data), .busy(mv_busy), .done(mv_done));

  weights_engine u_wt (
    .clk, .rst_n, .ln_k(wt_ln_k), .inv2var(wt_inv2var), .invvar(wt_invvar),
    .in_valid(wt_in_valid), .mu(wt_mu), .c(wt_c), .out_valid(wt_out_valid), .w(wt_w));

endmodule
