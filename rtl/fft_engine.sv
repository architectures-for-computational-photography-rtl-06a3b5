// fft_engine: shared streaming FFT of the deblurring processor.
//
// Computes N-point complex DFTs (N = 128, 64 or 32, chosen at run time by
// cfg_log2n = 7, 6 or 5) on single-precision samples, in natural order at
// both ends, two samples per cycle in and out.
//
// How it works (the structure follows the processor's description; the
// addressing scheme is this design's own):
//  * Two register banks of NMAX complex samples. One bank is computed on
//    while the other streams: the results of the previous frame are read out
//    of it while the next frame is written in. When both are done the banks
//    swap roles.
//  * Eight radix-2 butterflies work on 16 samples per micro-stage. A stage
//    is N/16 micro-stages issued one per cycle plus one cycle for the
//    butterfly pipeline to drain, so a transform takes log2(N)*(N/16+1)
//    cycles (63, 30, 15), less than the N/2 cycles a frame needs to stream.
//  * Twiddle factors come from a constant table of W_128^e, e = 0..63.
//  * Unloading output k and loading input k use the same bank address, so a
//    bank alternates between two orders: a frame stored in bit-reversed
//    order is transformed in place by decimation in time and leaves natural
//    order; a frame stored in natural order is transformed by decimation in
//    frequency and leaves bit-reversed order. Each bank keeps a flag saying
//    which order it holds. The address of sample k is the same for the
//    result read out and the new input written in, so reading and writing
//    can proceed together.
//  * A bank that holds results is emptied before new input may overwrite a
//    location: input pair l is accepted only once output pair l has left.
//  * When no new frame arrives the last results are still delivered: an
//    empty streaming bank is swapped with a finished computing bank.
//
// Interface: in_valid/in_ready/in_data (two samples, sample 2k in [0]),
// out_valid/out_ready/out_data likewise, busy high while a transform is being
// computed. cfg_log2n must stay constant while frames are in flight. For the
// inverse transform the client swaps real and imaginary parts at input and
// output and scales by 1/N, as in the original system.
module fft_engine
  import cp_pkg::*;
#(
  parameter int unsigned LOG2_NMAX = 7,   // 128-point maximum
  parameter int unsigned NBF       = 8    // butterflies
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  cfg_log2n,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t [1:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output cplx_t [1:0] out_data,
  output logic        busy
);
  localparam int unsigned NMAX = 1 << LOG2_NMAX;
  localparam int unsigned NS   = 2 * NBF;            // samples per micro-stage
  localparam int unsigned AW   = LOG2_NMAX;

  typedef logic [AW-1:0] addr_t;

  // ---------------------------------------------------------- twiddle table
  typedef fp32_t [NMAX/2-1:0] tw_t;
  function automatic tw_t make_tw(bit im_part);
    tw_t t;
    for (int e = 0; e < NMAX / 2; e++) begin
      real ang;
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(NMAX);
      t[e] = im_part ? real_to_fp(-$sin(ang)) : real_to_fp($cos(ang));
    end
    return t;
  endfunction
  localparam tw_t TW_RE = make_tw(1'b0);
  localparam tw_t TW_IM = make_tw(1'b1);

  function automatic addr_t bitrev(addr_t k, logic [2:0] l2);
    addr_t r;
    r = '0;
    for (int i = 0; i < AW; i++) if (i < int'(l2)) r[int'(l2) - 1 - i] = k[i];
    return r;
  endfunction

  // --------------------------------------------------------------- storage
  cplx_t bank [2][NMAX];
  logic  rev  [2];          // bank holds its data in bit-reversed order
  logic  io;                // index of the streaming bank; !io computes

  logic [2:0] l2;
  logic [AW-1:0] half;      // N/2
  assign l2   = cfg_log2n;
  assign half = AW'((1 << l2) >> 1);

  // streaming side
  logic [AW-1:0] ld_ptr, ul_ptr;   // pair pointers
  logic          pending;          // io bank holds results not yet read out
  logic          comp_res;         // compute bank holds (or will hold) results

  // compute side
  logic [2:0]    stg;
  logic [AW-1:0] cc;              // cycle within stage
  logic          dif_mode;        // transform direction of the current frame
  logic [AW-1:0] nmicro;          // N/16
  assign nmicro = AW'((1 << l2) >> $clog2(NS));

  // a finished computation waits in the compute bank until a swap
  logic swap;
  assign swap = !busy && !pending &&
                ((ld_ptr == half) || (ld_ptr == '0 && comp_res));

  addr_t ld_a0, ld_a1, ul_a0, ul_a1;
  assign ld_a0 = rev[io] ? bitrev(AW'({ld_ptr, 1'b0}), l2) : AW'({ld_ptr, 1'b0});
  assign ld_a1 = rev[io] ? bitrev(AW'({ld_ptr, 1'b1}), l2) : AW'({ld_ptr, 1'b1});
  assign ul_a0 = rev[io] ? bitrev(AW'({ul_ptr, 1'b0}), l2) : AW'({ul_ptr, 1'b0});
  assign ul_a1 = rev[io] ? bitrev(AW'({ul_ptr, 1'b1}), l2) : AW'({ul_ptr, 1'b1});

  assign out_valid = pending && (ul_ptr < half);
  assign out_data  = {bank[io][ul_a1], bank[io][ul_a0]};
  assign in_ready  = (ld_ptr < half) && (!pending || ld_ptr < ul_ptr) && !swap;

  logic in_fire, out_fire;
  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;


  // ------------------------------------------------------------ butterflies
  logic  bf_in_valid;
  cplx_t bf_a [NBF], bf_b [NBF], bf_w [NBF];
  cplx_t bf_x0 [NBF], bf_x1 [NBF];
  logic  bf_v [NBF];
  addr_t rd_i [NBF], rd_j [NBF];
  addr_t wb_i [NBF], wb_j [NBF];

  assign bf_in_valid = busy && (cc < nmicro);

  always_comb begin
    for (int k = 0; k < NBF; k++) begin
      logic [AW-1:0] bi, jj, e;
      logic [2:0]    sh;       // log2 of the butterfly span
      bi = AW'(cc * NBF + k);
      sh = dif_mode ? (l2 - 3'd1 - stg) : stg;
      jj = bi & ((AW'(1) << sh) - AW'(1));
      rd_i[k] = ((bi >> sh) << (sh + 3'd1)) | jj;
      rd_j[k] = rd_i[k] | (AW'(1) << sh);
      // twiddle exponent in units of W_N, scaled to W_NMAX
      e = dif_mode ? (jj << stg) : (jj << (l2 - 3'd1 - stg));
      e = e << (3'(LOG2_NMAX) - l2);
      bf_a[k] = bank[!io][rd_i[k]];
      bf_b[k] = bank[!io][rd_j[k]];
      bf_w[k] = '{re: TW_RE[e[AW-2:0]], im: TW_IM[e[AW-2:0]]};
    end
  end

  for (genvar k = 0; k < NBF; k++) begin : g_bf
    fft_butterfly u_bf (
      .clk, .rst_n,
      .in_valid (bf_in_valid),
      .dif      (dif_mode),
      .a        (bf_a[k]),
      .b        (bf_b[k]),
      .w        (bf_w[k]),
      .out_valid(bf_v[k]),
      .x0       (bf_x0[k]),
      .x1       (bf_x1[k])
    );
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NBF; k++) begin
      wb_i[k] <= rd_i[k];
      wb_j[k] <= rd_j[k];
    end
  end

  // ------------------------------------------------------------ bank writes
  always_ff @(posedge clk) begin
    if (in_fire) begin
      bank[io][ld_a0] <= in_data[0];
      bank[io][ld_a1] <= in_data[1];
    end
    for (int k = 0; k < NBF; k++) begin
      if (bf_v[k]) begin
        bank[!io][wb_i[k]] <= bf_x0[k];
        bank[!io][wb_j[k]] <= bf_x1[k];
      end
    end
  end

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io        <= 1'b0;
      rev[0]    <= 1'b0;
      rev[1]    <= 1'b0;
      ld_ptr    <= '0;
      ul_ptr    <= '0;
      pending   <= 1'b0;
      comp_res  <= 1'b0;
      busy      <= 1'b0;
      stg       <= '0;
      cc        <= '0;
      dif_mode  <= 1'b0;
    end else begin
      if (in_fire)  ld_ptr <= ld_ptr + 1'b1;
      if (out_fire) begin
        ul_ptr <= ul_ptr + 1'b1;
        if (ul_ptr + 1'b1 == half) pending <= 1'b0;
      end

      if (busy) begin
        if (cc == nmicro) begin
          cc <= '0;
          if (stg == l2 - 3'd1) begin
            busy      <= 1'b0;
            stg       <= '0;
            rev[!io]  <= ~rev[!io];
          end else begin
            stg <= stg + 3'd1;
          end
        end else begin
          cc <= cc + 1'b1;
        end
      end

      if (swap) begin
        io        <= !io;
        ld_ptr    <= '0;
        ul_ptr    <= '0;
        pending   <= comp_res;
        comp_res  <= (ld_ptr == half);
        busy      <= (ld_ptr == half);
        stg       <= '0;
        cc        <= '0;
        // bit-reversed frames run decimation in time, natural ones in frequency
        dif_mode  <= !rev[io];
      end
    end
  end

  // a frame never streams into a bank location whose result is still unread
  property p_no_overwrite;
    @(posedge clk) disable iff (!rst_n) in_fire && pending |-> ld_ptr < ul_ptr;
  endproperty
  assert property (p_no_overwrite);

endmodule
