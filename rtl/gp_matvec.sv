// gp_matvec: matrix multiplier of the gradient-projection solver.
//
// Computes y = A x (or y += A x) for the kernel quadratic program, where A is
// an n x n single-precision matrix held in external DRAM and x a vector held
// here. The product is formed column by column: column j of A is streamed in,
// multiplied by x[j], and the resulting contribution is added into y. This
// is what lets the solver update a product incrementally when only a few
// entries of x change: with accumulate set, only those columns are enabled
// and y is updated in place.
//
// Partial products: col_mask selects which columns (entries of x) take part
// and row_mask which rows of y are updated; masked rows keep their value.
// Because A is symmetric, "column j" may be fetched as row j, which is how A
// is laid out in DRAM. Two coefficients arrive per cycle (rows 2k and 2k+1),
// matching the DRAM bandwidth; each has its own multiplier and adder.
//
// Interface: x is written through x_we/x_addr/x_data while idle. start
// (with n, accumulate and the masks, which stay stable until done) begins a
// product. For each enabled column the unit raises col_req_valid with
// col_req; once col_req_ready accepts it, ceil(n/2) beats are taken from
// a_valid/a_data (a_data[0] is row 2k). done pulses after the last beat; y
// is read through y_addr/y_data. When accumulate is clear, the first enabled
// column overwrites the enabled rows of y instead of adding to them.
module gp_matvec
  import cp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             x_we,
  input  logic [AW-1:0]    x_addr,
  input  fp32_t            x_data,
  input  logic             start,
  input  logic [AW:0]      n,
  input  logic             accumulate,
  input  logic [DEPTH-1:0] col_mask,
  input  logic [DEPTH-1:0] row_mask,
  output logic             col_req_valid,
  input  logic             col_req_ready,
  output logic [AW-1:0]    col_req,
  input  logic             a_valid,
  input  fp32_t [1:0]      a_data,
  input  logic [AW-1:0]    y_addr,
  output fp32_t            y_data,
  output logic             busy,
  output logic             done
);
  fp32_t xm [DEPTH];
  fp32_t ym [DEPTH];

  typedef enum logic [1:0] {IDLE, FIND, REQ, BEAT} state_t;
  state_t st;

  logic [AW:0] col;          // current column
  logic [AW:0] row;          // row of lane 0 in the current beat
  logic        first;        // first column of a non-accumulating product
  logic        acc_q;
  logic [AW:0] len;

  // next enabled column at or after col
  logic [AW:0] nxt;
  logic        nxt_ok;
  always_comb begin
    nxt = '0; nxt_ok = 1'b0;
    for (int k = DEPTH - 1; k >= 0; k--)
      if (col_mask[k] && (AW+1)'(k) >= col && (AW+1)'(k) < len) begin
        nxt = (AW+1)'(k); nxt_ok = 1'b1;
      end
  end

  assign col_req_valid = (st == REQ);
  assign col_req       = AW'(col);
  assign busy          = (st != IDLE);
  assign y_data        = ym[y_addr];

  fp32_t xj;
  assign xj = xm[AW'(col)];

  logic beat;
  assign beat = (st == BEAT) && a_valid;

  always_ff @(posedge clk) begin
    if (st == IDLE && x_we) xm[x_addr] <= x_data;
    if (beat)
      for (int l = 0; l < 2; l++) begin
        logic [AW:0] r;
        r = row + (AW+1)'(l);
        if (r < len && row_mask[AW'(r)])
          ym[AW'(r)] <= (first && !acc_q) ? fp_mul(a_data[l], xj)
                                          : fp_add(ym[AW'(r)], fp_mul(a_data[l], xj));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; col <= '0; row <= '0; first <= 1'b0; acc_q <= 1'b0;
      len <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) begin
          len   <= n;
          acc_q <= accumulate;
          first <= 1'b1;
          col   <= '0;
          st    <= FIND;
        end
        FIND: if (nxt_ok) begin
          col <= nxt;
          st  <= REQ;
        end else begin
          st   <= IDLE;
          done <= 1'b1;
        end
        REQ: if (col_req_ready) begin
          row <= '0;
          st  <= BEAT;
        end
        BEAT: if (a_valid) begin
          row <= row + 2'd2;
          if (row + 2'd2 >= len) begin
            first <= 1'b0;
            col   <= col + 1'b1;
            st    <= FIND;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
