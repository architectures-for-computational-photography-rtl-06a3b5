// gp_sort: merge sort of the gradient-projection solver's breakpoints.
//
// Sorts up to DEPTH single-precision values into ascending order using one
// floating-point comparator and two memories, as the solver's sort unit
// does. Pass i merges sorted batches of 2**i values into batches of
// 2**(i+1), copying the list from one memory into the other; after
// ceil(log2 n) passes the list is sorted, and if the number of passes is odd
// it is copied back so that the result is always in memory 0.
//
// Merging with a single comparator: at the start of a batch the first value
// of the left run is read into a reference register. Each cycle the next
// value of the other run is read and compared with the reference; the
// smaller is written out and the larger becomes (or stays) the reference,
// the next read coming from the run the written value came from. When that
// run is exhausted the reference and then the rest of its own run are
// written out. This costs one cycle per value plus one per batch.
//
// The memories are modelled as arrays with one read and one write per cycle
// (this design's choice). Interface: load values through wr_* into
// memory 0 while idle, pulse start with n (>= 1), wait for done, read the
// sorted list through rd_addr/rd_data (combinational read of memory 0).
module gp_sort
  import cp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp32_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output fp32_t         rd_data,
  input  logic          start,
  input  logic [AW:0]   n,
  output logic          busy,
  output logic          done
);
  fp32_t mem [2][DEPTH];

  typedef enum logic [2:0] {IDLE, INIT, MERGE, TAIL, COPY} state_t;
  state_t st;

  logic          src;                 // memory being read
  logic [AW:0]   len;                 // list length
  logic [AW:0]   w;                   // current run length
  logic [AW:0]   pa, pb, ea, eb;      // run pointers and ends
  logic [AW:0]   po;                  // output pointer
  logic          ref_b;               // reference came from run b
  fp32_t         refv;

  // the run the next value is read from
  logic          rd_b;
  logic [AW:0]   rd_p;
  logic          rd_has;
  fp32_t         v;
  assign rd_b   = (st == TAIL) ? ref_b : !ref_b;
  assign rd_p   = rd_b ? pb : pa;
  assign rd_has = rd_b ? (pb < eb) : (pa < ea);
  assign v      = mem[src][AW'(rd_p)];

  logic          wen;
  logic [AW:0]   waddr;
  fp32_t         wdata;
  logic          take_v;                // incoming value is written
  assign take_v = fp_lt(v, refv);

  always_comb begin
    wen = 1'b0; wdata = v; waddr = po;
    case (st)
      MERGE: begin
        wen   = 1'b1;
        wdata = (rd_has && take_v) ? v : refv;
      end
      TAIL:  wen = rd_has;
      COPY:  begin wen = 1'b1; wdata = mem[src][AW'(po)]; end
      default: ;
    endcase
  end

  assign rd_data = mem[0][rd_addr];
  assign busy    = (st != IDLE);

  always_ff @(posedge clk) begin
    if (st == IDLE && wr_en) mem[0][wr_addr] <= wr_data;
    else if (wen)            mem[!src][AW'(waddr)] <= wdata;
  end

  // start of a batch at position b with run length rl
  task automatic open_batch(input logic [AW:0] b, input logic [AW:0] rl,
                            input logic [AW:0] ln);
    pa   <= b;
    ea   <= (b + rl < ln) ? b + rl : ln;
    pb   <= (b + rl < ln) ? b + rl : ln;
    eb   <= (b + 2*rl < ln) ? b + 2*rl : ln;
    po   <= b;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; src <= 1'b0; len <= '0; w <= '0;
      pa <= '0; pb <= '0; ea <= '0; eb <= '0; po <= '0; ref_b <= 1'b0;
      refv <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) begin
          len <= n;
          src <= 1'b0;
          w   <= (AW+1)'(1);
          if (n <= 1) done <= 1'b1;
          else begin
            open_batch('0, (AW+1)'(1), n);
            st <= INIT;
          end
        end
        INIT: begin                       // first value of run a -> reference
          refv  <= mem[src][AW'(pa)];
          pa    <= pa + 1'b1;
          ref_b <= 1'b0;
          st    <= MERGE;
        end
        MERGE: begin
          po <= po + 1'b1;
          if (!rd_has) begin
            st <= TAIL;                   // reference written; its run remains
          end else if (take_v) begin
            if (rd_b) pb <= pb + 1'b1; else pa <= pa + 1'b1;
          end else begin
            refv  <= v;
            ref_b <= rd_b;
            if (rd_b) pb <= pb + 1'b1; else pa <= pa + 1'b1;
          end
        end
        TAIL: begin
          if (rd_has) begin
            po <= po + 1'b1;
            if (rd_b) pb <= pb + 1'b1; else pa <= pa + 1'b1;
          end else if (eb < len) begin    // next batch of this pass
            open_batch(eb, w, len);
            st <= INIT;
          end else begin                  // pass complete
            src <= !src;
            if (2 * w >= len) begin
              if (!src) begin             // result is in memory 1: copy back
                po <= '0;
                st <= COPY;
              end else begin
                st <= IDLE; done <= 1'b1;
              end
            end else begin
              w <= 2 * w;
              open_batch('0, 2 * w, len);
              st <= INIT;
            end
          end
        end
        COPY: begin
          po <= po + 1'b1;
          if (po + 1'b1 == len) begin
            st <= IDLE; done <= 1'b1; src <= 1'b0;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
