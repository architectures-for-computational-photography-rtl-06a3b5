// fft_butterfly: radix-2 complex butterfly in IEEE-754 single precision.
//
// The FFT engine runs eight of these in parallel. Each has two pipeline
// stages, as the engine it belongs to specifies; what each stage holds is this
// design's choice. Two butterfly forms are supported because the engine
// alternates between them frame by frame (see fft_engine):
//   dif = 0 (decimation in time):      x0 = a + w*b,  x1 = a - w*b
//   dif = 1 (decimation in frequency): x0 = a + b,    x1 = (a - b)*w
// Stage 1 forms w*b (DIT) or a+b / a-b (DIF) and registers it; stage 2 forms
// the sums (DIT) or the twiddle product (DIF) combinationally, and its
// register is the register-bank entry the engine writes the result into.
//
// Interface: in_valid/a/b/w/dif are sampled at a clock edge; out_valid/x0/x1
// are valid during the following cycle, ready to be registered at the next
// edge. No back-pressure: a new butterfly can enter every cycle.
module fft_butterfly
  import cp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  dif,
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t x0,
  output cplx_t x1
);
  // stage 1 registers
  logic  dif1;
  cplx_t p1, q1, w1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    dif1 <= dif;
    w1   <= w;
    if (dif) begin
      p1 <= c_add(a, b);
      q1 <= c_sub(a, b);
    end else begin
      p1 <= a;
      q1 <= c_mul(w, b);
    end
  end

  // stage 2, registered by the consumer
  always_comb begin
    if (dif1) begin
      x0 = p1;
      x1 = c_mul(q1, w1);
    end else begin
      x0 = c_add(p1, q1);
      x1 = c_sub(p1, q1);
    end
  end
endmodule
