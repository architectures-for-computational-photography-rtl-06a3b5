// linear_interp: one linear interpolation of the bilateral-filter
// interpolation engine.
//
// Forms the weighted average of two neighbouring filtered grid values,
//   out = (v0 * (sigma - d) + v1 * d) / sigma,
// where d is the distance of the output pixel from v0 along the dimension
// being interpolated and sigma = 2**log2_sigma is the grid spacing along it.
// Because sigma is a power of two the division is a right shift, as in the
// original design. The quotient is truncated (this design's choice).
//
// Purely combinational; interp_engine registers between interpolations.
// v0, v1 and out are unsigned DW-bit values; d must be below sigma.
module linear_interp #(
  parameter int unsigned DW = 16,  // grid value width
  parameter int unsigned SW = 8    // width of sigma and of the distance
) (
  input  logic [DW-1:0] v0,
  input  logic [DW-1:0] v1,
  input  logic [SW-1:0] d,
  input  logic [2:0]    log2_sigma,
  output logic [DW-1:0] out
);
  logic [SW-1:0]    sigma, wd0;
  logic [DW+SW-1:0] acc;

  always_comb begin
    sigma = SW'(1) << log2_sigma;
    wd0   = sigma - d;
    acc   = (DW+SW)'(v0) * (DW+SW)'(wd0) + (DW+SW)'(v1) * (DW+SW)'(d);
    out   = DW'(acc >> log2_sigma);
  end
endmodule
