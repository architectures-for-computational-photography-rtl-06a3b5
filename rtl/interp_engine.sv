// interp_engine: grid interpolation engine of the bilateral filter.
//
// Builds each output pixel from the filtered bilateral grid by trilinear
// interpolation of the 2x2x2 grid cells around it, done as three pipelined
// stages of linear interpolation exactly as the filter's design describes:
// four interpolations along x, then two along y, then one along the
// intensity axis r. For pixel (x, y) with input intensity I:
//   i = x / sigma_s, j = y / sigma_s, r = I / sigma_r
//   x_d = x - sigma_s*i, y_d = y - sigma_s*j, I_d = I - sigma_r*r.
// The cell indices (i, j, r) are output combinationally (cell_i, cell_j,
// cell_r) so the caller can fetch the eight cells f[r'][j'][i'] (r' = r,r+1,
// j' = j,j+1, i' = i,i+1) and present them in the same cycle as the pixel.
//
// sigma_s (16..128) and sigma_r (powers of two) are set by log2 values,
// which may change on any cycle: each pixel carries its own down the pipe.
// Timing: one pixel per cycle, out_valid three cycles after in_valid.
// Grid values and the result are unsigned DW-bit numbers.
module interp_engine #(
  parameter int unsigned DW = 16,   // filtered grid value width
  parameter int unsigned XW = 12,   // pixel coordinate width
  parameter int unsigned IW = 8     // input intensity width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    log2_sigma_s,
  input  logic [2:0]    log2_sigma_r,
  input  logic          in_valid,
  input  logic [XW-1:0] x,
  input  logic [XW-1:0] y,
  input  logic [IW-1:0] intensity,
  output logic [XW-1:0] cell_i,
  output logic [XW-1:0] cell_j,
  output logic [IW-1:0] cell_r,
  input  logic [DW-1:0] f [2][2][2],  // [r offset][j offset][i offset]
  output logic          out_valid,
  output logic [DW-1:0] out
);
  logic [7:0] xd, yd, id;
  logic [XW-1:0] smask;
  logic [IW-1:0] rmask;

  always_comb begin
    smask  = (XW'(1) << log2_sigma_s) - XW'(1);
    rmask  = (IW'(1) << log2_sigma_r) - IW'(1);
    cell_i = x >> log2_sigma_s;
    cell_j = y >> log2_sigma_s;
    cell_r = intensity >> log2_sigma_r;
    xd     = 8'(x & smask);
    yd     = 8'(y & smask);
    id     = 8'(intensity & rmask);
  end

  // stage 1: four interpolations along x
  logic [DW-1:0] fx [2][2];      // [r][j]
  logic [DW-1:0] fx_q [2][2];
  logic [7:0]    yd1, id1;
  logic [2:0]    ls1, lr1, lr2;   // spacings travel with the pixel
  logic          v1, v2;

  for (genvar r = 0; r < 2; r++) begin : g_x_r
    for (genvar j = 0; j < 2; j++) begin : g_x_j
      linear_interp #(.DW(DW)) u_lx (
        .v0(f[r][j][0]), .v1(f[r][j][1]), .d(xd), .log2_sigma(log2_sigma_s),
        .out(fx[r][j]));
    end
  end

  always_ff @(posedge clk) begin
    fx_q <= fx;
    yd1  <= yd;
    id1  <= id;
    ls1  <= log2_sigma_s;
    lr1  <= log2_sigma_r;
  end

  // stage 2: two interpolations along y
  logic [DW-1:0] fy [2];
  logic [DW-1:0] fy_q [2];
  logic [7:0]    id2;

  for (genvar r = 0; r < 2; r++) begin : g_y
    linear_interp #(.DW(DW)) u_ly (
      .v0(fx_q[r][0]), .v1(fx_q[r][1]), .d(yd1), .log2_sigma(ls1),
      .out(fy[r]));
  end

  always_ff @(posedge clk) begin
    fy_q <= fy;
    id2  <= id1;
    lr2  <= lr1;
  end

  // stage 3: interpolation along the intensity axis
  logic [DW-1:0] fr;
  linear_interp #(.DW(DW)) u_lr (
    .v0(fy_q[0]), .v1(fy_q[1]), .d(id2), .log2_sigma(lr2), .out(fr));

  always_ff @(posedge clk) out <= fr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end
endmodule
