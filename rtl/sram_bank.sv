// sram_bank: one single-port SRAM bank of the deblurring scratch memory
// (4096 words of 32 bits). One access per cycle, read or write; read data
// appear the cycle after the request. Written as an array so that it maps
// onto an SRAM macro.
module sram_bank #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
