// scratch_sram: shared on-chip scratch memory of the deblurring processor.
//
// Four SRAMs, each of four single-port banks of 4096 x 32-bit words, that
// all processing modules use for intermediate matrices. Each of the 16 banks
// has its own arbiter, so accesses to different banks proceed in parallel.
// A matrix is spread over the four banks of an SRAM with cp_pkg::bank_of /
// addr_of, so that two neighbours along a row or a column (and two
// consecutive rows or columns) can be accessed in the same cycle.
//
// Requesters: NPORT ports, each with one access per cycle aimed at
// (sram, bank, addr). When several ports want the same bank, the bank's
// arbiter grants one of them round-robin (the arbitration policy is this
// design's choice); the others keep their request up. gnt is combinational
// in the request cycle; read data return on rdata with rvalid one cycle
// after the grant.
module scratch_sram #(
  parameter int unsigned NPORT  = 8,
  parameter int unsigned NSRAM  = 4,
  parameter int unsigned NBANK  = 4,
  parameter int unsigned WORDS  = 4096,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req   [NPORT],
  input  logic [1:0]    sram  [NPORT],
  input  logic [1:0]    bank  [NPORT],
  input  logic [AW-1:0] addr  [NPORT],
  input  logic          we    [NPORT],
  input  logic [31:0]   wdata [NPORT],
  output logic          gnt   [NPORT],
  output logic          rvalid[NPORT],
  output logic [31:0]   rdata [NPORT]
);
  localparam int unsigned NB = NSRAM * NBANK;
  localparam int unsigned PW = $clog2(NPORT);

  logic          b_en    [NB];
  logic          b_we    [NB];
  logic [AW-1:0] b_addr  [NB];
  logic [31:0]   b_wdata [NB];
  logic [31:0]   b_rdata [NB];
  logic [PW-1:0] last    [NB];     // last port granted per bank
  logic [PW-1:0] sel     [NB];

  // per-bank round-robin arbitration
  always_comb begin
    for (int p = 0; p < NPORT; p++) gnt[p] = 1'b0;
    for (int b = 0; b < NB; b++) begin
      b_en[b] = 1'b0; b_we[b] = 1'b0; b_addr[b] = '0; b_wdata[b] = '0; sel[b] = '0;
      for (int k = NPORT; k >= 1; k--) begin
        int p;
        p = (int'(last[b]) + k) % NPORT;
        if (req[p] && int'({sram[p], bank[p]}) == b) begin
          b_en[b] = 1'b1; sel[b] = PW'(p);
        end
      end
      if (b_en[b]) begin
        gnt[sel[b]] = 1'b1;
        b_we[b]     = we[sel[b]];
        b_addr[b]   = addr[sel[b]];
        b_wdata[b]  = wdata[sel[b]];
      end
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_bank #(.WORDS(WORDS)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b]));
  end

  // read return path
  logic [$clog2(NB)-1:0] rsel [NPORT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) begin rvalid[p] <= 1'b0; rsel[p] <= '0; end
      for (int b = 0; b < NB; b++) last[b] <= PW'(NPORT - 1);
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        rvalid[p] <= gnt[p] && !we[p];
        rsel[p]   <= {sram[p], bank[p]};
      end
      for (int b = 0; b < NB; b++) if (b_en[b]) last[b] <= sel[b];
    end
  end

  always_comb
    for (int p = 0; p < NPORT; p++) rdata[p] = b_rdata[rsel[p]];
endmodule
