// tb_scratch_sram: several ports write and read random locations of all 16
// banks at once, often colliding on a bank; a reference copy of the memory
// checks every read, every port must be granted within NPORT cycles
// (round-robin fairness), and one port writes a matrix row-wise with the
// four-bank mapping while another reads it column-wise, two elements per
// cycle each, as the transpose memories do.
module tb_scratch_sram;
  import cp_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req [NP], we [NP], gnt [NP], rvalid [NP];
  logic [1:0]  sram [NP], bank [NP];
  logic [11:0] addr [NP];
  logic [31:0] wdata [NP], rdata [NP];
  int checks = 0, failures = 0, collisions = 0;

  scratch_sram dut (.*);

  logic [31:0] model [16][4096];
  bit          known [16][4096];
  int          waitc [NP];
  logic [31:0] expv [NP];
  bit          expk [NP];
  bit          granted [NP];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (req[p]) begin req[p] = 0; we[p] = 0; sram[p] = 0; bank[p] = 0; addr[p] = 0; wdata[p] = 0; waitc[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic on a small address window so reads hit written words
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++)
        if (!req[p] || granted[p]) begin
          req[p]  = ($urandom_range(0, 3) != 0);
          we[p]   = $urandom_range(0, 1);
          sram[p] = 2'($urandom_range(0, 1));
          bank[p] = 2'($urandom_range(0, 3));
          addr[p] = 12'($urandom_range(0, 15));
          wdata[p] = $urandom;
        end
      #1;
      begin
        int cnt [16];
        foreach (cnt[b]) cnt[b] = 0;
        for (int p = 0; p < NP; p++) if (req[p]) cnt[{sram[p], bank[p]}]++;
        foreach (cnt[b]) if (cnt[b] > 1) collisions++;
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        expk[p] = 0;
        granted[p] = req[p] && gnt[p];
        if (req[p] && gnt[p]) begin
          waitc[p] = 0;
          if (we[p]) begin
            model[{sram[p], bank[p]}][addr[p]] = wdata[p];
            known[{sram[p], bank[p]}][addr[p]] = 1;
          end else begin
            expk[p] = known[{sram[p], bank[p]}][addr[p]];
            expv[p] = model[{sram[p], bank[p]}][addr[p]];
          end
        end else if (req[p]) begin
          waitc[p]++;
          checks++;
          if (waitc[p] >= NP) failures++;
        end
      end
      #1;
      for (int p = 0; p < NP; p++) if (expk[p]) begin
        checks++;
        if (!rvalid[p] || rdata[p] != expv[p]) failures++;
      end
    end
    // transpose: port 0 writes a 16x16 matrix row-wise into SRAM 2, two
    // elements per cycle through ports 0 and 1; ports 2 and 3 then read it
    // column-wise two at a time
    @(negedge clk);
    foreach (req[p]) req[p] = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c += 2) begin
        for (int k = 0; k < 2; k++) begin
          req[k] = 1; we[k] = 1; sram[k] = 2;
          bank[k] = bank_of(7'(r), 7'(c + k));
          addr[k] = addr_of(7'(r), 7'(c + k));
          wdata[k] = 32'(r * 256 + c + k);
        end
        #1;
        checks++;
        if (!gnt[0] || !gnt[1]) failures++;
        @(negedge clk);
      end
    req[0] = 0; req[1] = 0;
    for (int c = 0; c < 16; c++)
      for (int r = 0; r < 16; r += 2) begin
        for (int k = 0; k < 2; k++) begin
          req[2+k] = 1; we[2+k] = 0; sram[2+k] = 2;
          bank[2+k] = bank_of(7'(r + k), 7'(c));
          addr[2+k] = addr_of(7'(r + k), 7'(c));
        end
        #1;
        checks++;
        if (!gnt[2] || !gnt[3]) failures++;
        @(posedge clk); #1;
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (!rvalid[2+k] || rdata[2+k] != 32'((r + k) * 256 + c)) failures++;
        end
        @(negedge clk);
      end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
