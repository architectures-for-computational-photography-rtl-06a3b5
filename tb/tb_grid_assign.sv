// tb_grid_assign: streams random blocks of several sizes and bin counts
// through the assignment engines and compares every bin's sum and weight
// with a histogram computed in the testbench; also checks that the cells
// appear one cycle after the last pixel and that disabled engines stay zero.
module tb_grid_assign;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  log2_sigma_r;
  logic        pix_valid, blk_start, blk_end, cell_valid;
  logic [7:0]  pix, val;
  logic [21:0] cell_sum [16];
  logic [14:0] cell_wt  [16];
  int checks = 0, failures = 0;

  grid_assign dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint es [16];
    longint ew [16];
    pix_valid = 0; blk_start = 0; blk_end = 0; pix = 0; val = 0; log2_sigma_r = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 12; blk++) begin
      int bs, np;
      bs = 16 << (blk % 4);              // 16, 32, 64, 128
      np = bs * bs;
      log2_sigma_r = 3'(4 + blk % 3);
      foreach (es[b]) begin es[b] = 0; ew[b] = 0; end
      for (int p = 0; p < np; p++) begin
        @(negedge clk);
        pix_valid = 1;
        pix = (blk % 2) ? 8'($urandom) : 8'($urandom_range(100, 140));
        blk_start = (p == 0);
        blk_end   = (p == np - 1);
        // odd blocks are cross-bilateral: the summed value differs from the bin pixel
        val = (blk % 2) ? 8'($urandom) : pix;
        es[pix >> log2_sigma_r] += val;
        ew[pix >> log2_sigma_r] += 1;
      end
      @(negedge clk) pix_valid = 0; blk_start = 0; blk_end = 0;
      checks++;
      if (!cell_valid) failures++;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (longint'(cell_sum[b]) != es[b] || longint'(cell_wt[b]) != ew[b]) begin
          failures++;
          $display("block %0d bin %0d: got %0d/%0d exp %0d/%0d", blk, b, cell_sum[b], cell_wt[b], es[b], ew[b]);
        end
      end
      @(negedge clk);
      checks++;
      if (cell_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
