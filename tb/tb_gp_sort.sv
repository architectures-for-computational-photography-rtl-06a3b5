// tb_gp_sort: loads lists of random floating-point values (several lengths,
// powers of two and not, with duplicates and negatives), sorts them and
// checks that the result is the ascending permutation of the input computed
// by the testbench, and that the sort takes one cycle per value and pass
// plus two per batch (and one more pass when the result must be copied back).
module tb_gp_sort;
  import cp_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en, start, busy, done;
  logic [9:0]  wr_addr, rd_addr;
  logic [10:0] n;
  fp32_t       wr_data, rd_data;
  int checks = 0, failures = 0;

  gp_sort dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int len);
    real vals[$];
    int cyc, expc, passes, w;
    vals = {};
    for (int k = 0; k < len; k++) begin
      real r;
      r = (k % 5 == 0) ? real'($urandom_range(0, 3)) : rand_real(1000.0);
      r = fp_to_real(real_to_fp(r));
      vals.push_back(r);
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(k); wr_data = real_to_fp(r);
    end
    @(negedge clk);
    wr_en = 0; start = 1; n = 11'(len);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // expected time
    expc = 0; passes = 0; w = 1;
    while (w < len) begin
      expc += len + 2 * ((len + 2 * w - 1) / (2 * w));
      passes++; w *= 2;
    end
    if (passes % 2) expc += len;
    checks++;
    if (len > 1 && cyc != expc + 1) begin
      failures++;
      $display("n=%0d: %0d cycles, expected %0d", len, cyc, expc + 1);
    end
    vals.sort();
    for (int k = 0; k < len; k++) begin
      rd_addr = 10'(k);
      #1;
      checks++;
      if (fp_to_real(rd_data) != vals[k]) begin
        failures++;
        if (failures < 6) $display("n=%0d pos %0d: got %f exp %f", len, k, fp_to_real(rd_data), vals[k]);
      end
    end
  endtask

  initial begin
    wr_en = 0; start = 0; n = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1); run(2); run(3); run(7); run(16); run(100); run(513); run(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
