// tb_hdri_create: drives random exposure triples (consistent scenes and
// arbitrary ones, including saturated pixels) and compares the radiance
// with a real-valued model of the camera-curve merge; checks the latency.
module tb_hdri_create;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic [7:0]         pix [3];
  logic signed [15:0] log_dt [3];
  logic [15:0]        radiance;
  logic signed [15:0] log_radiance;
  int checks = 0, failures = 0;

  hdri_create dut (.*);

  real expq[$];
  int cyc = 0, tin[$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    real e, err;
    e = expq.pop_front();
    if (e > 65535.0) e = 65535.0;
    err = real'(radiance) - e;
    if (err < 0) err = -err;
    checks++;
    if (err > 1.0 + 0.01 * e) begin
      failures++;
      if (failures < 8) $display("got %0d exp %f", radiance, e);
    end
    if (cyc - tin.pop_front() != 4) failures++;
  end

  initial begin
    in_valid = 0; pix = '{0, 0, 0};
    log_dt = '{-16'sd256, 16'sd0, 16'sd256};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real num, den, lr;
      @(negedge clk);
      if (n % 2) begin
        // consistent scene: radiance R seen through a gamma camera
        real r;
        r = $pow(2.0, -12.0 + 12.0 * real'($urandom_range(0, 1000)) / 1000.0);
        for (int j = 0; j < 3; j++) begin
          real i;
          i = 256.0 * $pow(r * $pow(2.0, real'(j - 1)), 1.0 / 2.2);
          pix[j] = (i > 255.0) ? 8'd255 : 8'($rtoi(i));
        end
      end else
        for (int j = 0; j < 3; j++) pix[j] = 8'($urandom);
      num = 0; den = 0;
      for (int j = 0; j < 3; j++) begin
        real w;
        w = (pix[j] < 128) ? real'(pix[j]) + 1.0 : 256.0 - real'(pix[j]);
        num += w * (2.2 * $ln((real'(pix[j]) + 0.5) / 256.0) / $ln(2.0) - real'(j - 1));
        den += w;
      end
      lr = num / den;
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin expq.push_back($pow(2.0, lr + 15.0)); tin.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
