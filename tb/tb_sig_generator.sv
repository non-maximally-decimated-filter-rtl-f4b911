// tb_sig_generator - sine mode: every sample equals round(2^14 sin(2 pi *
// step * n / 256)) within 1 LSB; noise mode: every sample equals an
// independent model of the Galois LFSR, and the samples have a mean near zero
// and the variance of a uniform +/-2^13 source.
module tb_sig_generator;
  import nmdfb_pkg::*;
  localparam int STEP = 5;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, en = 0, sel = 0;
  sample_t x;
  int checks = 0, failures = 0;

  sig_generator #(.PHASE_STEP(STEP)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real e, mean = 0, var_ = 0;
    logic [31:0] lf = 32'h1;
    int ph = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en = 1; sel = 0;
      @(negedge clk);
      en = 0;
      e = 16384.0 * $sin(2.0 * PI * ph / 256.0);
      checks++;
      if (real'(x) - e > 1.0 || e - real'(x) > 1.0) begin
        failures++;
        if (failures < 10) $display("sine n=%0d got %0d exp %f", n, x, e);
      end
      ph = (ph + STEP) % 256;
      for (int i = 0; i < 16; i++) lf = lf[0] ? ((lf >> 1) ^ 32'h8020_0003) : (lf >> 1);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = 1; sel = 1;
      for (int i = 0; i < 16; i++) lf = lf[0] ? ((lf >> 1) ^ 32'h8020_0003) : (lf >> 1);
      @(negedge clk);
      en = 0;
      checks++;
      if (x != sample_t'($signed(lf[15:0]) >>> 2)) failures++;
      mean += real'(x);
      var_ += real'(x) * real'(x);
    end
    mean = mean / 4000.0;
    var_ = var_ / 4000.0;
    checks++;
    // uniform on +/-8192: variance 8192^2/3 = 2.24e7
    if (mean > 400.0 || mean < -400.0 || var_ < 1.9e7 || var_ > 2.6e7) begin
      failures++;
      $display("noise mean %f var %f", mean, var_);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
