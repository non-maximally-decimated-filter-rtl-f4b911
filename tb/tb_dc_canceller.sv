// tb_dc_canceller - feeds a sinewave riding on a DC offset and checks every
// output against an integer model of y = x - d, d += y/2^MU_SHIFT; then checks
// that the offset is removed (mean of the output near zero after settling)
// while the sinewave passes.
module tb_dc_canceller;
  import nmdfb_pkg::*;
  localparam int MU = 6;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, en = 0, y_valid;
  sample_t x, y;
  int checks = 0, failures = 0;

  dc_canceller #(.MU_SHIFT(MU)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint dm = 0, ye, diff;   // d in units of 2^-16
    real mean = 0, pw = 0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      x = sample_t'($rtoi(3000.0 + 2000.0 * $sin(2.0 * PI * n / 37.0)));
      en = ($urandom_range(0, 4) != 0);
      diff = longint'(x) - (dm >>> 16);
      ye = diff > 32767 ? 32767 : (diff < -32768 ? -32768 : diff);
      @(negedge clk);
      if (en) begin
        dm = dm + (ye <<< (16 - MU));
        checks++;
        if (!y_valid || longint'(y) != ye) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d exp %0d", n, y, ye);
        end
        if (n >= 3000) begin mean += real'(y); pw += real'(y) * real'(y); end
      end
      en = 0;
    end
    checks++;
    if (mean / 800.0 > 100.0 || mean / 800.0 < -100.0 || pw / 800.0 < 1.0e6) begin
      failures++;
      $display("mean %f power %f", mean / 800.0, pw / 800.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
