// tb_channel_selector - drives random complex samples and random channel
// pairs (each selector enabled at random) and compares every rotated path
// value with x * sum exp(j*2*pi*k*r/M) computed in floating point (tolerance
// 2 LSB for the Q2.16 twiddles and rounding).
module tb_channel_selector;
  import nmdfb_pkg::*;
  localparam int M = 16, L = 2, CHW = $clog2(M);
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, load = 0;
  sample_t x_i, x_q, v_i [M], v_q [M];
  logic [L*CHW-1:0] ch;
  logic [L-1:0] ch_en;
  int checks = 0, failures = 0;

  channel_selector #(.M(M), .L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  initial begin
    real er, ei, c, s;
    int k;
    x_i = '0; x_q = '0; ch = '0; ch_en = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      x_i = sample_t'($urandom_range(0, 30000) - 15000);
      x_q = sample_t'($urandom_range(0, 30000) - 15000);
      ch = L*CHW'($urandom);
      ch_en = (t < 50) ? 2'b01 : L'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int r = 0; r < M; r++) begin
        er = 0; ei = 0;
        for (int l = 0; l < L; l++) if (ch_en[l]) begin
          k = int'(ch[l*CHW +: CHW]);
          c = $cos(2.0 * PI * k * r / M);
          s = $sin(2.0 * PI * k * r / M);
          er += real'(x_i) * c - real'(x_q) * s;
          ei += real'(x_i) * s + real'(x_q) * c;
        end
        if (er > 32767) er = 32767;
        if (er < -32768) er = -32768;
        if (ei > 32767) ei = 32767;
        if (ei < -32768) ei = -32768;
        checks++;
        if (rabs(real'(v_i[r]) - er) > 2.0 || rabs(real'(v_q[r]) - ei) > 2.0) begin
          failures++;
          if (failures < 10) $display("t=%0d r=%0d got %0d,%0d exp %f,%f", t, r, v_i[r], v_q[r], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
