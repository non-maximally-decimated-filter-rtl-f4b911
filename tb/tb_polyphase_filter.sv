// tb_polyphase_filter - loads random path vectors and, for every output phase,
// compares the two path outputs with an exact integer model of the M-path
// partition h_r(n) = h(r + n*M) with taps two input samples apart. Also checks
// the prototype itself: symmetric, and each of the M/2 interpolation phases
// sums to unit gain within 1 %.
module tb_polyphase_filter;
  import nmdfb_pkg::*;
  localparam int M = 16, K = 8, P = M / 2, NT = M * K, AW = 48;
  logic clk = 0, rst = 1, load = 0, en = 0;
  sample_t d [M];
  logic [$clog2(P)-1:0] phase;
  logic signed [AW-1:0] a, b;
  int checks = 0, failures = 0;
  sample_t hist [M][$];   // newest first

  polyphase_filter #(.M(M), .K(K), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint model(int r);
    longint acc = 0;
    for (int q = 0; q < K; q++)
      if (2 * q < hist[r].size()) acc += longint'(hist[r][2*q]) * longint'(proto_coef(r + q * M, M, K));
    return acc;
  endfunction

  initial begin
    longint sum;
    // prototype properties
    for (int j = 0; j < NT; j++) begin
      checks++;
      if (proto_coef(j, M, K) != proto_coef(NT - 1 - j, M, K)) failures++;
    end
    for (int p = 0; p < P; p++) begin
      sum = 0;
      for (int j = p; j < NT; j += P) sum += longint'(proto_coef(j, M, K));
      checks++;
      if (sum < 129761 || sum > 132383) begin
        failures++;
        $display("phase %0d gain %0d", p, sum);
      end
    end
    for (int r = 0; r < M; r++) d[r] = '0;
    phase = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      for (int r = 0; r < M; r++) begin
        d[r] = sample_t'($urandom);
        hist[r].push_front(d[r]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int p = 0; p < P; p++) begin
        phase = p[$clog2(P)-1:0];
        en = 1;
        @(negedge clk);
        en = 0;
        checks++;
        if (a != AW'(model(p)) || b != AW'(model(p + P))) begin
          failures++;
          if (failures < 10) $display("t=%0d p=%0d a %0d/%0d b %0d/%0d", t, p, a, model(p), b, model(p + P));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
