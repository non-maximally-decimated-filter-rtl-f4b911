// polyphase_filter - M-path partitioned low-pass prototype of the up-converter
// (one rail, real valued).
//
// Path r filters its own input stream s_r with the sub-filter
// h_r(n) = h(r + n*M), n = 0..K-1, of the M*K-tap prototype. Because the
// engine interpolates by M/2 and not by M, the taps of every path are two input
// samples apart (sub-filter H_r(z^2)); each path therefore keeps a delay line
// of 2K-1 input samples and uses every other one.
//
// The paths are evaluated serially, one output phase per enable: for phase p
// the filter delivers a = output of path p and b = output of path p+M/2. The
// output commutator adds b of one input sample to a of the next. The partition
// rule h_r(n) = h(r+nM) is the document's; the H_r(z^2) spacing, the serial
// schedule and the widths are this design's.
//
// Timing: `load` shifts d into the delay lines (d is the circular buffer
// output). On a clock with `en` high, a and b are registered for the phase
// given on `phase`, from the delay-line contents before that edge. a and b are
// Q.17 sums of 16-bit samples times Q1.17 coefficients, 48 bits wide.
module polyphase_filter
  import nmdfb_pkg::*;
#(
  parameter int M = 16,
  parameter int K = 8,
  parameter int AW = 48
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      load,
  input  sample_t                   d [M],
  input  logic                      en,
  input  logic [$clog2(M/2)-1:0]    phase,
  output logic signed [AW-1:0]      a,
  output logic signed [AW-1:0]      b
);
  localparam int P = M / 2;
  localparam int DL = 2 * K - 1;

  coef_t h [M*K];
  for (genvar g = 0; g < M * K; g++) begin : g_h
    localparam coef_t H = proto_coef(g, M, K);
    assign h[g] = H;
  end

  sample_t s [M][DL];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < M; r++)
        for (int j = 0; j < DL; j++) s[r][j] <= '0;
    end else if (load) begin
      for (int r = 0; r < M; r++) begin
        s[r][0] <= d[r];
        for (int j = 1; j < DL; j++) s[r][j] <= s[r][j-1];
      end
    end
  end

  logic signed [AW-1:0] acc_a, acc_b;
  always_comb begin
    acc_a = '0;
    acc_b = '0;
    for (int q = 0; q < K; q++) begin
      acc_a = acc_a + AW'(s[32'(phase)][2*q]) * AW'(h[32'(phase) + q*M]);
      acc_b = acc_b + AW'(s[32'(phase) + P][2*q]) * AW'(h[32'(phase) + P + q*M]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else if (en) begin
      a <= acc_a;
      b <= acc_b;
    end
  end
endmodule
