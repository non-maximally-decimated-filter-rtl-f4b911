// output_commutator - M-path output data buffer and output commutator of the
// 1:M/2 up-converter (one rail).
//
// For output phase p the polyphase filter delivers a = path p of the current
// input sample and b = path p+M/2 of the same sample. Path p+M/2 belongs one
// input period later, so b is parked in an M/2-entry output data buffer and
// added to a of the next input sample: y(n*M/2 + p) = a_p(n) + b_p(n-1). The
// commutator emits the M/2 sums in phase order, one per enable. The buffer and
// adder follow the block diagram of the document; widths and rounding are this
// design's: the Q.17 sum is rounded (half up) and saturated to 16 bits.
//
// Timing: on a clock with `en` high, y is registered for `phase`; y_valid
// follows en by one cycle.
module output_commutator
  import nmdfb_pkg::*;
#(
  parameter int M = 16,
  parameter int AW = 48
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic [$clog2(M/2)-1:0]    phase,
  input  logic signed [AW-1:0]      a,
  input  logic signed [AW-1:0]      b,
  output sample_t                   y,
  output logic                      y_valid
);
  localparam int P = M / 2;

  logic signed [AW-1:0] obuf [P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < P; p++) obuf[p] <= '0;
      y <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        y <= round_sat(64'(a + obuf[phase]), COEF_FRAC);
        obuf[phase] <= b;
      end
    end
  end
endmodule
