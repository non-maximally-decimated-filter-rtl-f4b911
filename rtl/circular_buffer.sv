// circular_buffer - M-element register bank between the phase rotators and the
// M-path polyphase filter of the non-maximally decimated up-converter.
//
// With an output rate of M/2 (not M) samples per input, successive input
// vectors must be alternately circularly shifted by M/2 so that the channel
// phase stays continuous across the output commutator. On a clock with `load`
// high the buffer stores d rotated by M/2 when `flip` is high (q[r] =
// d[(r + M/2) mod M]) and unrotated otherwise; q is valid from the next cycle.
// The block and its control by the state engine are the document's; the shift
// rule is the standard one for this filter-bank form. One instance per rail
// (I and Q).
module circular_buffer
  import nmdfb_pkg::*;
#(
  parameter int M = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     load,
  input  logic     flip,
  input  sample_t  d [M],
  output sample_t  q [M]
);
  localparam int P = M / 2;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < M; r++) q[r] <= '0;
    end else if (load) begin
      for (int r = 0; r < M; r++) q[r] <= flip ? d[(r + P) % M] : d[r];
    end
  end
endmodule
