// dc_canceller - one-tap adaptive DC canceller for one rail.
//
// Fixed-point rounding and hardware offsets leave a DC term on the output of
// the up-converter. This block subtracts a running estimate d of that term and
// adapts the estimate with the error it leaves behind (one-tap LMS with a
// constant reference input):
//   y(n)   = sat(x(n) - d(n))
//   d(n+1) = d(n) + y(n) / 2^MU_SHIFT
// d keeps FR = 16 extra fraction bits so that small steps are not lost. The
// one-tap adaptive structure is the document's; the step size 2^-MU_SHIFT and
// the widths are this design's choices. The notch this forms at DC is about
// Fs/(2*pi*2^MU_SHIFT) wide.
//
// Timing: on a clock with `en` high, y is registered from x; y_valid follows
// en by one cycle.
module dc_canceller
  import nmdfb_pkg::*;
#(
  parameter int MU_SHIFT = 10
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  sample_t  x,
  output sample_t  y,
  output logic     y_valid
);
  localparam int FR = 16;

  logic signed [DW+FR+1:0] d_q;
  logic signed [DW+1:0]    dc;
  logic signed [DW+1:0]    diff;
  sample_t                 y_c;

  assign dc   = (DW+2)'(d_q >>> FR);
  assign diff = (DW+2)'(x) - dc;
  assign y_c  = (diff > (DW+2)'(32767))  ? sample_t'(16'sh7fff) :
                (diff < -(DW+2)'(32768)) ? sample_t'(-16'sh8000) : sample_t'(diff[DW-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      d_q     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        y   <= y_c;
        d_q <= d_q + ((DW+FR+2)'(y_c) <<< (FR - MU_SHIFT));
      end
    end
  end

  initial assert (MU_SHIFT >= 1 && MU_SHIFT <= 16) else $error("MU_SHIFT out of range");
endmodule
