// pn_sequence_generator - pseudo-random hop pattern for one channel selector.
//
// A 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1, period 65535) is
// stepped once per hop; its low CH_W bits are the channel index handed to the
// channel selector, so every channel of a 2^CH_W-path hopper is visited. The
// sequence can be changed on the fly by loading a new seed (a zero seed is
// replaced by 1, since the all-zero state would lock up). PN-driven hopping and
// changing the sequence at run time are the document's; the polynomial, width
// and seed interface are this design's choices.
//
// Timing: `ch` is registered state. `load` has priority over `step`; both take
// effect at the clock edge.
module pn_sequence_generator #(
  parameter int          CH_W = 5,
  parameter logic [15:0] SEED = 16'h0001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  input  logic             load,
  input  logic [15:0]      seed,
  output logic [CH_W-1:0]  ch
);
  logic [15:0] s;
  logic        fb;

  assign fb = s[15] ^ s[13] ^ s[12] ^ s[10];

  always_ff @(posedge clk) begin
    if (rst)       s <= (SEED == '0) ? 16'h0001 : SEED;
    else if (load) s <= (seed == '0) ? 16'h0001 : seed;
    else if (step) s <= {s[14:0], fb};
  end

  assign ch = s[CH_W-1:0];

  initial assert (CH_W >= 1 && CH_W <= 16) else $error("CH_W out of range");
endmodule
