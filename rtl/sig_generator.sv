// sig_generator - test signal source of the up-converter: a real sinewave or
// white noise, selectable at run time.
//
// A sinewave makes the time-domain output easy to follow sample by sample;
// white noise fills the whole input band and shows the channel shaping and
// the hop in the output spectrum. Both options are the document's; their
// construction is this design's:
//   sine  : 8-bit phase accumulator stepped by PHASE_STEP per sample, a
//           256-entry table round(2^14 * sin(2*pi*i/256)) computed at
//           elaboration;
//   noise : 32-bit Galois LFSR (taps 32,22,2,1), stepped 16 times per sample;
//           the low 16 bits, divided by 4, give a uniform sample of +/-2^13.
//
// Timing: x is a register; on a clock with `en` high it advances to the next
// sample, so a consumer that reads x on its take strobe sees a new sample
// every time.
module sig_generator
  import nmdfb_pkg::*;
#(
  parameter int PHASE_STEP = 5
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     sel,     // 0: sine, 1: white noise
  output sample_t  x
);
  sample_t lut [256];
  for (genvar g = 0; g < 256; g++) begin : g_lut
    localparam longint S = (sin_q(longint'(g), 256) * 16384 + (64'sd1 <<< 27)) >>> 28;
    assign lut[g] = sample_t'(S[DW-1:0]);
  end

  logic [7:0]  ph;
  logic [31:0] lfsr, lfsr_n;

  always_comb begin
    lfsr_n = lfsr;
    for (int i = 0; i < 16; i++)
      lfsr_n = lfsr_n[0] ? ((lfsr_n >> 1) ^ 32'h8020_0003) : (lfsr_n >> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph   <= '0;
      lfsr <= 32'h1;
      x    <= '0;
    end else if (en) begin
      ph   <= ph + 8'(PHASE_STEP);
      lfsr <= lfsr_n;
      x    <= sel ? sample_t'($signed(lfsr_n[15:0]) >>> 2) : lut[ph];
    end
  end
endmodule
