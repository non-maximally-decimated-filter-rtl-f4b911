// state_engine - sequencer of the 1:M/2 non-maximally decimated up-converter.
//
// The channelizer runs one clock enable (ce) per output sample. The state
// engine counts the output phase 0..M/2-1; on phase 0 it asserts `take`, the
// strobe on which a new input sample enters the phase rotators. `flip` is the
// state of the circular buffer for the sample being taken: it alternates
// 0,1,0,1,... from reset, because the M-point vector must be rotated by M/2
// on every other input when the output rate is M/2 (not M) times the input
// rate. The engine's position in the block diagram is the document's; the
// counter itself is this design's construction.
//
// Timing: `take` and `flip` are combinational from the registered phase and
// are valid in the cycle where ce is high; the phase advances at the clock
// edge of every ce cycle.
module state_engine #(
  parameter int M = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ce,
  output logic                         take,
  output logic                         flip,
  output logic [$clog2(M/2)-1:0]       phase
);
  localparam int P = M / 2;
  localparam int PW = $clog2(P);

  logic flip_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      flip_q <= 1'b0;
    end else if (ce) begin
      phase <= (phase == PW'(P - 1)) ? '0 : phase + 1'b1;
      if (phase == '0) flip_q <= ~flip_q;
    end
  end

  assign take = ce && (phase == '0);
  assign flip = flip_q;

  initial assert (M >= 4 && (M & (M - 1)) == 0) else $error("M must be a power of two >= 4");
endmodule
