// up_2_to_16 - the complex 16-path up-converter engine with its test source.
//
// A real test signal (sinewave or white noise) enters a 16-path non-maximally
// decimated polyphase up-converter that interpolates it 1:8 and places it on
// one of 16 channels chosen by the channel selector `ch` (0 = DC, channel k
// centred at k/16 of the output rate). The rotators make the signal complex,
// so filter, commutator and DC canceller exist once per rail (I and Q), as in
// the document's engine. The channel can be changed while running; the new
// channel applies from the next input sample taken.
//
// Interface and timing: one output sample per clock with `ce` high; the test
// source advances on every input take (every 8 enables). y_i/y_q are the DC-
// cancelled outputs, y_valid marks them (one clock after each enable once data
// flows). Latency from the take of an input to its first output: 5 enables
// (4 in the channelizer, 1 in the DC canceller).
module up_2_to_16
  import nmdfb_pkg::*;
#(
  parameter int M = 16,
  parameter int K = 8,
  parameter int MU_SHIFT = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic [$clog2(M)-1:0]    ch,
  input  logic                    src_sel,
  output sample_t                 y_i,
  output sample_t                 y_q,
  output logic                    y_valid
);
  logic    take, cv, yv_q;
  sample_t x, c_i, c_q;

  sig_generator u_sig (
    .clk, .rst, .en(take), .sel(src_sel), .x
  );

  nmdfb_channelizer #(.M(M), .K(K), .L(1)) u_chan (
    .clk, .rst, .ce, .in_take(take), .x_i(x), .x_q('0),
    .ch, .ch_en(1'b1), .y_i(c_i), .y_q(c_q), .y_valid(cv)
  );

  dc_canceller #(.MU_SHIFT(MU_SHIFT)) u_dc_i (
    .clk, .rst, .en(cv), .x(c_i), .y(y_i), .y_valid
  );
  dc_canceller #(.MU_SHIFT(MU_SHIFT)) u_dc_q (
    .clk, .rst, .en(cv), .x(c_q), .y(y_q), .y_valid(yv_q)
  );

  always_ff @(posedge clk) if (!rst) assert (yv_q == y_valid);
endmodule
