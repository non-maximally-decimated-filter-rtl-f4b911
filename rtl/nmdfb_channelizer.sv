// nmdfb_channelizer - complex M-path non-maximally decimated polyphase
// up-converter channelizer with phase-rotator channel selection.
//
// One real input sample is turned into M/2 output samples (1:M/2 up-sampling),
// shaped by the low-pass prototype and shifted to the centre frequency of the
// selected channel k, k*Fout/M with Fout the output rate. Because the output
// rate is only M/2 times the input rate, the M channels overlap by half and
// the whole input band, transition bands included, can be used: this is what
// makes the filter bank "non-maximally decimated". Mathematically
//   y(m) = exp(j*2*pi*k*m/M) * sum_n x(n) * h(m - n*M/2)
// summed over the enabled selectors.
//
// Data path (document's block order, one instance per rail where the signal
// is complex): channel_selector (phase rotators replacing the IFFT) ->
// circular_buffer (shift by M/2 on alternate inputs) -> polyphase_filter
// (paths H_r(z^2)) -> output_commutator (output data buffer, adder and
// commutator); the state_engine sequences them.
//
// Interface and timing: `ce` is the output-rate clock enable; everything
// advances only on ce. `in_take` is high on the ce cycle in which x_i/x_q is
// consumed, every M/2 enables. The first of the M/2 outputs of an input is
// registered on the 4th enable after the one that took the input; y_valid is
// high for one clock after each enable once data flows. ch/ch_en select the channel of
// each of the L selectors and are sampled with the input.
module nmdfb_channelizer
  import nmdfb_pkg::*;
#(
  parameter int M = 16,
  parameter int K = 8,
  parameter int L = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce,
  output logic                          in_take,
  input  sample_t                       x_i,
  input  sample_t                       x_q,
  input  logic [L*$clog2(M)-1:0]        ch,
  input  logic [L-1:0]                  ch_en,
  output sample_t                       y_i,
  output sample_t                       y_q,
  output logic                          y_valid
);
  localparam int PW = $clog2(M / 2);
  localparam int AW = 48;

  logic          take, flip;
  logic [PW-1:0] phase;

  state_engine #(.M(M)) u_state (
    .clk, .rst, .ce, .take, .flip, .phase
  );
  assign in_take = take;

  // Pipeline of control in ce ticks: d1 -> circular buffer, d2 -> delay
  // lines, d3 -> filter phase, d4 -> commutator phase.
  logic          take_d1, take_d2, flip_d1, started;
  logic [3:1]    run_d;
  logic [PW-1:0] phase_d [1:4];

  always_ff @(posedge clk) begin
    if (rst) begin
      take_d1 <= 1'b0;
      take_d2 <= 1'b0;
      flip_d1 <= 1'b0;
      started <= 1'b0;
      run_d   <= '0;
      for (int i = 1; i <= 4; i++) phase_d[i] <= '0;
    end else if (ce) begin
      take_d1 <= take;
      take_d2 <= take_d1;
      flip_d1 <= flip;
      if (take) started <= 1'b1;
      run_d   <= {run_d[2:1], take | started};
      phase_d[1] <= phase;
      for (int i = 2; i <= 4; i++) phase_d[i] <= phase_d[i-1];
    end
  end

  logic filt_en, filt_valid;
  assign filt_en = ce && run_d[3];
  always_ff @(posedge clk) begin
    if (rst) filt_valid <= 1'b0;
    else if (ce) filt_valid <= run_d[3];
  end

  sample_t v_i [M];
  sample_t v_q [M];
  sample_t c_i [M];
  sample_t c_q [M];
  logic signed [AW-1:0] a_i, b_i, a_q, b_q;
  logic yv_q;

  channel_selector #(.M(M), .L(L)) u_chsel (
    .clk, .rst, .load(take), .x_i, .x_q, .ch, .ch_en, .v_i, .v_q
  );

  circular_buffer #(.M(M)) u_cbuf_i (
    .clk, .rst, .load(ce && take_d1), .flip(flip_d1), .d(v_i), .q(c_i)
  );
  circular_buffer #(.M(M)) u_cbuf_q (
    .clk, .rst, .load(ce && take_d1), .flip(flip_d1), .d(v_q), .q(c_q)
  );

  polyphase_filter #(.M(M), .K(K), .AW(AW)) u_pf_i (
    .clk, .rst, .load(ce && take_d2), .d(c_i), .en(filt_en), .phase(phase_d[3]), .a(a_i), .b(b_i)
  );
  polyphase_filter #(.M(M), .K(K), .AW(AW)) u_pf_q (
    .clk, .rst, .load(ce && take_d2), .d(c_q), .en(filt_en), .phase(phase_d[3]), .a(a_q), .b(b_q)
  );

  output_commutator #(.M(M), .AW(AW)) u_oc_i (
    .clk, .rst, .en(ce && filt_valid), .phase(phase_d[4]), .a(a_i), .b(b_i), .y(y_i), .y_valid
  );
  output_commutator #(.M(M), .AW(AW)) u_oc_q (
    .clk, .rst, .en(ce && filt_valid), .phase(phase_d[4]), .a(a_q), .b(b_q), .y(y_q), .y_valid(yv_q)
  );

  // Both rails run in lockstep.
  always_ff @(posedge clk) if (!rst) assert (yv_q == y_valid);
endmodule
