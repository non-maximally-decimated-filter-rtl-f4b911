// channel_selector - phase rotators that select the output channel(s) of the
// up-converter, in place of its M-point IFFT.
//
// A frequency hopper uses only one (or a few) of the M channels at a time, so
// instead of an IFFT whose inputs are all zero but one, the complex input x is
// multiplied by the M twiddles exp(+j*2*pi*k*r/M), r = 0..M-1, of the selected
// channel k: the output vector is what the IFFT would have produced with x on
// port k. L selectors can be active at once (multi-carrier hopping); their
// vectors are summed. Replacing the IFFT by rotators and driving them from a
// channel selector follows the document; L, the widths and the rounding are
// this design's choices.
//
// Interface: ch is packed, selector l at ch[l*CHW +: CHW], enabled by ch_en[l].
// Timing: on a clock with `load` high the M-element vector v (I and Q rails)
// is registered; it is valid from the next cycle. Twiddles are Q2.16 and are
// computed at elaboration; each product is rounded and saturated to 16 bits.
module channel_selector
  import nmdfb_pkg::*;
#(
  parameter int M = 16,
  parameter int L = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load,
  input  sample_t                       x_i,
  input  sample_t                       x_q,
  input  logic [L*$clog2(M)-1:0]        ch,
  input  logic [L-1:0]                  ch_en,
  output sample_t                       v_i [M],
  output sample_t                       v_q [M]
);
  localparam int CHW = $clog2(M);

  coef_t tre [M];
  coef_t tim [M];
  for (genvar g = 0; g < M; g++) begin : g_tw
    localparam coef_t TRE = tw_re(g, M);
    localparam coef_t TIM = tw_im(g, M);
    assign tre[g] = TRE;
    assign tim[g] = TIM;
  end

  // Sum over the enabled selectors of the twiddle of path r: W^(k*r mod M).
  logic signed [CW+7:0] wsum_re [M];
  logic signed [CW+7:0] wsum_im [M];
  logic [CHW-1:0] idx;
  always_comb begin
    idx = '0;
    for (int r = 0; r < M; r++) begin
      wsum_re[r] = '0;
      wsum_im[r] = '0;
      for (int l = 0; l < L; l++) begin
        idx = CHW'(ch[l*CHW +: CHW] * CHW'(r));     // k*r mod M
        if (ch_en[l]) begin
          wsum_re[r] = wsum_re[r] + (CW+8)'(tre[idx]);
          wsum_im[r] = wsum_im[r] + (CW+8)'(tim[idx]);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < M; r++) begin
        v_i[r] <= '0;
        v_q[r] <= '0;
      end
    end else if (load) begin
      for (int r = 0; r < M; r++) begin
        v_i[r] <= round_sat(64'(x_i) * 64'(wsum_re[r]) - 64'(x_q) * 64'(wsum_im[r]), TW_FRAC);
        v_q[r] <= round_sat(64'(x_i) * 64'(wsum_im[r]) + 64'(x_q) * 64'(wsum_re[r]), TW_FRAC);
      end
    end
  end
endmodule
