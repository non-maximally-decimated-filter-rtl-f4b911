// mcfh_modulator - fully digital multi-carrier frequency-hopping modulator
// built from two cascaded up-converter channelizers.
//
// Tier 1 (M1 paths) is the MFSK modulator: every input sample is a constant
// amplitude placed on the channel of the current data symbol, so the channel
// index *is* the FSK tone. Tier 2 (N2 paths) is the hopper: L channel
// selectors, each steered by its own PN sequence generator, route the tier-1
// output to L of the N2 tier-2 channels, which moves the FSK signal onto L
// centre frequencies at once; the hop pattern changes every HOP_LEN tier-2
// input samples. Both tiers use phase rotators in place of IFFTs, so no
// frequency synthesiser and no full IFFT is needed. A DC canceller per rail
// cleans the output.
//
// The two-tier structure, the 8-FSK first tier, the 32-path hopper, the PN-
// driven channel selectors and reloadable PN sequences are the document's.
// The number of selectors L, the symbol length SYM_LEN (tier-1 input samples
// per symbol), the dwell HOP_LEN, the FSK amplitude, the widths and the
// stream handshake are this design's choices.
//
// Rates (one output sample per clock with ce high): tier 2 takes a sample
// every N2/2 enables, tier 1 one every M1/2 tier-2 takes, so a symbol lasts
// SYM_LEN*M1/2*N2/2 output samples and a hop HOP_LEN*N2/2.
// Interface: sym/sym_valid/sym_ready is a valid/ready stream; a symbol is
// accepted (sym_ready high) at the start of each symbol period. With no
// symbol waiting, tier 1 is fed zeros. pn_load reloads every PN generator
// with its slice of pn_seed (selector l at pn_seed[16*l +: 16]); hop_en
// enables each selector; hop_ch shows the channel each selector uses.
module mcfh_modulator
  import nmdfb_pkg::*;
#(
  parameter int M1 = 8,
  parameter int N2 = 32,
  parameter int L = 2,
  parameter int K = 8,
  parameter int SYM_LEN = 4,
  parameter int HOP_LEN = 16,
  parameter int FSK_AMP = 8192,
  parameter int MU_SHIFT = 10
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        ce,
  input  logic                        sym_valid,
  output logic                        sym_ready,
  input  logic [$clog2(M1)-1:0]       sym,
  input  logic                        pn_load,
  input  logic [16*L-1:0]             pn_seed,
  input  logic [L-1:0]                hop_en,
  output logic [L*$clog2(N2)-1:0]     hop_ch,
  output logic                        hop_strobe,
  output sample_t                     y_i,
  output sample_t                     y_q,
  output logic                        y_valid
);
  localparam int SW = $clog2(M1);
  localparam int CW2 = $clog2(N2);

  // ---------------- tier 1: MFSK ----------------
  logic    take1, take2, v1, yv_q;
  sample_t x1, t1_i, t1_q, t2_i, t2_q;
  logic [SW-1:0] cur_sym, ch1;
  logic    active;
  logic [$clog2(SYM_LEN+1)-1:0] sym_cnt;
  logic    sym_start;

  assign sym_start = (sym_cnt == '0);
  assign sym_ready = take1 && sym_start;
  assign ch1 = sym_start ? sym : cur_sym;
  assign x1  = (sym_start ? sym_valid : active) ? sample_t'(FSK_AMP) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_sym <= '0;
      active  <= 1'b0;
      sym_cnt <= '0;
    end else if (take1) begin
      sym_cnt <= (32'(sym_cnt) == SYM_LEN - 1) ? '0 : sym_cnt + 1'b1;
      if (sym_start) begin
        cur_sym <= sym;
        active  <= sym_valid;
      end
    end
  end

  nmdfb_channelizer #(.M(M1), .K(K), .L(1)) u_tier1 (
    .clk, .rst, .ce(take2), .in_take(take1), .x_i(x1), .x_q('0),
    .ch(ch1), .ch_en(1'b1), .y_i(t1_i), .y_q(t1_q), .y_valid(v1)
  );

  // ---------------- PN-driven channel selectors ----------------
  logic [$clog2(HOP_LEN+1)-1:0] hop_cnt;
  assign hop_strobe = take2 && (32'(hop_cnt) == HOP_LEN - 1);

  always_ff @(posedge clk) begin
    if (rst || pn_load) hop_cnt <= '0;
    else if (take2) hop_cnt <= hop_strobe ? '0 : hop_cnt + 1'b1;
  end

  for (genvar l = 0; l < L; l++) begin : g_pn
    pn_sequence_generator #(.CH_W(CW2), .SEED(16'hACE1 + 16'(l * 16'h1F35))) u_pn (
      .clk, .rst, .step(hop_strobe), .load(pn_load), .seed(pn_seed[16*l +: 16]),
      .ch(hop_ch[CW2*l +: CW2])
    );
  end

  // ---------------- tier 2: frequency hopper ----------------
  logic v2;
  nmdfb_channelizer #(.M(N2), .K(K), .L(L)) u_tier2 (
    .clk, .rst, .ce, .in_take(take2), .x_i(t1_i), .x_q(t1_q),
    .ch(hop_ch), .ch_en(hop_en), .y_i(t2_i), .y_q(t2_q), .y_valid(v2)
  );

  dc_canceller #(.MU_SHIFT(MU_SHIFT)) u_dc_i (
    .clk, .rst, .en(v2), .x(t2_i), .y(y_i), .y_valid
  );
  dc_canceller #(.MU_SHIFT(MU_SHIFT)) u_dc_q (
    .clk, .rst, .en(v2), .x(t2_q), .y(y_q), .y_valid(yv_q)
  );

  always_ff @(posedge clk) if (!rst) assert (yv_q == y_valid);
  // tier 1 produces exactly one output per tier-2 take once running
  always_ff @(posedge clk) if (!rst && v1) assert ($past(take2));
endmodule
