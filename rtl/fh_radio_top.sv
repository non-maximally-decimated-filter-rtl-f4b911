// fh_radio_top - top level of the digital frequency-hopping transmitter.
//
// Two designs share the clock and reset and otherwise stand side by side:
//  * mcfh_modulator: the proposed two-tier modulator, an 8-path MFSK
//    up-converter followed by L PN-steered channel selectors and a 32-path
//    hopping up-converter;
//  * up_2_to_16: the complex 16-path, 1:8 up-converter engine with its
//    sine/noise test source and a manual channel selector.
// The clock is the output sample clock: both produce one complex output
// sample per clock. Ports are those of the two blocks, prefixed fh_ and demo_.
module fh_radio_top
  import nmdfb_pkg::*;
#(
  parameter int M1 = 8,
  parameter int N2 = 32,
  parameter int L = 2,
  parameter int K = 8,
  parameter int SYM_LEN = 4,
  parameter int HOP_LEN = 16,
  parameter int M_DEMO = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  // two-tier FH modulator
  input  logic                        sym_valid,
  output logic                        sym_ready,
  input  logic [$clog2(M1)-1:0]       sym,
  input  logic                        pn_load,
  input  logic [16*L-1:0]             pn_seed,
  input  logic [L-1:0]                hop_en,
  output logic [L*$clog2(N2)-1:0]     hop_ch,
  output logic                        hop_strobe,
  output sample_t                     fh_y_i,
  output sample_t                     fh_y_q,
  output logic                        fh_y_valid,
  // 16-path engine
  input  logic [$clog2(M_DEMO)-1:0]   demo_ch,
  input  logic                        demo_src_sel,
  output sample_t                     demo_y_i,
  output sample_t                     demo_y_q,
  output logic                        demo_y_valid
);
  mcfh_modulator #(
    .M1(M1), .N2(N2), .L(L), .K(K), .SYM_LEN(SYM_LEN), .HOP_LEN(HOP_LEN)
  ) u_fh (
    .clk, .rst, .ce(1'b1), .sym_valid, .sym_ready, .sym, .pn_load, .pn_seed,
    .hop_en, .hop_ch, .hop_strobe, .y_i(fh_y_i), .y_q(fh_y_q), .y_valid(fh_y_valid)
  );

  up_2_to_16 #(.M(M_DEMO), .K(K)) u_demo (
    .clk, .rst, .ce(1'b1), .ch(demo_ch), .src_sel(demo_src_sel),
    .y_i(demo_y_i), .y_q(demo_y_q), .y_valid(demo_y_valid)
  );
endmodule
