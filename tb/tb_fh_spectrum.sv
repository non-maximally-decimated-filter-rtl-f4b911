// tb_fh_spectrum - spectrum of the two-tier FH modulator carrying a steady
// 8-FSK tone hopped on two centre frequencies at once, then on one.
//
// The dwell is lengthened to 256 tier-2 inputs (4096 output samples) so that a
// whole 1024-sample window fits inside one hop after the filters settle. The
// symbol s is held constant, so tier 1 emits a single tone at s/8 of its output
// rate (tones 5..7 are negative frequencies), i.e. at s'/128 of the final
// output rate, and tier 2 moves it by k/32 for each active selector's channel k.
// For each measured hop the test takes the channels from hop_ch and requires
// at least 95 % of the windowed DFT power within 3 bins of the expected
// tones, and each active tone at least 20 % of the power.
module tb_fh_spectrum;
  import nmdfb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 1024, HOP = 256;

  logic clk = 0, rst = 1, ce = 1, sym_valid = 1, sym_ready, pn_load = 0, hop_strobe, y_valid;
  logic [2:0] sym = 3'd1;
  logic [31:0] pn_seed = '0;
  logic [1:0] hop_en = 2'b11;
  logic [9:0] hop_ch;
  sample_t y_i, y_q;
  int checks = 0, failures = 0;

  mcfh_modulator #(.HOP_LEN(HOP)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real yr [NS], yi [NS];

  initial begin
    real w, pr, pi_, p, ptot, ptone [2], f, pmax;
    int bmax;
    int kb [2], cnt, s_signed, d;
    logic [9:0] chs;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int seg = 0; seg < 4; seg++) begin
      if (seg == 3) begin sym = 3'd6; hop_en = 2'b01; end
      // wait for the start of a hop, then let both filters settle
      @(posedge hop_strobe);
      @(posedge clk);
      @(negedge clk);
      chs = hop_ch;
      cnt = 0;
      while (cnt < 1500 + NS) begin
        @(negedge clk);
        if (y_valid) begin
          if (cnt >= 1500) begin
            yr[cnt - 1500] = real'(y_i);
            yi[cnt - 1500] = real'(y_q);
          end
          cnt++;
        end
      end
      s_signed = (int'(sym) < 4) ? int'(sym) : int'(sym) - 8;
      for (int l = 0; l < 2; l++) begin
        // tone bin on an NS-point grid: (k/32 + s/128) * NS
        kb[l] = (int'(chs[5*l +: 5]) * (NS / 32) + s_signed * (NS / 128) + NS) % NS;
        ptone[l] = 0;
      end
      ptot = 0;
      pmax = 0;
      bmax = 0;
      for (int b = 0; b < NS; b++) begin
        f = real'(b) / NS;
        pr = 0; pi_ = 0;
        for (int m = 0; m < NS; m++) begin
          w = 0.5 - 0.5 * $cos(2.0 * PI * m / NS);
          pr += w * (yr[m] * $cos(2.0 * PI * f * m) + yi[m] * $sin(2.0 * PI * f * m));
          pi_ += w * (yi[m] * $cos(2.0 * PI * f * m) - yr[m] * $sin(2.0 * PI * f * m));
        end
        p = pr * pr + pi_ * pi_;
        ptot += p;
        if (p > pmax) begin pmax = p; bmax = b; end
        for (int l = 0; l < 2; l++) begin
          d = b - kb[l];
          if (d > NS / 2) d -= NS;
          if (d < -NS / 2) d += NS;
          if (hop_en[l] && d >= -3 && d <= 3 && !(l == 1 && hop_en[0] && kb[0] == kb[1])) ptone[l] += p;
        end
      end
      $display("hop %0d: channels %0d,%0d enables %b symbol %0d tone power %0.3f + %0.3f of total (bins %0d %0d, peak %0d)",
               seg, chs[4:0], chs[9:5], hop_en, sym, ptone[0] / ptot, ptone[1] / ptot, kb[0], kb[1], bmax);
      checks++;
      if ((ptone[0] + ptone[1]) / ptot < 0.95) failures++;
      for (int l = 0; l < 2; l++) begin
        if (hop_en[l] && !(l == 1 && kb[0] == kb[1])) begin
          checks++;
          if (ptone[l] / ptot < 0.2) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
