// tb_fh_radio_top - end-to-end test of the whole transmitter at its default
// size (no parameter overrides).
//
// Both designs of the top run together. The two-tier modulator gets random
// 8-FSK symbols with idle gaps, PN reloads while running and changes between
// one and two carriers; the 16-path engine runs its sinewave and then its
// noise source and is hopped by hand to channels 0, 5, 15 and 3. Each output
// is compared with independent floating-point reference models (direct-form
// channelizers, source, PN and DC-canceller models). The test counts how often
// each mechanism happened - FSK tones used, idle symbol periods, hops, PN
// reloads, single- and dual-carrier samples, circular-buffer shifts, manual
// hops, sine and noise samples, DC-canceller adaptation - and fails if any
// never did.
module tb_fh_radio_top;
  import nmdfb_pkg::*;
  import tb_ref_pkg::*;
  localparam int M1 = 8, N2 = 32, L = 2, K = 8, SYM_LEN = 4, HOP_LEN = 16, AMP = 8192, MU = 10;
  localparam int M = 16, P = M / 2, STEP = 5;
  localparam int NOUT = 6000;

  logic clk = 0, rst = 1;
  logic sym_valid = 0, sym_ready, pn_load = 0, hop_strobe, fh_y_valid;
  logic [2:0] sym = '0;
  logic [16*L-1:0] pn_seed = '0;
  logic [L-1:0] hop_en = 2'b11;
  logic [L*5-1:0] hop_ch;
  sample_t fh_y_i, fh_y_q;
  logic [3:0] demo_ch = '0;
  logic demo_src_sel = 0, demo_y_valid;
  sample_t demo_y_i, demo_y_q;
  int checks = 0, failures = 0;
  bit fh_done = 0, demo_done = 0;
  bit tones [8];
  int n_sym = 0, n_idle = 0, n_hop = 0, n_load = 0, n_dual = 0, n_single = 0;
  int n_manual_hop = 0, n_sine = 0, n_noise = 0, n_flip = 0, n_dc = 0;

  fh_radio_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  chan_model t1, t2, cm;
  dc_model di, dq, ddi, ddq;

  function automatic logic [15:0] nxt(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  // mechanism counters read from inside the design
  always @(posedge clk) begin
    if (!rst && dut.u_fh.u_tier2.u_cbuf_i.load && dut.u_fh.u_tier2.u_cbuf_i.flip) n_flip++;
    if (!rst && fh_y_valid && dut.u_fh.u_dc_i.d_q != 0) n_dc++;
  end

  initial begin : fh_side
    real r1, i1, er, ei;
    int m = 0, n1 = 0, n2 = 0, cyc = 0, hop_cnt = 0, nhops = 0, nload = 0, nidle = 0;
    int last_t2 = -1, cur_sym = 0, nbig = 0;
    bit act = 0;
    logic [15:0] pn [L];
    t1 = new(M1, K);
    t2 = new(N2, K);
    di = new(MU);
    dq = new(MU);
    pn[0] = 16'hACE1;
    pn[1] = 16'hACE1 + 16'h1F35;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (m < NOUT) begin
      @(negedge clk);
      cyc++;
      if (fh_y_valid) begin
        t2.out(m, er, ei);
        er = di.step(rsat(er));
        ei = dq.step(rsat(ei));
        checks++;
        if (rabs(real'(fh_y_i) - er) > 10.0 || rabs(real'(fh_y_q) - ei) > 10.0) begin
          failures++;
          if (failures < 10) $display("m=%0d got %0d,%0d exp %f,%f", m, fh_y_i, fh_y_q, er, ei);
        end
        if (rabs(real'(fh_y_i)) > 1000.0) nbig++;
        m++;
      end
      // inputs for this clock
      sym_valid = ($urandom_range(0, 5) != 0);
      sym = 3'($urandom);
      hop_en = (n2 < 200) ? 2'b11 : (n2 < 280) ? 2'b01 : (n2 < 330) ? 2'b10 : 2'b11;
      pn_load = (n2 == 150 || n2 == 300) && !dut.u_fh.take2 && (cyc % 16 == 8);
      pn_seed = {16'($urandom), 16'($urandom)};
      #1;
      if (dut.u_fh.take1) begin
        if (sym_ready) begin
          act = sym_valid;
          cur_sym = int'(sym);
          if (sym_valid) tones[cur_sym] = 1;
          if (!sym_valid) nidle++;
        end
        t1.push(act ? real'(AMP) : 0.0, 0.0, cur_sym, 0, 1'b1, 1'b0);
        n1++;
      end
      if (dut.u_fh.take2) begin
        if (hop_en == 2'b11) n_dual++; else n_single++;
        checks++;
        if (last_t2 >= 0 && cyc - last_t2 != N2 / 2) failures++;
        last_t2 = cyc;
        // tier-1 output m1 = n2 - 5 is what tier 2 reads now
        if (n2 >= 5) t1.out(n2 - 5, r1, i1);
        else begin r1 = 0; i1 = 0; end
        t2.push(rsat(r1), rsat(i1), int'(pn[0][4:0]), int'(pn[1][4:0]), hop_en[0], hop_en[1]);
        checks++;
        if (hop_ch != {pn[1][4:0], pn[0][4:0]}) failures++;
        hop_cnt++;
        checks++;
        if (hop_strobe != (hop_cnt == HOP_LEN)) failures++;
        if (hop_cnt == HOP_LEN) begin
          hop_cnt = 0;
          nhops++;
          for (int l = 0; l < L; l++) pn[l] = nxt(pn[l]);
        end
        n2++;
      end
      if (pn_load) begin
        for (int l = 0; l < L; l++) pn[l] = (pn_seed[16*l +: 16] == 0) ? 16'h1 : pn_seed[16*l +: 16];
        hop_cnt = 0;
        nload++;
      end
    end
    checks++;
    if (n1 * (M1 / 2) > n2 + 4 || n1 * (M1 / 2) < n2 - 4) failures++;
    checks++;
    if (nhops < 10 || nload != 2 || nidle == 0 || nbig < NOUT / 10) begin
      failures++;
      $display("hops %0d loads %0d idle %0d large outputs %0d", nhops, nload, nidle, nbig);
    end
    n_sym += n1; n_idle += nidle; n_hop += nhops; n_load += nload;
    fh_done = 1;
  end

  initial begin : demo_side
    real er, ei, g;
    int prev_ch = 0, ntake = 0, m = 0, ph = 0, last_take = -1, cyc = 0, gaps = 0;
    logic [31:0] lf = 32'h1;
    cm = new(M, K);
    ddi = new(MU);
    ddq = new(MU);
    g = 0;                                    // source register after reset
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (m < 3000) begin
      @(negedge clk);
      cyc++;
      if (demo_y_valid) begin
        cm.out(m, er, ei);
        er = ddi.step(rsat(er));
        ei = ddq.step(rsat(ei));
        checks++;
        if (rabs(real'(demo_y_i) - er) > 6.0 || rabs(real'(demo_y_q) - ei) > 6.0) begin
          failures++;
          if (failures < 10) $display("m=%0d got %0d,%0d exp %f,%f", m, demo_y_i, demo_y_q, er, ei);
        end
        m++;
      end else if (m > 0) gaps++;
      // schedule: hop and source changes between takes
      demo_ch = (ntake < 100) ? 4'd0 : (ntake < 200) ? 4'd5 : (ntake < 300) ? 4'd15 : 4'd3;
      demo_src_sel = (ntake >= 250);
      #1;
      if (dut.u_demo.take) begin
        checks++;
        if (last_take >= 0 && cyc - last_take != P) failures++;
        last_take = cyc;
        cm.push(g, 0.0, int'(demo_ch), 0, 1'b1, 1'b0);
        if (demo_src_sel) n_noise++; else n_sine++;
        if (int'(demo_ch) != prev_ch) begin n_manual_hop++; prev_ch = int'(demo_ch); end
        // source advances with the select in force at this take
        for (int i = 0; i < 16; i++) lf = lf[0] ? ((lf >> 1) ^ 32'h8020_0003) : (lf >> 1);
        g = demo_src_sel ? real'($signed(lf[15:0]) >>> 2) : $floor(16384.0 * $sin(2.0 * PI * ph / 256.0) + 0.5);
        ph = (ph + STEP) % 256;
        ntake++;
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("output gaps %0d", gaps); end
    demo_done = 1;
  end

  initial begin : finish
    int ntones;
    wait (fh_done && demo_done);
    ntones = 0;
    foreach (tones[i]) ntones += int'(tones[i]);
    $display("tones %0d symbols %0d idle %0d hops %0d pn_reloads %0d dual %0d single %0d flips %0d dc %0d manual_hops %0d sine %0d noise %0d",
             ntones, n_sym, n_idle, n_hop, n_load, n_dual, n_single, n_flip, n_dc, n_manual_hop, n_sine, n_noise);
    checks++; if (ntones != 8) failures++;
    checks++; if (n_idle == 0) failures++;
    checks++; if (n_hop == 0) failures++;
    checks++; if (n_load == 0) failures++;
    checks++; if (n_dual == 0) failures++;
    checks++; if (n_single == 0) failures++;
    checks++; if (n_flip == 0) failures++;
    checks++; if (n_dc == 0) failures++;
    checks++; if (n_manual_hop < 3) failures++;
    checks++; if (n_sine == 0) failures++;
    checks++; if (n_noise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
