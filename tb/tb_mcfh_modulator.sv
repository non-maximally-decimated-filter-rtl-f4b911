// tb_mcfh_modulator - the two-tier FSK + frequency-hopping modulator at its
// default size (8-path FSK tier, 32-path hopper, two selectors).
//
// Sends random 8-FSK symbols with idle gaps, reloads the PN generators while
// running and switches the selector enables between one and two carriers.
// The expected output is built from independent models: the symbol schedule,
// the PN generators, the tier-1 direct-form channelizer, whose output (delayed
// by the 5 tier-1 enables from its output register to the tier-2 take) feeds
// the tier-2 direct-form channelizer, and the DC canceller. Tolerance 10 LSB
// (tier-1 rounding passes through tier 2). Also checks the rates: a tier-2
// take every 16 clocks, a tier-1 take every 4 tier-2 takes, a hop every
// HOP_LEN tier-2 takes.
module tb_mcfh_modulator;
  import nmdfb_pkg::*;
  import tb_ref_pkg::*;
  localparam int M1 = 8, N2 = 32, L = 2, K = 8, SYM_LEN = 4, HOP_LEN = 16, AMP = 8192, MU = 10;
  localparam int NOUT = 6000;

  logic clk = 0, rst = 1, ce = 1, sym_valid = 0, sym_ready, pn_load = 0, hop_strobe, y_valid;
  logic [2:0] sym = '0;
  logic [16*L-1:0] pn_seed = '0;
  logic [L-1:0] hop_en = 2'b11;
  logic [L*5-1:0] hop_ch;
  sample_t y_i, y_q;
  int checks = 0, failures = 0;

  mcfh_modulator dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  chan_model t1, t2;
  dc_model di, dq;

  function automatic logic [15:0] nxt(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  initial begin
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
      if (y_valid) begin
        t2.out(m, er, ei);
        er = di.step(rsat(er));
        ei = dq.step(rsat(ei));
        checks++;
        if (rabs(real'(y_i) - er) > 10.0 || rabs(real'(y_q) - ei) > 10.0) begin
          failures++;
          if (failures < 10) $display("m=%0d got %0d,%0d exp %f,%f", m, y_i, y_q, er, ei);
        end
        if (rabs(real'(y_i)) > 1000.0) nbig++;
        m++;
      end
      // inputs for this clock
      sym_valid = ($urandom_range(0, 5) != 0);
      sym = 3'($urandom);
      hop_en = (n2 < 200) ? 2'b11 : (n2 < 280) ? 2'b01 : (n2 < 330) ? 2'b10 : 2'b11;
      pn_load = (n2 == 150 || n2 == 300) && !dut.take2 && (cyc % 16 == 8);
      pn_seed = {16'($urandom), 16'($urandom)};
      #1;
      if (dut.take1) begin
        if (dut.sym_ready) begin
          act = sym_valid;
          cur_sym = int'(sym);
          if (!sym_valid) nidle++;
        end
        t1.push(act ? real'(AMP) : 0.0, 0.0, cur_sym, 0, 1'b1, 1'b0);
        n1++;
      end
      if (dut.take2) begin
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
