// tb_up_2_to_16 - the 16-path engine end to end at its default size.
//
// Runs the sinewave source on channel 0, hops to channels 5 and 15 while
// running, then switches to white noise and hops again. Every output is
// compared (tolerance 6 LSB) with the direct-form reference fed by an
// independent model of the source, followed by a model of the DC canceller.
// Also checks that one output arrives per clock and one input is taken every
// 8 clocks.
module tb_up_2_to_16;
  import nmdfb_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 16, K = 8, P = M / 2, MU = 10, STEP = 5;

  logic clk = 0, rst = 1, ce = 1, src_sel = 0, y_valid;
  logic [3:0] ch = '0;
  sample_t y_i, y_q;
  int checks = 0, failures = 0;

  up_2_to_16 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  chan_model cm;
  dc_model di, dq;

  initial begin
    real er, ei, g;
    int ntake = 0, m = 0, ph = 0, last_take = -1, cyc = 0, gaps = 0;
    logic [31:0] lf = 32'h1;
    cm = new(M, K);
    di = new(MU);
    dq = new(MU);
    g = 0;                                    // source register after reset
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (m < 3000) begin
      @(negedge clk);
      cyc++;
      if (y_valid) begin
        cm.out(m, er, ei);
        er = di.step(rsat(er));
        ei = dq.step(rsat(ei));
        checks++;
        if (rabs(real'(y_i) - er) > 6.0 || rabs(real'(y_q) - ei) > 6.0) begin
          failures++;
          if (failures < 10) $display("m=%0d got %0d,%0d exp %f,%f", m, y_i, y_q, er, ei);
        end
        m++;
      end else if (m > 0) gaps++;
      // schedule: hop and source changes between takes
      ch      = (ntake < 100) ? 4'd0 : (ntake < 200) ? 4'd5 : (ntake < 300) ? 4'd15 : 4'd3;
      src_sel = (ntake >= 250);
      #1;
      if (dut.take) begin
        checks++;
        if (last_take >= 0 && cyc - last_take != P) failures++;
        last_take = cyc;
        cm.push(g, 0.0, int'(ch), 0, 1'b1, 1'b0);
        // source advances with the select in force at this take
        for (int i = 0; i < 16; i++) lf = lf[0] ? ((lf >> 1) ^ 32'h8020_0003) : (lf >> 1);
        g = src_sel ? real'($signed(lf[15:0]) >>> 2) : $floor(16384.0 * $sin(2.0 * PI * ph / 256.0) + 0.5);
        ph = (ph + STEP) % 256;
        ntake++;
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("output gaps %0d", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
