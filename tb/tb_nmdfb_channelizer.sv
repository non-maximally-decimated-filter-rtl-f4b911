// tb_nmdfb_channelizer - self-checking test of the complex NMDFB up-converter.
//
// Drives random complex input samples (and, in a second run, a hop to another
// channel) and compares every output with a direct-form reference computed in
// floating point: up-sample by M/2, filter with the prototype h and mix with
// exp(j*2*pi*k*m/M), summed over the enabled selectors. The reference uses only
// the prototype coefficients, not the polyphase structure. Also checks the
// rate (one input taken every M/2 enables, one output per enable) and the
// 4-enable latency. Runs with two selectors on channels chosen per phase.
module tb_nmdfb_channelizer;
  import nmdfb_pkg::*;
  localparam int M = 16, K = 8, L = 2, P = M / 2, NT = M * K, CHW = $clog2(M);
  localparam int NIN = 48;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, ce = 0;
  logic in_take, y_valid;
  sample_t x_i, x_q, y_i, y_q;
  logic [L*CHW-1:0] ch;
  logic [L-1:0] ch_en;
  int checks = 0, failures = 0;

  nmdfb_channelizer #(.M(M), .K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [NIN], xq [NIN];
  real hr [NT];
  int cyc = 0, take_cyc [NIN], ntake = 0, first_out = -1, nout = 0;

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  // expected output m (both selectors' channels fixed over the test segment)
  function automatic void expect_out(int m, int k0, int k1, logic [1:0] en, output real er, output real ei);
    real ar = 0, ai = 0, c, s;
    for (int n = 0; n < NIN; n++) begin
      int j = m - n * P;
      if (j >= 0 && j < NT) begin
        ar += xr[n] * hr[j];
        ai += xq[n] * hr[j];
      end
    end
    er = 0; ei = 0;
    for (int l = 0; l < 2; l++) begin
      int k = (l == 0) ? k0 : k1;
      if (en[l]) begin
        c = $cos(2.0 * PI * k * m / M);
        s = $sin(2.0 * PI * k * m / M);
        er += ar * c - ai * s;
        ei += ar * s + ai * c;
      end
    end
  endfunction

  task automatic run(int k0, int k1, logic [1:0] en, int ce_div);
    real er, ei;
    int m;
    rst = 1; ntake = 0; nout = 0; first_out = -1; cyc = 0;
    ch = {CHW'(k1), CHW'(k0)}; ch_en = en;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    m = 0;
    while (nout < NIN * P - NT) begin
      @(negedge clk);
      // registered outputs of the previous edges
      if (y_valid) begin
        if (first_out < 0) begin
          first_out = cyc;
          checks++;
          // the first output is registered on the 4th enable after the take
          if (first_out != take_cyc[0] + 4 * ce_div) begin
            failures++;
            $display("latency: take at %0d first output at %0d", take_cyc[0], first_out);
          end
        end
        expect_out(m, k0, k1, en, er, ei);
        checks++;
        if (rabs(real'(y_i) - er) > 3.0 || rabs(real'(y_q) - ei) > 3.0) begin
          failures++;
          if (failures < 10) $display("m=%0d k=%0d/%0d got %0d,%0d exp %f,%f", m, k0, k1, y_i, y_q, er, ei);
        end
        m++;
        nout++;
      end
      cyc++;
      ce = (cyc % ce_div) == 0;
      if (ntake < NIN) begin x_i = sample_t'($rtoi(xr[ntake])); x_q = sample_t'($rtoi(xq[ntake])); end
      else begin x_i = '0; x_q = '0; end
      #1;
      if (in_take) begin
        if (ntake < NIN) take_cyc[ntake] = cyc;
        ntake++;
      end
    end
    // rate: takes exactly M/2 enables apart
    checks++;
    if (take_cyc[1] - take_cyc[0] != P * ce_div || take_cyc[5] - take_cyc[4] != P * ce_div) begin
      failures++;
      $display("rate: takes at %0d %0d", take_cyc[0], take_cyc[1]);
    end
    ce = 0;
  endtask

  initial begin
    for (int j = 0; j < NT; j++) hr[j] = real'(proto_coef(j, M, K)) / 131072.0;
    for (int n = 0; n < NIN; n++) begin
      xr[n] = real'($signed($urandom_range(0, 40000)) - 20000);
      xq[n] = real'($signed($urandom_range(0, 40000)) - 20000);
    end
    x_i = '0; x_q = '0; ch = '0; ch_en = '0;
    run(0, 0, 2'b01, 1);
    run(5, 0, 2'b01, 1);
    run(15, 3, 2'b01, 2);
    for (int n = 0; n < NIN; n++) begin xr[n] = xr[n] / 2; xq[n] = xq[n] / 2; end
    run(7, 12, 2'b11, 1);
    run(1, 9, 2'b10, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
