// tb_proto_response - impulse and frequency response of the 32-path hopping
// channelizer (the second tier of the modulator: N = 32 paths, K = 8 taps per
// path).
//
// A single impulse of amplitude 30000 is fed to the in-phase input and the
// M*K outputs it produces are captured. For the channel k selected, the
// response must be the low-pass prototype shifted to k/M of the output rate:
//   y(m) = 30000 * h(m) * exp(j*2*pi*k*m/M).
// The reference h is computed here in floating point from the prototype's
// formula (a 4-term Blackman-Harris windowed sinc, cut-off at half the input
// rate), independently of the elaboration-time tables of the RTL; every
// sample must agree within 2 LSB. The response's spectrum is then evaluated
// on 2048 frequencies around the circle and checked against the
// specification of the hopping filter bank:
//   - pass band (within 0.5/M of the centre): flat to 0.1 dB;
//   - band edge (1/M from the centre, the half-way point to the overlapping
//     neighbour channel): -6 dB +/- 0.5 dB;
//   - stop band (more than 1.5/M from the centre): below -80 dB.
// Two channels are run, 0 and 11.
module tb_proto_response;
  import nmdfb_pkg::*;
  localparam int M = 32, K = 8, P = M / 2, NT = M * K, NF = 2048;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 30000.0;

  logic clk = 0, rst = 1, ce = 1;
  logic in_take, y_valid;
  sample_t x_i, x_q, y_i, y_q;
  logic [$clog2(M)-1:0] ch;
  logic [0:0] ch_en = 1'b1;
  int checks = 0, failures = 0;

  nmdfb_channelizer #(.M(M), .K(K), .L(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real href [NT];
  real yr [NT], yi [NT];

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  // circular distance between two normalised frequencies
  function automatic real fdist(real a, real b);
    real d = a - b;
    d = d - $floor(d);
    return d > 0.5 ? 1.0 - d : d;
  endfunction

  task automatic run(int k);
    int nout, ntake;
    real c, s, er, ei, pr, pi_, a, a0, amin, amax, aedge, astop, f, d;
    rst = 1;
    ch = ($clog2(M))'(k);
    x_i = '0; x_q = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    nout = 0; ntake = 0;
    while (nout < NT) begin
      @(negedge clk);
      if (y_valid) begin
        yr[nout] = real'(y_i);
        yi[nout] = real'(y_q);
        nout++;
      end
      // the impulse is the first input taken, all later inputs are zero
      x_i = (ntake == 0) ? sample_t'(16'sd30000) : '0;
      #1;
      if (in_take) ntake++;
    end

    // time domain against the reference
    for (int m = 0; m < NT; m++) begin
      c = $cos(2.0 * PI * k * m / M);
      s = $sin(2.0 * PI * k * m / M);
      er = AMP * href[m] * c;
      ei = AMP * href[m] * s;
      checks++;
      if (rabs(yr[m] - er) > 2.0 || rabs(yi[m] - ei) > 2.0) begin
        failures++;
        if (failures < 10) $display("k=%0d m=%0d got %0.0f,%0.0f exp %0.2f,%0.2f", k, m, yr[m], yi[m], er, ei);
      end
    end

    // frequency domain, relative to the gain at the channel centre
    a0 = 0; amin = 1.0e30; amax = 0; aedge = 0; astop = 0;
    for (int b = 0; b < NF; b++) begin
      f = real'(b) / NF;
      pr = 0; pi_ = 0;
      for (int m = 0; m < NT; m++) begin
        c = $cos(2.0 * PI * f * m);
        s = $sin(2.0 * PI * f * m);
        pr += yr[m] * c + yi[m] * s;
        pi_ += yi[m] * c - yr[m] * s;
      end
      a = $sqrt(pr * pr + pi_ * pi_);
      d = fdist(f, real'(k) / M);
      if (d < 0.5 / NF) a0 = a;
      if (d <= 0.5 / M) begin
        if (a < amin) amin = a;
        if (a > amax) amax = a;
      end
      if (rabs(d - 1.0 / M) < 0.5 / NF) aedge = a;
      if (d > 1.5 / M && a > astop) astop = a;
    end
    $display("channel %0d: pass band %0.3f..%0.3f dB, band edge %0.2f dB, stop band %0.1f dB",
             k, 20.0 * $log10(amin / a0), 20.0 * $log10(amax / a0),
             20.0 * $log10(aedge / a0), 20.0 * $log10(astop / a0));
    checks++;
    if (20.0 * $log10(amin / a0) < -0.1 || 20.0 * $log10(amax / a0) > 0.1) failures++;
    checks++;
    if (rabs(20.0 * $log10(aedge / a0) + 6.0) > 0.5) failures++;
    checks++;
    if (20.0 * $log10(astop / a0) > -80.0) failures++;
    // DC gain of the prototype: M/2, so the 1:M/2 interpolator keeps unit gain
    checks++;
    if (rabs(a0 / (AMP * P) - 1.0) > 0.01) begin
      failures++;
      $display("gain %f", a0 / AMP);
    end
  endtask

  initial begin
    real t;
    for (int j = 0; j < NT; j++) begin
      t = real'(j) - real'(NT - 1) / 2.0;
      href[j] = $sin(2.0 * PI * t / M) / (2.0 * PI * t / M)
                * (0.35875 + 0.48829 * $cos(2.0 * PI * t / NT) + 0.14128 * $cos(4.0 * PI * t / NT)
                   + 0.01168 * $cos(6.0 * PI * t / NT));
    end
    run(0);
    run(11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
