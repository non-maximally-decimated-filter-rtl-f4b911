// tb_hop_spectrum - spectrum of the 16-path engine fed with white noise and
// hopped by hand to channels 0, 5 and 15, at the engine's default size.
//
// For each channel the test waits for the filter and the DC canceller to
// settle, takes 2048
// output samples, and evaluates a Hann-windowed DFT on 256 frequencies. The
// noise must come out as one channel-shaped band centred on k/16 of the output
// rate: the mean power within 0.75/16 of the centre must exceed the mean power
// more than 2/16 away from it by over 50 dB, and the strongest bin must lie
// within 1/16 of the centre.
module tb_hop_spectrum;
  import nmdfb_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 16, NS = 2048, NB = 256;
  // after a hop: the filter settles in 128 outputs, the DC canceller's estimate
  // from the previous channel decays with a time constant of 1024 outputs
  localparam int SETTLE = 10000;

  logic clk = 0, rst = 1, ce = 1, src_sel = 1, y_valid;
  logic [3:0] ch = '0;
  sample_t y_i, y_q;
  int checks = 0, failures = 0;

  up_2_to_16 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real yr [NS], yi [NS];

  // circular distance between two normalised frequencies
  function automatic real fdist(real a, real b);
    real d = a - b;
    d = d - $floor(d);
    return d > 0.5 ? 1.0 - d : d;
  endfunction

  initial begin
    int chans [3] = '{0, 5, 15};
    real w, pr, pi_, p, pin, pout, pmax, fmax, f;
    int nin, nout, cnt;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (chans[c]) begin
      ch = 4'(chans[c]);
      cnt = 0;
      while (cnt < SETTLE + NS) begin
        @(negedge clk);
        if (y_valid) begin
          if (cnt >= SETTLE) begin
            yr[cnt - SETTLE] = real'(y_i);
            yi[cnt - SETTLE] = real'(y_q);
          end
          cnt++;
        end
      end
      pin = 0; pout = 0; nin = 0; nout = 0; pmax = 0; fmax = 0;
      for (int b = 0; b < NB; b++) begin
        f = real'(b) / NB;
        pr = 0; pi_ = 0;
        for (int m = 0; m < NS; m++) begin
          w = 0.5 - 0.5 * $cos(2.0 * PI * m / NS);
          // Y(f) = sum y(m) exp(-j 2 pi f m)
          pr += w * (yr[m] * $cos(2.0 * PI * f * m) + yi[m] * $sin(2.0 * PI * f * m));
          pi_ += w * (yi[m] * $cos(2.0 * PI * f * m) - yr[m] * $sin(2.0 * PI * f * m));
        end
        p = pr * pr + pi_ * pi_;
        if (p > pmax) begin pmax = p; fmax = f; end
        if (fdist(f, real'(chans[c]) / M) < 0.75 / M) begin pin += p; nin++; end
        else if (fdist(f, real'(chans[c]) / M) > 2.0 / M) begin pout += p; nout++; end
      end
      pin = pin / nin;
      pout = pout / nout + 1.0e-3;
      $display("channel %0d: in-band/out-of-band %0.1f dB, peak at %0.4f", chans[c],
               10.0 * $log10(pin / pout), fmax);
      checks++;
      if (pin / pout < 1.0e5) failures++;
      checks++;
      if (fdist(fmax, real'(chans[c]) / M) > 1.0 / M) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
