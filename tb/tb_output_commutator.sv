// tb_output_commutator - feeds random path-output pairs (a, b) phase by phase
// and checks y = round(a_p(n) + b_p(n-1)) / 2^17 with saturation, i.e. the
// overlap of the upper paths of one input with the lower paths of the next.
module tb_output_commutator;
  import nmdfb_pkg::*;
  localparam int M = 16, P = M / 2, AW = 48;
  logic clk = 0, rst = 1, en = 0;
  logic [$clog2(P)-1:0] phase;
  logic signed [AW-1:0] a, b;
  sample_t y;
  logic y_valid;
  int checks = 0, failures = 0, nsat = 0;
  longint bprev [P];

  output_commutator #(.M(M), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint s, e;
    for (int p = 0; p < P; p++) bprev[p] = 0;
    a = '0; b = '0; phase = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 100; n++) begin
      for (int p = 0; p < P; p++) begin
        @(negedge clk);
        phase = p[$clog2(P)-1:0];
        a = AW'(longint'($signed($urandom)) * ((n % 10 == 9) ? 8 : 1) / 2);
        b = AW'(longint'($signed($urandom)) / 2);
        en = 1;
        s = longint'(a) + bprev[p];
        e = s / 131072;                              // toward zero
        if (s - e * 131072 < 0) e = e - 1;           // floor
        if (s - e * 131072 >= 65536) e = e + 1;      // round half up
        if (e > 32767) begin e = 32767; nsat++; end
        if (e < -32768) begin e = -32768; nsat++; end
        bprev[p] = longint'(b);
        @(negedge clk);
        en = 0;
        checks++;
        if (!y_valid || longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d p=%0d got %0d exp %0d", n, p, y, e);
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;   // saturation must have been exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
