// tb_pn_sequence_generator - steps the generator and compares each channel
// index with an independent model of x^16+x^14+x^13+x^11+1; reloads the seed
// on the fly (including the forbidden zero seed), holds when not stepped, and
// checks that one full period of 65535 steps returns to the start state and
// that every one of the 32 channels is visited.
module tb_pn_sequence_generator;
  localparam int CH_W = 5;
  logic clk = 0, rst = 1, step = 0, load = 0;
  logic [15:0] seed = '0;
  logic [CH_W-1:0] ch;
  int checks = 0, failures = 0;

  pn_sequence_generator #(.CH_W(CH_W), .SEED(16'hACE1)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] nxt(logic [15:0] s);
    // x^16 + x^14 + x^13 + x^11 + 1, shifting left, feedback from taps 16,14,13,11
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  initial begin
    logic [15:0] m = 16'hACE1;
    bit seen [32];
    int per = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      step = $urandom_range(0, 1);
      load = (n % 700 == 699);
      seed = (n == 1399) ? 16'h0000 : 16'($urandom);
      @(negedge clk);
      if (load) m = (seed == 0) ? 16'h1 : seed;
      else if (step) m = nxt(m);
      step = 0; load = 0;
      checks++;
      if (ch != m[CH_W-1:0]) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d exp %0d", n, ch, m[CH_W-1:0]);
      end
      seen[ch] = 1;
    end
    foreach (seen[i]) begin checks++; if (!seen[i]) failures++; end
    // period
    @(negedge clk);
    seed = 16'h1234; load = 1;
    @(negedge clk);
    load = 0; step = 1;
    m = 16'h1234;
    do begin
      @(negedge clk);
      m = nxt(m);
      per++;
    end while (m != 16'h1234 && per < 70000);
    step = 0;
    checks++;
    if (per != 65535 || dut.s != 16'h1234) begin
      failures++;
      $display("period %0d", per);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
