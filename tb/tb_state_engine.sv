// tb_state_engine - checks the phase counter, the take strobe (one per M/2
// enables, on phase 0) and the alternating circular-buffer state against a
// counting model, with a random clock enable.
module tb_state_engine;
  localparam int M = 16, P = M / 2;
  logic clk = 0, rst = 1, ce = 0, take, flip;
  logic [$clog2(P)-1:0] phase;
  int checks = 0, failures = 0, ntake = 0, nce = 0, last_take_ce = -1;
  int mph = 0, mflip = 0;

  state_engine #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      ce = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (phase != mph[$clog2(P)-1:0] || take != (ce && mph == 0) || flip != mflip[0]) begin
        failures++;
        if (failures < 10) $display("c=%0d phase %0d/%0d take %0d flip %0d/%0d", c, phase, mph, take, flip, mflip);
      end
      if (take) begin
        if (last_take_ce >= 0) begin
          checks++;
          if (nce - last_take_ce != P) failures++;
        end
        last_take_ce = nce;
        ntake++;
      end
      if (ce) begin
        if (mph == 0) mflip ^= 1;
        mph = (mph + 1) % P;
        nce++;
      end
    end
    checks++;
    if (ntake < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
