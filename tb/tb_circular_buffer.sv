// tb_circular_buffer - loads random vectors with and without the M/2 shift and
// compares the stored vector with the expected rotation; checks that the
// contents hold while load is low.
module tb_circular_buffer;
  import nmdfb_pkg::*;
  localparam int M = 16;
  logic clk = 0, rst = 1, load = 0, flip = 0;
  sample_t d [M], q [M], e [M];
  int checks = 0, failures = 0;

  circular_buffer #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < M; r++) d[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      load = $urandom_range(0, 1);
      flip = $urandom_range(0, 1);
      for (int r = 0; r < M; r++) d[r] = sample_t'($urandom);
      if (load) for (int r = 0; r < M; r++) e[r] = flip ? d[(r + M / 2) % M] : d[r];
      @(negedge clk);
      load = 0;
      if (t > 0 || load) begin
        for (int r = 0; r < M; r++) begin
          checks++;
          if (q[r] !== e[r]) begin
            failures++;
            if (failures < 10) $display("t=%0d r=%0d got %0d exp %0d", t, r, q[r], e[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
