// tb_step_size: for iterations k = 0..40 and a few large k, lambda and mu
// must equal floor(A * 2^8 / (B + k * 2^8)) with the default constants
// (A = 1/500, B = 2 and A = 1/2000, B = 2.5), must decrease with k, and the
// result must be ready 42 cycles after start.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_step_size;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [15:0] k;
  logic [31:0] lambda, mu, prev_l;
  int checks = 0, failures = 0;

  step_size dut (.*);

  initial begin
    start = 0; k = 0; prev_l = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 45; i++) begin
      longint el, em;
      int cyc;
      k = (i < 41) ? 16'(i) : 16'(1000 * i);
      el = (longint'(33554) << 8) / (512 + (longint'(k) << 8));
      em = (longint'(8389) << 8) / (640 + (longint'(k) << 8));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (longint'(lambda) != el || longint'(mu) != em) begin
        failures++; $display("FAIL k=%0d lambda %0d/%0d mu %0d/%0d", k, lambda, el, mu, em);
      end
      checks++;
      if (lambda > prev_l) begin failures++; $display("FAIL not diminishing"); end
      prev_l = lambda;
      checks++;
      if (cyc != 42) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
