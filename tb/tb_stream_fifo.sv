// tb_stream_fifo: random push/pop traffic against a queue model; checks
// order, data, count, full (in_ready low at DEPTH words) and that a
// continuous stream passes at one word per cycle.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_stream_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [15:0] q[$];

  stream_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = (n < 2500) ? ($urandom_range(1, 0) == 1) : (n < 2900);
      in_data   = 16'($urandom);
      out_ready = (n < 2500) ? ($urandom_range(2, 0) == 0) : 1'b1;
      checks++;
      if (count != ($clog2(DEPTH)+1)'(q.size())) begin failures++; $display("FAIL count"); end
      if (q.size() == DEPTH) begin
        fulls++;
        checks++;
        if (in_ready) begin failures++; $display("FAIL ready when full"); end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || out_data != q[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
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
