// tb_forward_projector: random beams (1..300 voxels, random f, w and g) are
// streamed in at full rate; the residual must equal sum(f*w) - g computed
// here in wide integer arithmetic, the input must be taken one voxel per
// cycle and the residual must appear LATENCY + 2 cycles after the last voxel.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_forward_projector;
  import ct_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_last, g_valid, g_ready, out_valid, out_ready;
  f_t in_f; w_t in_w; logic signed [31:0] g, out_r;
  int checks = 0, failures = 0;

  forward_projector #(.LATENCY(LAT)) dut (.*);

  initial begin
    in_valid = 0; g_valid = 0; out_ready = 1; in_f = 0; in_w = 0; in_last = 0; g = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      int n, stalls, lat;
      longint acc, expr;
      n = (b == 0) ? 1 : $urandom_range(300, 1);
      acc = 0; stalls = 0;
      g = $signed($urandom_range(2000000, 0)) - 1000000;
      g_valid = 1;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1;
        in_f = F_W'($urandom);
        in_w = W_W'($urandom_range(28000, 0));
        in_last = (k == n - 1);
        acc += longint'(in_f) * longint'(in_w);
        @(posedge clk);
        while (!in_ready) begin stalls++; @(posedge clk); end
      end
      @(negedge clk); in_valid = 0; in_last = 0;
      checks++;
      if (stalls != 0) begin failures++; $display("FAIL beam %0d: %0d stall cycles", b, stalls); end
      lat = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      expr = (acc >>> 10) - longint'(g);
      checks++;
      if (longint'(out_r) != expr) begin
        failures++; $display("FAIL beam %0d r=%0d expected %0d", b, out_r, expr);
      end
      checks++;
      if (lat + 1 != LAT + 2) begin
        failures++; $display("FAIL beam %0d latency %0d", b, lat + 1);
      end
      @(posedge clk); #1 g_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
