// tb_rr_arbiter: 6 requesters with random request patterns (held until
// accepted) and random accept. Checks that a grant goes only to a requester,
// that an unaccepted grant is held, that with all requesting the grants
// rotate in order, and that no requester waits more than N accepts.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_rr_arbiter;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req;
  logic accept, gnt_valid;
  logic [2:0] gnt_idx;
  int checks = 0, failures = 0;
  int wait_acc [N];
  logic held; logic [2:0] held_idx;
  logic sv; logic [2:0] si;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    req = '0; accept = 0; held = 0; held_idx = 0;
    for (int i = 0; i < N; i++) wait_acc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (!req[i]) req[i] = (n >= 3000) ? 1'b1 : ($urandom_range(3, 0) == 0);
      accept = (n >= 3000) ? 1'b1 : ($urandom_range(1, 0) == 1);
      #1;
      if (req != '0) begin
        checks++;
        if (!gnt_valid || !req[gnt_idx]) begin failures++; $display("FAIL grant to non-requester"); end
        if (held) begin
          checks++;
          if (gnt_idx != held_idx) begin failures++; $display("FAIL grant not held"); end
        end
      end
      if (n > 3001) begin
        checks++;   // all requesting, always accepted: strict rotation
        if (gnt_idx != 3'((int'(held_idx) + 1) % N)) begin failures++; $display("FAIL rotation %0d after %0d req %b last %0d hold %b", gnt_idx, held_idx, req, dut.last, dut.hold); end
      end
      sv = gnt_valid; si = gnt_idx;
      @(posedge clk);
      #1;
      if (sv) begin
        held = !accept; held_idx = si;
        if (accept) begin
          for (int i = 0; i < N; i++) if (req[i] && i != int'(si)) wait_acc[i]++;
          wait_acc[si] = 0;
          req[si] = 1'b0;
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (wait_acc[i] > N) begin failures++; $display("FAIL starvation %0d", i); end
        end
      end
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
