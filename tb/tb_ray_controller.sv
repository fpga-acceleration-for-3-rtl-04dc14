// tb_ray_controller: 4 PE stand-ins (random readiness, busy for a random
// time after a beam) and a descriptor memory that returns g = address.
// With 10 channels x 3 rows in blocks of 4 x 2, the beams must be dispatched
// exactly in the blocked order computed here, each once, only to ready PEs,
// spread over all PEs, and done must come only after all PEs are idle.
// Two source positions are run.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_ray_controller;
  import ct_pkg::*;
  localparam int N_PE = 4, C = 10, W = 3, C_B = 4, W_B = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done, active, desc_req_valid, desc_req_ready, desc_rsp_valid;
  logic [31:0] desc_req_addr, dispatched;
  beam_t desc_rsp_beam, pe_beam;
  logic [N_PE-1:0] pe_valid, pe_ready, pe_busy;
  int checks = 0, failures = 0;
  int busy_cnt [N_PE];
  int per_pe [N_PE];
  int exp_order[$];
  int ndisp = 0;

  ray_controller #(.N_PE(N_PE), .C(C), .W(W), .C_B(C_B), .W_B(W_B)) dut (.*);

  // descriptor memory: 2-cycle latency
  logic [31:0] pend_addr; int pend_t = 0;
  always @(posedge clk) begin
    desc_rsp_valid <= 1'b0;
    if (pend_t > 0) begin
      pend_t--;
      if (pend_t == 0) begin
        desc_rsp_valid <= 1'b1;
        desc_rsp_beam  <= '{default: 0, g: 32'(pend_addr)};
      end
    end
    if (desc_req_valid && desc_req_ready) begin pend_addr = desc_req_addr; pend_t = 2; end
    desc_req_ready <= 1'($urandom);
  end

  // PE stand-ins
  always @(posedge clk) begin
    for (int i = 0; i < N_PE; i++) begin
      if (pe_valid[i]) begin
        checks++;
        if (!pe_ready[i]) begin failures++; $display("FAIL dispatch to busy PE"); end
        else begin
          int e;
          e = exp_order.pop_front();
          checks++;
          if (int'(pe_beam.g) != e) begin failures++; $display("FAIL order: got %0d exp %0d", pe_beam.g, e); end
          busy_cnt[i] = $urandom_range(30, 5);
          per_pe[i]++;
          ndisp++;
        end
      end
      if (busy_cnt[i] > 0) busy_cnt[i]--;
    end
    for (int i = 0; i < N_PE; i++) begin
      pe_busy[i]  <= (busy_cnt[i] > 0);
      pe_ready[i] <= (busy_cnt[i] == 0) && ($urandom_range(3, 0) != 0);
    end
    if (done) begin
      checks++;
      if (pe_busy != '0) begin failures++; $display("FAIL early done busy=%b left=%0d t=%0t", pe_busy, exp_order.size(), $time); end
    end
  end

  initial begin
    start = 0; pe_busy = '0; pe_ready = '0; desc_req_ready = 0; desc_rsp_valid = 0;
    for (int i = 0; i < N_PE; i++) begin busy_cnt[i] = 0; per_pe[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int csp = 0; csp < 2; csp++) begin
      for (int cb = 0; cb < (C + C_B - 1) / C_B; cb++)
        for (int wb = 0; wb < (W + W_B - 1) / W_B; wb++)
          for (int c = cb * C_B; c < cb * C_B + C_B && c < C; c++)
            for (int w = wb * W_B; w < wb * W_B + W_B && w < W; w++)
              exp_order.push_back(w * C + c);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(posedge clk);
      checks++;
      if (exp_order.size() != 0) begin failures++; $display("FAIL %0d beams left", exp_order.size()); end
    end
    checks++; if (ndisp != 2 * C * W || dispatched != 32'(2 * C * W)) begin failures++; $display("FAIL count %0d", ndisp); end
    for (int i = 0; i < N_PE; i++) begin
      checks++;
      if (per_pe[i] < 5) begin failures++; $display("FAIL PE %0d got %0d beams", i, per_pe[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
