// tb_ct_accel_top: end-to-end run of the accelerator at reduced size
// (4 PEs, 24x24 slices, 12-slice window in a 20-slice volume, 6x6x3 tiles in
// 4x4 slots, 12 channels x 3 rows, blocks of 4 beams). The projection data
// are line integrals of a disc phantom (f = 0.5 within radius 6), computed
// here by clipping each beam against every voxel. Starting from f = 0,
// v = 1, four iterations over the same source position must each dispatch
// and finish every beam, commit as many voxels as the beams cross, and
// reduce the sum of squared residuals. The cache is then flushed, the
// window advanced and one more source position run. Every mechanism must be
// seen at least once: cache miss, dirty-tile eviction, flush, window move,
// dispatch stall with all PEs full, arbitration conflict, two beams in
// flight in one PE, new step size.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_ct_accel_top;
  import ct_pkg::*;
  localparam int N_PE = 4, NX = 24, NY = 24, NZ = 20, L = 12, C = 12, W = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic step_start, step_done, csp_start, csp_done, flush_req, flush_done, win_advance;
  logic [15:0] iter_k, win_z0; logic [7:0] win_advance_by;
  logic desc_req_valid, desc_req_ready, desc_rsp_valid;
  logic [31:0] desc_req_addr; beam_t desc_rsp_beam;
  logic ddr_req_valid, ddr_req_ready, ddr_req_we, ddr_rsp_valid;
  logic [31:0] ddr_req_addr; logic [23:0] ddr_req_wdata, ddr_rsp_rdata;
  logic [31:0] beams_dispatched, beams_done, voxels_committed, cache_misses, cache_evictions;
  int checks = 0, failures = 0;

  ct_accel_top #(.N_PE(N_PE), .NX(NX), .NY(NY), .NZ(NZ), .L(L), .TILE_XY(6), .TILE_Z(3),
                 .SLOTS_XY(4), .C(C), .W(W), .C_B(4), .W_B(1), .MAX_RAY(64)) dut (.*);

  ddr_model #(.RD_LAT(3)) ddr (.clk, .req_valid(ddr_req_valid), .req_ready(ddr_req_ready),
    .req_we(ddr_req_we), .req_addr(ddr_req_addr), .req_wdata(ddr_req_wdata),
    .rsp_valid(ddr_rsp_valid), .rsp_rdata(ddr_rsp_rdata));

  // ---------------- beam geometry and projection data ----------------
  real bs [C*W][3], be [C*W][3], bg [C*W];
  int  bn [C*W];

  function automatic real clip_len(real p0[3], real p1[3], int vx, int vy, int vz);
    real t0, t1, ta, tb2, d, len;
    int v[3];
    v[0] = vx; v[1] = vy; v[2] = vz;
    t0 = 0.0; t1 = 1.0;
    for (int a = 0; a < 3; a++) begin
      d = p1[a] - p0[a];
      if (d == 0.0) begin
        if (p0[a] < v[a] || p0[a] >= v[a] + 1) return 0.0;
      end else begin
        ta = (v[a] - p0[a]) / d; tb2 = (v[a] + 1 - p0[a]) / d;
        if ((ta < tb2 ? ta : tb2) > t0) t0 = (ta < tb2 ? ta : tb2);
        if ((ta < tb2 ? tb2 : ta) < t1) t1 = (ta < tb2 ? tb2 : ta);
      end
    end
    len = 0.0;
    for (int a = 0; a < 3; a++) len += (p1[a]-p0[a])*(p1[a]-p0[a]);
    return (t1 > t0) ? (t1 - t0) * $sqrt(len) : 0.0;
  endfunction

  task automatic make_beams();
    for (int w = 0; w < W; w++) for (int c = 0; c < C; c++) begin
      int i;
      real a1, a2, p0[3], p1[3];
      i = w * C + c;
      a1 = 0.3 + c * 0.45;
      a2 = a1 + 3.14159 - 0.5 + w * 0.35;
      p0[0] = 12.0 + 11.0 * $cos(a1); p0[1] = 12.0 + 11.0 * $sin(a1); p0[2] = 1.3 + w * 3.0;
      p1[0] = 12.0 + 11.0 * $cos(a2); p1[1] = 12.0 + 11.0 * $sin(a2); p1[2] = p0[2] + 1.4;
      for (int a = 0; a < 3; a++) begin
        p0[a] = $floor(p0[a] * 65536.0) / 65536.0; p1[a] = $floor(p1[a] * 65536.0) / 65536.0;
        bs[i][a] = p0[a]; be[i][a] = p1[a];
      end
      bg[i] = 0.0;
      bn[i] = 1 + $rtoi($floor(p1[0]) > $floor(p0[0]) ? $floor(p1[0]) - $floor(p0[0]) : $floor(p0[0]) - $floor(p1[0]))
                + $rtoi($floor(p1[1]) > $floor(p0[1]) ? $floor(p1[1]) - $floor(p0[1]) : $floor(p0[1]) - $floor(p1[1]))
                + $rtoi($floor(p1[2]) - $floor(p0[2]));
      for (int z = 0; z < L; z++) for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++)
        if ((x + 0.5 - 12.0) * (x + 0.5 - 12.0) + (y + 0.5 - 12.0) * (y + 0.5 - 12.0) < 36.0)
          bg[i] += 0.5 * clip_len(p0, p1, x, y, z);
    end
  endtask

  // descriptor memory, 2-cycle latency
  int pend_t = 0; int pend_i;
  always @(posedge clk) begin
    desc_rsp_valid <= 1'b0;
    if (pend_t > 0) begin
      pend_t--;
      if (pend_t == 0) begin
        desc_rsp_valid <= 1'b1;
        desc_rsp_beam.sx <= 32'($rtoi(bs[pend_i][0] * 65536.0));
        desc_rsp_beam.sy <= 32'($rtoi(bs[pend_i][1] * 65536.0));
        desc_rsp_beam.sz <= 32'($rtoi(bs[pend_i][2] * 65536.0));
        desc_rsp_beam.dx <= 32'($rtoi(be[pend_i][0] * 65536.0));
        desc_rsp_beam.dy <= 32'($rtoi(be[pend_i][1] * 65536.0));
        desc_rsp_beam.dz <= 32'($rtoi(be[pend_i][2] * 65536.0));
        desc_rsp_beam.g  <= 32'($rtoi(bg[pend_i] * 65536.0));
      end
    end
    if (desc_req_valid && desc_req_ready) begin pend_i = int'(desc_req_addr); pend_t = 2; end
  end
  assign desc_req_ready = 1'b1;

  // ---------------- mechanism monitors ----------------
  real sumr2 = 0.0;
  int n_stall = 0, n_conflict = 0, n_two = 0, n_flush = 0, n_adv = 0, n_step = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_rc.state == 3'd3 && dut.pe_ready == '0) n_stall++;
    if ($countones(dut.p_rd_valid) > 1) n_conflict++;
    if (flush_done) n_flush++;
    if (win_advance) n_adv++;
    if (step_done) n_step++;
  end
  for (genvar i = 0; i < N_PE; i++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.g_pe[i].u_pe.inflight == 2'd2) n_two++;
    always @(posedge clk)
      if (rst_n && dut.g_pe[i].u_pe.r_valid && dut.g_pe[i].u_pe.r_ready) begin
        real r;
        r = real'($signed(dut.g_pe[i].u_pe.r_data)) / 65536.0;
        sumr2 += r * r;
      end
  end

  task automatic run_csp(input int k, output real r2);
    int b0, v0, exp_vox;
    @(negedge clk); iter_k = 16'(k); step_start = 1;
    @(negedge clk); step_start = 0;
    while (!step_done) @(posedge clk);
    b0 = int'(beams_done); v0 = int'(voxels_committed);
    sumr2 = 0.0;
    @(negedge clk); csp_start = 1;
    @(negedge clk); csp_start = 0;
    while (!csp_done) @(posedge clk);
    repeat (2) @(posedge clk);
    r2 = sumr2;
    exp_vox = 0;
    for (int i = 0; i < C * W; i++) exp_vox += bn[i];
    checks++;
    if (int'(beams_done) - b0 != C * W) begin failures++; $display("FAIL beams done %0d", int'(beams_done) - b0); end
    checks++;
    if (int'(voxels_committed) - v0 != exp_vox) begin
      failures++; $display("FAIL voxels committed %0d expected %0d", int'(voxels_committed) - v0, exp_vox);
    end
    $display("pass k=%0d: sum r^2 = %f, misses %0d, evictions %0d", k, r2, cache_misses, cache_evictions);
  endtask

  initial begin
    real r2 [5];
    step_start = 0; csp_start = 0; flush_req = 0; win_advance = 0; iter_k = 0; win_advance_by = 0;
    desc_rsp_beam = '0; desc_rsp_valid = 0;
    make_beams();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin real t; run_csp(k, t); r2[k] = t; end
    checks++;
    if (!(r2[3] < 0.9 * r2[0])) begin failures++; $display("FAIL residual did not fall: %f -> %f", r2[0], r2[3]); end
    checks++;
    if (!(r2[1] < r2[0] && r2[2] < r2[1])) begin failures++; $display("FAIL residual not monotone"); end
    // flush, check that the image went into DDR inside the disc, then move the window
    @(negedge clk); flush_req = 1;
    do @(negedge clk); while (!flush_done);
    flush_req = 0;
    begin
      int pos = 0, tot = 0;
      for (int z = 1; z < 9; z++) for (int y = 9; y < 15; y++) for (int x = 9; x < 15; x++) begin
        logic [23:0] wd;
        tot++;
        wd = ddr.peek(32'((z * NY + y) * NX + x));
        if ($signed(wd[23:8]) > 0) pos++;
      end
      checks++;
      if (pos < tot / 2) begin failures++; $display("FAIL image not reconstructed in DDR: %0d of %0d", pos, tot); end
    end
    @(negedge clk); win_advance = 1; win_advance_by = 8'd4;
    @(negedge clk); win_advance = 0;
    checks++; if (win_z0 != 16'd4) begin failures++; $display("FAIL window base %0d", win_z0); end
    begin real t; run_csp(4, t); r2[4] = t; end
    @(negedge clk); flush_req = 1;
    do @(negedge clk); while (!flush_done);
    flush_req = 0; @(negedge clk);
    $display("stalls %0d conflicts %0d two-in-flight %0d flushes %0d advances %0d steps %0d",
             n_stall, n_conflict, n_two, n_flush, n_adv, n_step);
    checks++; if (cache_misses == 0)    begin failures++; $display("FAIL no cache miss"); end
    checks++; if (cache_evictions == 0) begin failures++; $display("FAIL no eviction"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL no dispatch stall"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no arbitration conflict"); end
    checks++; if (n_two == 0)      begin failures++; $display("FAIL never two beams in a PE"); end
    checks++; if (n_flush != 2)    begin failures++; $display("FAIL flushes %0d", n_flush); end
    checks++; if (n_adv == 0)      begin failures++; $display("FAIL no window move"); end
    checks++; if (n_step != 5)     begin failures++; $display("FAIL step sizes %0d", n_step); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
