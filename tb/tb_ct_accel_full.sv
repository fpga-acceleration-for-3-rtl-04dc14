// tb_ct_accel_full: runs the accelerator with its default parameters, as
// specified: 48 PEs, 874 x 874 slices, a 24-slice window over 161 slices,
// 110 x 110 x 6 tiles, a 736-channel x 16-row detector handled in blocks of
// 48 channels x 1 row. One pass dispatches all 11776
// beams of one source position. To keep simulation short, the descriptor
// model here gives every beam a short segment (a few voxels) that lies inside
// the first tile. The segments are spread over the tile's xy area and the
// projection data are those of a uniform object f = 0.5.
// Checks:
//   - both step sizes are produced;
//   - each pass finishes all 11776 beams and commits one update per voxel crossed;
//   - the second pass has a smaller squared residual than the first;
//   - the tile is missed and filled, then written back to DDR by a flush;
//   - the flushed image is positive where beams crossed.
// Interface: the top's ports only, driven from the clock's negative edge.
// A behavioural DDR (ddr_model) and a 2-cycle descriptor memory are used.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_ct_accel_full;
  import ct_pkg::*;
  localparam int NX = 874, NY = 874, C = 736, W = 16, NB = C * W;
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

  ct_accel_top dut (.*);

  ddr_model #(.RD_LAT(3)) ddr (.clk, .req_valid(ddr_req_valid), .req_ready(ddr_req_ready),
    .req_we(ddr_req_we), .req_addr(ddr_req_addr), .req_wdata(ddr_req_wdata),
    .rsp_valid(ddr_rsp_valid), .rsp_rdata(ddr_rsp_rdata));

  // beam i: from (x0, y0, z0) by (+2.37, +0.61, +0.29), inside tile (0, 0, 0)
  function automatic void beam_of(input int i, output real p0[3], output real p1[3]);
    p0[0] = 5.13 + real'(i % 97);
    p0[1] = 5.29 + real'((i / 97) % 101);
    p0[2] = 1.17 + 0.25 * real'(i % 11) / 11.0;
    p1[0] = p0[0] + 2.37; p1[1] = p0[1] + 0.61; p1[2] = p0[2] + 0.29;
  endfunction

  function automatic int voxels_of(input int i);
    real p0[3], p1[3];
    int n;
    beam_of(i, p0, p1);
    n = 1;
    for (int a = 0; a < 3; a++) n += $rtoi($floor(p1[a]) - $floor(p0[a]));
    return n;
  endfunction

  int pend_t = 0; int pend_i;
  always @(posedge clk) begin
    desc_rsp_valid <= 1'b0;
    if (pend_t > 0) begin
      pend_t--;
      if (pend_t == 0) begin
        real p0[3], p1[3], len;
        beam_of(pend_i, p0, p1);
        len = $sqrt((p1[0]-p0[0])**2 + (p1[1]-p0[1])**2 + (p1[2]-p0[2])**2);
        desc_rsp_valid <= 1'b1;
        desc_rsp_beam.sx <= 32'($rtoi(p0[0] * 65536.0));
        desc_rsp_beam.sy <= 32'($rtoi(p0[1] * 65536.0));
        desc_rsp_beam.sz <= 32'($rtoi(p0[2] * 65536.0));
        desc_rsp_beam.dx <= 32'($rtoi(p1[0] * 65536.0));
        desc_rsp_beam.dy <= 32'($rtoi(p1[1] * 65536.0));
        desc_rsp_beam.dz <= 32'($rtoi(p1[2] * 65536.0));
        desc_rsp_beam.g  <= 32'($rtoi(0.5 * len * 65536.0));
      end
    end
    if (desc_req_valid && desc_req_ready) begin pend_i = int'(desc_req_addr); pend_t = 2; end
  end
  assign desc_req_ready = 1'b1;

  real sumr2 = 0.0;
  int n_step = 0, n_flush = 0;
  always @(posedge clk) if (rst_n) begin
    if (step_done) n_step++;
    if (flush_done) n_flush++;
  end
  for (genvar i = 0; i < 48; i++) begin : g_mon
    always @(posedge clk)
      if (rst_n && dut.g_pe[i].u_pe.r_valid && dut.g_pe[i].u_pe.r_ready) begin
        real r;
        r = real'($signed(dut.g_pe[i].u_pe.r_data)) / 65536.0;
        sumr2 += r * r;
      end
  end

  int exp_vox = 0;

  task automatic run_csp(input int k, output real r2);
    int b0, v0;
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
    checks++;
    if (int'(beams_done) - b0 != NB) begin failures++; $display("FAIL beams done %0d", int'(beams_done) - b0); end
    checks++;
    if (int'(voxels_committed) - v0 != exp_vox) begin
      failures++; $display("FAIL voxels committed %0d expected %0d", int'(voxels_committed) - v0, exp_vox);
    end
    $display("pass k=%0d at %0t: sum r^2 = %f, misses %0d, evictions %0d", k, $time, r2,
             cache_misses, cache_evictions);
  endtask

  initial begin
    real r2 [2];
    step_start = 0; csp_start = 0; flush_req = 0; win_advance = 0; iter_k = 0; win_advance_by = 0;
    for (int i = 0; i < NB; i++) exp_vox += voxels_of(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin real t; run_csp(k, t); r2[k] = t; end
    checks++;
    if (!(r2[1] < r2[0])) begin failures++; $display("FAIL residual did not fall: %f -> %f", r2[0], r2[1]); end
    checks++; if (cache_misses == 0) begin failures++; $display("FAIL no cache miss"); end
    @(negedge clk); flush_req = 1;
    do @(negedge clk); while (!flush_done);
    flush_req = 0; @(negedge clk);
    checks++; if (n_flush != 1) begin failures++; $display("FAIL no flush"); end
    begin
      int pos = 0, tot = 0;
      for (int i = 0; i < NB; i += 37) begin
        real p0[3], p1[3];
        logic [23:0] wd;
        beam_of(i, p0, p1);
        tot++;
        wd = ddr.peek(32'(($rtoi($floor(p0[2])) * NY + $rtoi($floor(p0[1]))) * NX + $rtoi($floor(p0[0]))));
        if ($signed(wd[23:8]) > 0) pos++;
      end
      checks++;
      if (pos != tot) begin failures++; $display("FAIL flushed image positive at %0d of %0d", pos, tot); end
    end
    checks++; if (n_step != 2) begin failures++; $display("FAIL step sizes %0d", n_step); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
