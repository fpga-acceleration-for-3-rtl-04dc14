// tb_ray_tracer: random beams inside a 64x64x24 box. For every voxel the
// tracer emits, the expected intersection length is recomputed in real
// arithmetic by clipping the segment against that voxel's box; the voxel
// sequence must be face-connected, start and end in the voxels of the end
// points, the weights must add up to the segment length, and after the first
// voxel one voxel must leave per cycle.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_ray_tracer;
  import ct_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic beam_valid, beam_ready, out_valid, out_ready;
  beam_t beam;
  trace_t out_data;
  int checks = 0, failures = 0;

  ray_tracer dut (.*);

  function automatic real seg_len_in_voxel(real p0[3], real p1[3], int vx, int vy, int vz);
    real t0, t1, lo, hi, ta, tb2, d, len;
    int v[3];
    v[0] = vx; v[1] = vy; v[2] = vz;
    t0 = 0.0; t1 = 1.0;
    for (int a = 0; a < 3; a++) begin
      d = p1[a] - p0[a];
      if (d == 0.0) begin
        if (p0[a] < v[a] || p0[a] >= v[a] + 1) return 0.0;
      end else begin
        ta = (v[a] - p0[a]) / d;
        tb2 = (v[a] + 1 - p0[a]) / d;
        lo = ta < tb2 ? ta : tb2;
        hi = ta < tb2 ? tb2 : ta;
        if (lo > t0) t0 = lo;
        if (hi < t1) t1 = hi;
      end
    end
    len = 0.0;
    for (int a = 0; a < 3; a++) len += (p1[a]-p0[a])*(p1[a]-p0[a]);
    len = $sqrt(len);
    return (t1 > t0) ? (t1 - t0) * len : 0.0;
  endfunction

  task automatic run_beam(input int n);
    real p0[3], p1[3], wsum, len, we, wg;
    int nvox, first_cyc, last_cyc, cyc, px, py, pz;
    logic signed [31:0] c[6];
    bit done;
    for (int a = 0; a < 6; a++) begin
      int lim;
      lim = (a % 3 == 2) ? 24 : 64;
      c[a] = 32'($urandom_range(lim * 65536 - 1, 0));
    end
    if (n == 0) begin   // axis-parallel beam
      c[1] = c[0] + 32'h123; c[4] = c[1]; c[2] = 32'h50000; c[5] = c[2];
      c[0] = 32'h8000; c[3] = 32'h3f8000;
    end
    beam = '{sx: c[0], sy: c[1], sz: c[2], dx: c[3], dy: c[4], dz: c[5], g: 0};
    for (int a = 0; a < 3; a++) begin
      p0[a] = real'(c[a]) / 65536.0;
      p1[a] = real'(c[a+3]) / 65536.0;
    end
    len = 0;
    for (int a = 0; a < 3; a++) len += (p1[a]-p0[a])*(p1[a]-p0[a]);
    len = $sqrt(len);
    @(negedge clk); beam_valid = 1;
    do @(posedge clk); while (!beam_ready);
    #1 beam_valid = 0;
    wsum = 0; nvox = 0; cyc = 0; done = 0; first_cyc = 0; last_cyc = 0;
    px = 0; py = 0; pz = 0;
    while (!done) begin
      @(posedge clk); cyc++;
      if (out_valid && out_ready) begin
        if (nvox == 0) begin
          first_cyc = cyc;
          checks++;
          if (out_data.vox.x != int'($floor(p0[0])) || out_data.vox.y != int'($floor(p0[1])) ||
              out_data.vox.z != int'($floor(p0[2]))) begin
            failures++; $display("FAIL first voxel beam %0d", n);
          end
        end else begin
          checks++;
          if ((out_data.vox.x - px)*(out_data.vox.x - px) + (out_data.vox.y - py)*(out_data.vox.y - py)
              + (out_data.vox.z - pz)*(out_data.vox.z - pz) > 2) begin
            failures++; $display("FAIL not adjacent beam %0d", n);
          end
        end
        px = out_data.vox.x; py = out_data.vox.y; pz = out_data.vox.z;
        we = seg_len_in_voxel(p0, p1, px, py, pz);
        wg = real'(out_data.w) / 16384.0;
        checks++;
        if (wg - we > 0.002 || we - wg > 0.002) begin
          failures++;
          $display("FAIL beam %0d voxel %0d (%0d,%0d,%0d) w=%f expected %f", n, nvox, px, py, pz, wg, we);
        end
        wsum += wg; nvox++;
        if (out_data.last) begin
          done = 1; last_cyc = cyc;
        end
      end
    end
    checks++;
    if (px != int'($floor(p1[0])) || py != int'($floor(p1[1])) || pz != int'($floor(p1[2]))) begin
      failures++; $display("FAIL last voxel beam %0d", n);
    end
    checks++;
    if (wsum - len > 0.01 || len - wsum > 0.01) begin
      failures++; $display("FAIL beam %0d sum w %f len %f", n, wsum, len);
    end
    checks++;   // one voxel per cycle
    if (last_cyc - first_cyc != nvox - 1) begin
      failures++; $display("FAIL beam %0d rate: %0d voxels in %0d cycles", n, nvox, last_cyc - first_cyc + 1);
    end
  endtask

  initial begin
    beam_valid = 0; out_ready = 1; beam = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) run_beam(n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
