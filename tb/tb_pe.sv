// tb_pe: one processing element against a behavioural cache (a 32x32x4
// volume of random f and v, stencil answered one cycle after a randomly
// granted read, writes accepted at random). Beams run along x or y, forwards
// and backwards, so that the voxel list and weights are known exactly here:
// full voxels weigh 1, the end voxels the fractional part. For each beam the
// expected residual and the new f and v of every voxel are computed here in
// floating point from the volume as it was before the beam (eqs. (3), (4))
// and compared with what the PE writes back. Also checks one committed voxel
// per cycle within a beam and that two beams can be in flight.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_pe;
  import ct_pkg::*;
  localparam int N = 32, NZ = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic beam_valid, beam_ready, rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, busy, beam_done;
  beam_t beam; vox_t rd_vox; stencil_t rsp_data; cache_wr_t wr_data;
  logic [31:0] lambda, mu, commits;
  int checks = 0, failures = 0, overlap = 0;

  pe #(.MAX_RAY(64)) dut (.*);

  logic [15:0] vf [NZ][N][N];
  logic [7:0]  vv [NZ][N][N];

  function automatic int clampi(int a); return a < 0 ? 0 : (a >= N ? N - 1 : a); endfunction

  always @(posedge clk) begin
    rsp_valid <= rst_n && rd_valid && rd_ready;
    if (rd_valid && rd_ready) begin
      int x, y;
      for (int p = 0; p < 5; p++) begin
        x = int'(rd_vox.x) + (p == 1 ? 1 : p == 2 ? -1 : 0);
        y = int'(rd_vox.y) + (p == 3 ? 1 : p == 4 ? -1 : 0);
        if (x < 0 || x >= N || y < 0 || y >= N) begin x = rd_vox.x; y = rd_vox.y; end
        rsp_data.f[p] <= vf[rd_vox.z][y][x];
        rsp_data.v[p] <= vv[rd_vox.z][y][x];
      end
    end
    if (wr_valid && wr_ready) begin
      vf[wr_data.vox.z][wr_data.vox.y][wr_data.vox.x] <= wr_data.f;
      vv[wr_data.vox.z][wr_data.vox.y][wr_data.vox.x] <= wr_data.v;
    end
    rd_ready <= 1'($urandom_range(3, 0) != 0) || fast;
    wr_ready <= 1'($urandom_range(3, 0) != 0) || fast;
    if (busy && dut.inflight == 2'd2) overlap++;
  end
  bit fast = 0;

  real snap_f [NZ][N][N], snap_v [NZ][N][N];
  task automatic snapshot();
    for (int z = 0; z < NZ; z++) for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      snap_f[z][y][x] = real'($signed(vf[z][y][x])) / 4096.0;
      snap_v[z][y][x] = real'(vv[z][y][x]) / 128.0;
    end
  endtask
  function automatic real sf(int z, int y, int x, int cy, int cx);
    if (x < 0 || x >= N || y < 0 || y >= N) return snap_f[z][cy][cx];
    return snap_f[z][y][x];
  endfunction
  function automatic real svv(int z, int y, int x, int cy, int cx);
    if (x < 0 || x >= N || y < 0 || y >= N) return snap_v[z][cy][cx];
    return snap_v[z][y][x];
  endfunction

  // one beam along x (axis 0) or y (axis 1); returns number of voxels
  task automatic run_beam(int axis, bit backward, bit wait_done);
    int a0, a1, o1, z, n, step, cyc0, first_wr, last_wr, nwr;
    real s, e, wts[$], rr, g;
    int  xs[$], ys[$];
    logic signed [31:0] sq, eq;
    a0 = $urandom_range(N - 10, 1); a1 = a0 + $urandom_range(8, 3);
    o1 = $urandom_range(N - 1, 0); z = $urandom_range(NZ - 1, 0);
    sq = (32'(a0) << 16) + 32'($urandom_range(65535, 1));
    eq = (32'(a1) << 16) + 32'($urandom_range(65535, 1));
    if (backward) begin logic signed [31:0] t; t = sq; sq = eq; eq = t; end
    s = real'(sq) / 65536.0; e = real'(eq) / 65536.0;
    g = real'($urandom_range(20000, 0)) / 1000.0 - 10.0;
    step = backward ? -1 : 1;
    for (int k = int'($floor(s)); ; k += step) begin
      real lo, hi;
      lo = (s < e) ? s : e; hi = (s < e) ? e : s;
      lo = (real'(k) > lo) ? real'(k) : lo;
      hi = (real'(k + 1) < hi) ? real'(k + 1) : hi;
      wts.push_back(hi - lo);
      if (axis == 0) begin xs.push_back(k); ys.push_back(o1); end
      else begin xs.push_back(o1); ys.push_back(k); end
      if (k == int'($floor(e))) break;
    end
    n = wts.size();
    if (wait_done) snapshot();
    rr = -g;
    for (int k = 0; k < n; k++) rr += snap_f[z][ys[k]][xs[k]] * wts[k];
    @(negedge clk);
    beam_valid = 1;
    beam.g = 32'($rtoi(g * 65536.0));
    if (axis == 0) begin
      beam.sx = sq; beam.dx = eq;
      beam.sy = (32'(o1) << 16) + 32'h8000; beam.dy = beam.sy;
    end else begin
      beam.sy = sq; beam.dy = eq;
      beam.sx = (32'(o1) << 16) + 32'h8000; beam.dx = beam.sx;
    end
    beam.sz = (32'(z) << 16) + 32'h4000; beam.dz = beam.sz;
    do @(posedge clk); while (!beam_ready);
    #1 beam_valid = 0;
    if (!wait_done) return;
    nwr = 0; first_wr = 0; last_wr = 0; cyc0 = 0;
    while (nwr < n) begin
      @(posedge clk); cyc0++;
      if (wr_valid && wr_ready) begin
        int k;
        real f[5], v[5], lapf, lapv, gx, gy, gf, gv, fn, vn, gotf, gotv;
        int cx, cy;
        k = nwr;
        cx = xs[k]; cy = ys[k];
        f[0] = sf(z, cy, cx, cy, cx);     v[0] = svv(z, cy, cx, cy, cx);
        f[1] = sf(z, cy, cx + 1, cy, cx); v[1] = svv(z, cy, cx + 1, cy, cx);
        f[2] = sf(z, cy, cx - 1, cy, cx); v[2] = svv(z, cy, cx - 1, cy, cx);
        f[3] = sf(z, cy + 1, cx, cy, cx); v[3] = svv(z, cy + 1, cx, cy, cx);
        f[4] = sf(z, cy - 1, cx, cy, cx); v[4] = svv(z, cy - 1, cx, cy, cx);
        lapf = f[1] + f[2] + f[3] + f[4] - 4*f[0];
        lapv = v[1] + v[2] + v[3] + v[4] - 4*v[0];
        gx = (f[1] - f[2]) / 2; gy = (f[3] - f[4]) / 2;
        gf = 2*rr*wts[k] - 0.2 * v[0]*v[0] * lapf;
        gv = 0.2*(gx*gx + gy*gy)*v[0] + 0.025*(v[0] - 1) - 0.1*lapv;
        fn = f[0] - 0.25*gf;  vn = v[0] - 0.5*gv;
        if (fn > 7.999) fn = 7.999;
        if (fn < -8.0) fn = -8.0;
        if (vn < 0) vn = 0;
        if (vn > 1) vn = 1;
        gotf = real'($signed(wr_data.f)) / 4096.0;
        gotv = real'(wr_data.v) / 128.0;
        checks++;
        if (wr_data.vox.x != X_W'(cx) || wr_data.vox.y != X_W'(cy) || wr_data.vox.z != Z_W'(z) ||
            gotf - fn > 4.0/4096 || fn - gotf > 4.0/4096 || gotv - vn > 1.5/128 || vn - gotv > 1.5/128) begin
          failures++;
          $display("FAIL voxel %0d of %0d (%0d,%0d,%0d): f %f exp %f v %f exp %f", k, n,
                   wr_data.vox.x, wr_data.vox.y, wr_data.vox.z, gotf, fn, gotv, vn);
        end
        if (nwr == 0) first_wr = cyc0;
        last_wr = cyc0;
        nwr++;
      end
    end
    if (fast) begin
      checks++;
      if (last_wr - first_wr != n - 1) begin failures++; $display("FAIL write rate %0d for %0d", last_wr - first_wr, n); end
    end
    while (busy) @(posedge clk);
  endtask

  initial begin
    beam_valid = 0; beam = '0; rsp_valid = 0; rsp_data = '0; rd_ready = 0; wr_ready = 0;
    lambda = 32'd4194304; mu = 32'd8388608;
    for (int z = 0; z < NZ; z++) for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      vf[z][y][x] = 16'($signed($urandom_range(8000, 0)) - 4000);
      vv[z][y][x] = 8'($urandom_range(128, 0));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      if (b == 30) fast = 1;
      run_beam(b % 2, b % 4 >= 2, 1'b1);
    end
    // back-to-back beams: the second must be accepted while the first is in flight
    fast = 0;
    for (int b = 0; b < 6; b++) run_beam(b % 2, 1'b0, 1'b0);
    while (busy) @(posedge clk);
    checks++; if (overlap == 0) begin failures++; $display("FAIL never two beams in flight"); end
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
