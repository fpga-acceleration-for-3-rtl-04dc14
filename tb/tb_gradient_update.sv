// tb_gradient_update: random beams of random stencils are pushed through the
// gradient stage with random output stalls. Each result is compared with the
// update of eqs. (3) and (4) evaluated here in floating point (alpha = 0.1,
// beta = 0.05, epsilon = 1), within two least significant bits. Also checks
// that one voxel per cycle passes when the output is always ready, that the
// residual is consumed exactly once per beam, and that the 1.0 and 0 clamps
// of v are reached.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_gradient_update;
  import ct_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] lambda, mu;
  logic r_valid, r_ready, in_valid, in_ready, out_valid, out_ready;
  logic signed [31:0] r;
  fetch_t in_data; upd_t out_data;
  int checks = 0, failures = 0, clamp_hi = 0, clamp_lo = 0, r_pops = 0;

  gradient_update dut (.*);

  real ef[$], ev[$];
  int  nin = 0, nout = 0, first_in = -1, last_out = 0, cyc = 0;
  bit  stall_mode = 1;

  always @(posedge clk) begin
    cyc++;
    if (r_valid && r_ready) r_pops++;
    if (rst_n && out_valid && out_ready) begin
      real xf, xv, gotf, gotv;
      xf = ef.pop_front(); xv = ev.pop_front();
      gotf = real'(out_data.f) / 4096.0;
      gotv = real'(out_data.v) / 128.0;
      checks++;
      if (gotf - xf > 2.0/4096 || xf - gotf > 2.0/4096 || gotv - xv > 1.5/128 || xv - gotv > 1.5/128) begin
        failures++;
        $display("FAIL voxel %0d f %f exp %f v %f exp %f", nout, gotf, xf, gotv, xv);
      end
      if (out_data.v == 8'd128) clamp_hi++;
      if (out_data.v == 8'd0) clamp_lo++;
      nout++; last_out = cyc;
    end
    out_ready <= stall_mode ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  task automatic model(fetch_t d, real rr, real lam, real m);
    real f[5], v[5], w, lapf, lapv, gx, gy, gf, gv, fn, vn;
    for (int p = 0; p < 5; p++) begin
      f[p] = real'($signed(d.st.f[p])) / 4096.0;
      v[p] = real'(d.st.v[p]) / 128.0;
    end
    w = real'(d.w) / 16384.0;
    lapf = f[1] + f[2] + f[3] + f[4] - 4*f[0];
    lapv = v[1] + v[2] + v[3] + v[4] - 4*v[0];
    gx = (f[1] - f[2]) / 2; gy = (f[3] - f[4]) / 2;
    gf = 2*rr*w - 0.2 * v[0]*v[0] * lapf;
    gv = 0.2*(gx*gx + gy*gy)*v[0] + 0.025*(v[0] - 1) - 0.1*lapv;
    fn = f[0] - lam*gf;
    vn = v[0] - m*gv;
    if (fn > 32767.0/4096) fn = 32767.0/4096;
    if (fn < -8.0) fn = -8.0;
    if (vn < 0) vn = 0;
    if (vn > 1) vn = 1;
    ef.push_back(fn); ev.push_back(vn);
  endtask

  initial begin
    in_valid = 0; r_valid = 0; r = 0; in_data = '0; out_ready = 1;
    lambda = 32'd4194304; mu = 32'd67108864;  // 0.25, 4.0
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int n;
      n = $urandom_range(50, 1);
      if (b == 39) begin stall_mode = 0; n = 100; end
      r = $signed($urandom_range(400000, 0)) - 200000;
      r_valid = 1;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1;
        in_data.vox = '{x: X_W'(k), y: X_W'(b), z: '0};
        in_data.w = W_W'($urandom_range(28000, 0));
        for (int p = 0; p < 5; p++) begin
          in_data.st.f[p] = F_W'($signed($urandom_range(16000, 0)) - 8000);
          in_data.st.v[p] = V_W'($urandom_range(128, 0));
        end
        if (b % 5 == 0) begin   // steep edge at full v: v must clamp to 0
          for (int p = 0; p < 5; p++) begin in_data.st.v[p] = 8'd128; in_data.st.f[p] = '0; end
          in_data.st.f[1] = 16'sh3000; in_data.st.f[2] = -16'sh3000;
        end
        if (b % 7 == 1) begin   // flat f, v below its neighbours: v must clamp to 1
          for (int p = 0; p < 5; p++) begin in_data.st.v[p] = 8'd128; in_data.st.f[p] = 16'sh0100; end
          in_data.st.v[0] = 8'd64;
        end
        in_data.last = (k == n - 1);
        model(in_data, real'(r) / 65536.0, 0.25, 4.0);
        @(posedge clk);
        if (first_in < 0 && b == 39) first_in = cyc;
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
      @(posedge clk); #1 r_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++; if (nout != nin && ef.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    checks++; if (r_pops != 40) begin failures++; $display("FAIL residual pops %0d", r_pops); end
    checks++; if (clamp_hi == 0 || clamp_lo == 0) begin failures++; $display("FAIL clamps %0d %0d", clamp_hi, clamp_lo); end
    checks++;   // last beam without stalls: 100 voxels in 100 cycles
    if (last_out - first_in > 100 + 4) begin failures++; $display("FAIL rate %0d", last_out - first_in); end
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
