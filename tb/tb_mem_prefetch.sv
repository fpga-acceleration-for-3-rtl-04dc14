// tb_mem_prefetch: a cache stand-in accepts reads at random and answers one
// cycle later with a stencil derived from the voxel index; the output side
// stalls at random. Every traced voxel must come out once, in order, with its
// own weight, last flag and stencil; with a free port and a ready output the
// stage must pass one voxel per cycle.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_mem_prefetch;
  import ct_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, rd_valid, rd_ready, rsp_valid, out_valid, out_ready;
  trace_t in_data; vox_t rd_vox; stencil_t rsp_data; fetch_t out_data;
  bit acc;
  int checks = 0, failures = 0, got = 0, phase = 0, fast_first = 0, fast_last = 0, cyc = 0;
  trace_t q[$];

  mem_prefetch dut (.*);

  function automatic stencil_t st_of(vox_t v);
    stencil_t s;
    for (int p = 0; p < 5; p++) begin
      s.f[p] = F_W'(v.x * 7 + v.y * 3 + p);
      s.v[p] = V_W'(v.z + p * 11);
    end
    return s;
  endfunction

  always @(posedge clk) begin
    cyc++;
    rsp_valid <= rst_n && rd_valid && rd_ready;
    if (rd_valid && rd_ready) rsp_data <= st_of(rd_vox);
    if (rst_n && out_valid && out_ready) begin
      trace_t e;
      e = q.pop_front();
      checks++;
      if (out_data.vox != e.vox || out_data.w != e.w || out_data.last != e.last ||
          out_data.st != st_of(e.vox)) begin
        failures++; $display("FAIL item %0d", got);
      end
      got++;
      if (phase == 1) begin
        if (fast_first == 0) fast_first = cyc;
        fast_last = cyc;
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0; rd_ready = 0; out_ready = 0; rsp_valid = 0; rsp_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 700; n++) begin
      @(negedge clk);
      if (n == 600) begin phase = 1; end
      in_valid = 1;
      in_data.vox = vox_t'($urandom);
      in_data.w = W_W'($urandom);
      in_data.last = 1'($urandom);
      q.push_back(in_data);
      do begin
        rd_ready  = (phase == 1) ? 1'b1 : 1'($urandom);
        out_ready = (phase == 1) ? 1'b1 : ($urandom_range(3, 0) != 0);
        #2 acc = in_valid && in_ready;
        @(posedge clk);
        #1;
      end while (!acc);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (got != 700) begin failures++; $display("FAIL got %0d", got); end
    checks++; if (fast_last - fast_first > 104) begin failures++; $display("FAIL rate %0d", fast_last - fast_first); end
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
