// tb_write_back: random updates with random cache back-pressure. Every
// update must reach the cache once, in order, with its data; the commit
// counter must match; beam_done must pulse exactly once per beam, one cycle
// after the beam's last voxel is accepted.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_write_back;
  import ct_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, wr_valid, wr_ready, beam_done;
  upd_t in_data; cache_wr_t wr_data; logic [31:0] commits;
  bit acc;
  int checks = 0, failures = 0, sent = 0, got = 0, beams = 0, dones = 0;
  cache_wr_t q[$];
  logic last_acc = 0;

  write_back dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (last_acc) begin
      checks++;
      if (!beam_done) begin failures++; $display("FAIL beam_done missing"); end
    end else if (beam_done) begin failures++; $display("FAIL spurious beam_done"); end
    if (beam_done) dones++;
    last_acc <= wr_valid && wr_ready && in_data.last;
    if (wr_valid && wr_ready) begin
      cache_wr_t e;
      e = q.pop_front();
      checks++;
      if (wr_data !== e) begin failures++; $display("FAIL data"); end
      got++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data.vox = vox_t'($urandom);
      in_data.f = F_W'($urandom);
      in_data.v = V_W'($urandom);
      in_data.last = ($urandom_range(9, 0) == 0);
      if (in_data.last) beams++;
      q.push_back('{vox: in_data.vox, f: in_data.f, v: in_data.v});
      do begin
        wr_ready = 1'($urandom);
        #2 acc = in_valid && in_ready;
        @(posedge clk);
        #1;
      end while (!acc);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (got != 500 || commits != 500) begin failures++; $display("FAIL count %0d %0d", got, commits); end
    checks++; if (dones != beams) begin failures++; $display("FAIL beams %0d %0d", dones, beams); end
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
