// tb_sliding_window: random cache requests must reach DDR with address
// ((z0 + z) * NY + y) * NX + x and unchanged handshake and data; advance
// moves z0 and saturates at NZ - L.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_sliding_window;
  import ct_pkg::*;
  localparam int NX = 874, NY = 874, NZ = 161, L = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic advance; logic [7:0] advance_by; logic [15:0] z0;
  logic c_req_valid, c_req_ready, c_req_we, c_rsp_valid;
  vox_t c_req_vox; logic [23:0] c_req_wdata, c_rsp_rdata, m_req_wdata, m_rsp_rdata;
  logic m_req_valid, m_req_ready, m_req_we, m_rsp_valid;
  logic [31:0] m_req_addr;
  int checks = 0, failures = 0, ez0 = 0;

  sliding_window #(.NX(NX), .NY(NY), .NZ(NZ), .L(L)) dut (.*);

  initial begin
    advance = 0; advance_by = 0; c_req_valid = 0; c_req_we = 0; c_req_vox = '0;
    c_req_wdata = 0; m_req_ready = 0; m_rsp_valid = 0; m_rsp_rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      c_req_valid = 1;
      c_req_we = 1'($urandom);
      c_req_vox.x = X_W'($urandom_range(NX - 1, 0));
      c_req_vox.y = X_W'($urandom_range(NY - 1, 0));
      c_req_vox.z = Z_W'($urandom_range(L - 1, 0));
      c_req_wdata = 24'($urandom);
      m_req_ready = 1'($urandom);
      m_rsp_valid = 1'($urandom);
      m_rsp_rdata = 24'($urandom);
      #1;
      checks++;
      if (m_req_addr != 32'(((ez0 + int'(c_req_vox.z)) * NY + int'(c_req_vox.y)) * NX + int'(c_req_vox.x)) ||
          !m_req_valid || m_req_we != c_req_we || m_req_wdata != c_req_wdata ||
          c_req_ready != m_req_ready || c_rsp_valid != m_rsp_valid || c_rsp_rdata != m_rsp_rdata) begin
        failures++; $display("FAIL request %0d addr %0d", n, m_req_addr);
      end
      checks++;
      if (int'(z0) != ez0) begin failures++; $display("FAIL z0 %0d exp %0d", z0, ez0); end
      advance = ($urandom_range(9, 0) == 0);
      advance_by = 8'($urandom_range(20, 1));
      @(posedge clk);
      if (advance) ez0 = (ez0 + int'(advance_by) > NZ - L) ? NZ - L : ez0 + int'(advance_by);
      #1 advance = 0;
    end
    checks++; if (ez0 != NZ - L) begin failures++; $display("FAIL window never reached the end"); end
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
