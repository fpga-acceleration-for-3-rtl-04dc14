// sliding_window: places the window of L consecutive image slices that the
// PEs work on inside the full volume kept in DDR memory, and turns the
// window coordinates of the tile cache's memory requests into DDR word
// addresses. The window is a FIFO of slices: when projection data of later
// source positions come in, advance moves its base slice z0 further along
// the scan (z) axis, never past the last slice. Address of voxel (x, y, z)
// of the window: ((z0 + z) * NY + y) * NX + x, one 24-bit word {f, v} per
// voxel. The cache must be flushed before the window moves.
// Requests pass through combinationally (no added latency); advance takes
// effect on the next clock edge. Window width 24 and the 874x874 slice
// follow the design; the address layout is this design's choice.
module sliding_window
  import ct_pkg::*;
#(
  parameter int NX = 874,
  parameter int NY = 874,
  parameter int NZ = 161,
  parameter int L  = 24,
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  logic [7:0]    advance_by,
  output logic [15:0]   z0,
  // from the tile cache
  input  logic          c_req_valid,
  output logic          c_req_ready,
  input  logic          c_req_we,
  input  vox_t          c_req_vox,
  input  logic [F_W+V_W-1:0] c_req_wdata,
  output logic          c_rsp_valid,
  output logic [F_W+V_W-1:0] c_rsp_rdata,
  // to DDR
  output logic          m_req_valid,
  input  logic          m_req_ready,
  output logic          m_req_we,
  output logic [AW-1:0] m_req_addr,
  output logic [F_W+V_W-1:0] m_req_wdata,
  input  logic          m_rsp_valid,
  input  logic [F_W+V_W-1:0] m_rsp_rdata
);
  localparam int ZMAX = NZ - L;

  always_ff @(posedge clk) begin
    if (!rst_n) z0 <= '0;
    else if (advance) begin
      if (32'(z0) + 32'(advance_by) > ZMAX) z0 <= 16'(ZMAX);
      else z0 <= z0 + 16'(advance_by);
    end
  end

  assign m_req_valid = c_req_valid;
  assign c_req_ready = m_req_ready;
  assign m_req_we    = c_req_we;
  assign m_req_wdata = c_req_wdata;
  assign m_req_addr  = AW'(((64'(z0) + 64'(c_req_vox.z)) * 64'(NY) + 64'(c_req_vox.y)) * 64'(NX)
                           + 64'(c_req_vox.x));
  assign c_rsp_valid = m_rsp_valid;
  assign c_rsp_rdata = m_rsp_rdata;

  a_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    c_req_valid |-> 32'(c_req_vox.z) < L);
endmodule
