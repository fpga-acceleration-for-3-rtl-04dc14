// ct_accel_top: accelerator for iterative low-dose helical CT
// reconstruction with Mumford-Shah regularisation. N_PE processing elements
// update the image f and the edge indicator v beam by beam, asynchronously:
// each PE traces its beam, fetches the voxels' stencils from a shared on-chip
// tile cache, projects, takes a gradient step and writes the result back
// without waiting for the other PEs. A ray controller hands out the beams of
// the current source position in execution blocks; a step-size unit supplies
// the diminishing step sizes lambda_k and mu_k; the tile cache keeps the
// working tiles of the sliding window of L slices, whose place in the DDR
// volume is set by the sliding-window unit.
//
// Operation, driven from outside (host side):
//   1. step_start with iter_k: compute lambda_k, mu_k (step_done).
//   2. csp_start: process all beams of one source position (csp_done).
//   3. when the next source position needs a later window, flush_req
//      (flush_done) and win_advance by the number of slices.
// External ports: the beam-descriptor port (desc_*), the DDR port (ddr_*,
// word address, one 24-bit {f, v} word per voxel), and event counters.
// Two round-robin arbiters give the PEs one stencil read and one voxel
// write of the cache per cycle between them.
// Default sizes follow the evaluated configuration (48 PEs, 874 x 874
// slices, 24-slice window, 110 x 110 x 6 tiles, 736 channels x 16 rows,
// blocks of 48 beams); the cache organisation and the arbitration are this
// design's choices.
module ct_accel_top
  import ct_pkg::*;
#(
  parameter int N_PE     = 48,
  parameter int NX       = 874,
  parameter int NY       = 874,
  parameter int NZ       = 161,
  parameter int L        = 24,
  parameter int TILE_XY  = 110,
  parameter int TILE_Z   = 6,
  parameter int SLOTS_XY = 4,
  parameter int C        = 736,
  parameter int W        = 16,
  parameter int C_B      = 48,
  parameter int W_B      = 1,
  parameter int MAX_RAY  = 2048,
  parameter int LATENCY  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        step_start,
  input  logic [15:0] iter_k,
  output logic        step_done,
  input  logic        csp_start,
  output logic        csp_done,
  input  logic        flush_req,
  output logic        flush_done,
  input  logic        win_advance,
  input  logic [7:0]  win_advance_by,
  output logic [15:0] win_z0,
  // beam descriptors
  output logic        desc_req_valid,
  input  logic        desc_req_ready,
  output logic [31:0] desc_req_addr,
  input  logic        desc_rsp_valid,
  input  beam_t       desc_rsp_beam,
  // DDR
  output logic        ddr_req_valid,
  input  logic        ddr_req_ready,
  output logic        ddr_req_we,
  output logic [31:0] ddr_req_addr,
  output logic [23:0] ddr_req_wdata,
  input  logic        ddr_rsp_valid,
  input  logic [23:0] ddr_rsp_rdata,
  // status
  output logic [31:0] beams_dispatched,
  output logic [31:0] beams_done,
  output logic [31:0] voxels_committed,
  output logic [31:0] cache_misses,
  output logic [31:0] cache_evictions
);
  localparam int IW = (N_PE > 1) ? $clog2(N_PE) : 1;

  // step sizes
  logic [31:0] lambda, mu;
  step_size u_step (
    .clk, .rst_n, .start(step_start), .k(iter_k),
    .busy(), .done(step_done), .lambda, .mu);

  // ray controller
  logic [N_PE-1:0] pe_valid, pe_ready, pe_busy, pe_done;
  beam_t           pe_beam;
  ray_controller #(.N_PE(N_PE), .C(C), .W(W), .C_B(C_B), .W_B(W_B)) u_rc (
    .clk, .rst_n, .start(csp_start), .done(csp_done), .active(),
    .desc_req_valid, .desc_req_ready, .desc_req_addr,
    .desc_rsp_valid, .desc_rsp_beam,
    .pe_valid, .pe_ready, .pe_beam, .pe_busy,
    .dispatched(beams_dispatched));

  // processing elements
  logic      [N_PE-1:0] p_rd_valid, p_rd_ready, p_rsp_valid, p_wr_valid, p_wr_ready;
  vox_t      p_rd_vox  [N_PE];
  cache_wr_t p_wr_data [N_PE];
  logic [31:0] p_commits [N_PE];
  stencil_t  c_rsp_data;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    pe #(.MAX_RAY(MAX_RAY), .LATENCY(LATENCY)) u_pe (
      .clk, .rst_n,
      .beam_valid(pe_valid[i]), .beam_ready(pe_ready[i]), .beam(pe_beam),
      .lambda, .mu,
      .rd_valid(p_rd_valid[i]), .rd_ready(p_rd_ready[i]), .rd_vox(p_rd_vox[i]),
      .rsp_valid(p_rsp_valid[i]), .rsp_data(c_rsp_data),
      .wr_valid(p_wr_valid[i]), .wr_ready(p_wr_ready[i]), .wr_data(p_wr_data[i]),
      .busy(pe_busy[i]), .beam_done(pe_done[i]), .commits(p_commits[i]));
  end

  // cache read arbitration
  logic          rd_gv, c_rd_ready, c_rsp_valid;
  logic [IW-1:0] rd_gi, rsp_idx;
  rr_arbiter #(.N(N_PE)) u_rd_arb (
    .clk, .rst_n, .req(p_rd_valid), .accept(c_rd_ready),
    .gnt_valid(rd_gv), .gnt_idx(rd_gi));

  always_ff @(posedge clk) begin
    if (rd_gv && c_rd_ready) rsp_idx <= rd_gi;
  end

  always_comb begin
    p_rd_ready  = '0;
    p_rsp_valid = '0;
    if (rd_gv) p_rd_ready[rd_gi] = c_rd_ready;
    if (c_rsp_valid) p_rsp_valid[rsp_idx] = 1'b1;
  end

  // cache write arbitration
  logic          wr_gv, c_wr_ready;
  logic [IW-1:0] wr_gi;
  rr_arbiter #(.N(N_PE)) u_wr_arb (
    .clk, .rst_n, .req(p_wr_valid), .accept(c_wr_ready),
    .gnt_valid(wr_gv), .gnt_idx(wr_gi));

  always_comb begin
    p_wr_ready = '0;
    if (wr_gv) p_wr_ready[wr_gi] = c_wr_ready;
  end

  // tile cache
  logic  m_req_valid, m_req_ready, m_req_we, m_rsp_valid;
  vox_t  m_req_vox;
  logic [23:0] m_req_wdata, m_rsp_rdata;
  logic  ev_miss, ev_evict;
  tile_cache #(.NX(NX), .NY(NY), .L(L), .TILE_XY(TILE_XY), .TILE_Z(TILE_Z),
               .SLOTS_XY(SLOTS_XY)) u_cache (
    .clk, .rst_n,
    .rd_valid(rd_gv), .rd_ready(c_rd_ready), .rd_vox(p_rd_vox[rd_gi]),
    .rsp_valid(c_rsp_valid), .rsp_data(c_rsp_data),
    .wr_valid(wr_gv), .wr_ready(c_wr_ready), .wr_data(p_wr_data[wr_gi]),
    .flush_req, .flush_done,
    .mem_req_valid(m_req_valid), .mem_req_ready(m_req_ready), .mem_req_we(m_req_we),
    .mem_req_vox(m_req_vox), .mem_req_wdata(m_req_wdata),
    .mem_rsp_valid(m_rsp_valid), .mem_rsp_rdata(m_rsp_rdata),
    .ev_miss, .ev_evict);

  // sliding window to DDR
  sliding_window #(.NX(NX), .NY(NY), .NZ(NZ), .L(L), .AW(32)) u_win (
    .clk, .rst_n, .advance(win_advance), .advance_by(win_advance_by), .z0(win_z0),
    .c_req_valid(m_req_valid), .c_req_ready(m_req_ready), .c_req_we(m_req_we),
    .c_req_vox(m_req_vox), .c_req_wdata(m_req_wdata),
    .c_rsp_valid(m_rsp_valid), .c_rsp_rdata(m_rsp_rdata),
    .m_req_valid(ddr_req_valid), .m_req_ready(ddr_req_ready), .m_req_we(ddr_req_we),
    .m_req_addr(ddr_req_addr), .m_req_wdata(ddr_req_wdata),
    .m_rsp_valid(ddr_rsp_valid), .m_rsp_rdata(ddr_rsp_rdata));

  // status counters
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beams_done      <= '0;
      cache_misses    <= '0;
      cache_evictions <= '0;
    end else begin
      beams_done      <= beams_done + 32'($countones(pe_done));
      cache_misses    <= cache_misses + 32'(ev_miss);
      cache_evictions <= cache_evictions + 32'(ev_evict);
    end
  end

  always_comb begin
    voxels_committed = '0;
    for (int i = 0; i < N_PE; i++) voxels_committed += p_commits[i];
  end
endmodule
