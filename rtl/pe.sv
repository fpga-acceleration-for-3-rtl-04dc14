// pe: processing element that performs the beam-based update of the inner
// loop of the asynchronous reconstruction for one beam after another:
//   ray tracing -> memory prefetch -> forward projection -> gradient
//   descent -> write-back,
// every stage joined to the next by a FIFO. For each beam the ray tracer
// lists the voxels and weights, the prefetch stage fetches their stencils of
// f and v from the shared tile cache, the forward projector sums f*w and
// forms the residual r = R f - g while the fetched records wait in the local
// ray buffer, then the gradient stage updates every voxel of the beam with r
// and the write-back stage commits the new values to the cache without
// waiting for other PEs.
//
// The local ray buffer must hold a whole beam (MAX_RAY voxels), because the
// residual is known only after the last voxel; two beams may be in flight so
// that the next beam is traced and fetched while the previous one is being
// updated. All stages move one voxel per cycle.
// Interface: beam_* takes beam_t (segment end points in window voxel
// coordinates and measured value g); lambda/mu are the current step sizes;
// rd_*/rsp_* and wr_* are this PE's ports to the cache arbiters; busy is high
// while a beam is in flight and beam_done pulses when a beam is committed.
// From the reconstruction method: the five stages, their order and the FIFOs
// between them. This design's own choices: the ray buffer depth, FIFO depths
// and the limit of two beams in flight.
module pe
  import ct_pkg::*;
#(
  parameter int MAX_RAY = 2048,
  parameter int LATENCY = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        beam_valid,
  output logic        beam_ready,
  input  beam_t       beam,
  input  logic [31:0] lambda,
  input  logic [31:0] mu,
  output logic        rd_valid,
  input  logic        rd_ready,
  output vox_t        rd_vox,
  input  logic        rsp_valid,
  input  stencil_t    rsp_data,
  output logic        wr_valid,
  input  logic        wr_ready,
  output cache_wr_t   wr_data,
  output logic        busy,
  output logic        beam_done,
  output logic [31:0] commits
);
  // beams in flight
  logic [1:0] inflight;
  logic       rt_ready, gq_ready;
  assign beam_ready = rt_ready && gq_ready && (inflight < 2'd2);
  assign busy       = (inflight != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 2'(beam_valid && beam_ready) - 2'(beam_done);
  end

  // measured values wait here for the forward projector
  logic               gq_valid, gq_pop;
  logic signed [31:0] gq_data;
  stream_fifo #(.WIDTH(32), .DEPTH(4)) u_gq (
    .clk, .rst_n,
    .in_valid(beam_valid && beam_ready), .in_ready(gq_ready), .in_data(beam.g),
    .out_valid(gq_valid), .out_ready(gq_pop), .out_data(gq_data), .count());

  // 1) ray tracing
  logic   rt_valid, rt_out_ready;
  trace_t rt_data;
  ray_tracer u_rt (
    .clk, .rst_n,
    .beam_valid(beam_valid && beam_ready), .beam_ready(rt_ready), .beam,
    .out_valid(rt_valid), .out_ready(rt_out_ready), .out_data(rt_data));

  logic   tq_valid, tq_ready;
  trace_t tq_data;
  stream_fifo #(.WIDTH($bits(trace_t)), .DEPTH(8)) u_tq (
    .clk, .rst_n,
    .in_valid(rt_valid), .in_ready(rt_out_ready), .in_data(rt_data),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq_data), .count());

  // 2) memory prefetch
  logic   pf_valid, pf_ready;
  fetch_t pf_data;
  mem_prefetch u_pf (
    .clk, .rst_n,
    .in_valid(tq_valid), .in_ready(tq_ready), .in_data(tq_data),
    .rd_valid, .rd_ready, .rd_vox, .rsp_valid, .rsp_data,
    .out_valid(pf_valid), .out_ready(pf_ready), .out_data(pf_data));

  // fork to the forward projector and the local ray buffer
  logic fp_in_ready, rb_in_ready;
  assign pf_ready = fp_in_ready && rb_in_ready;

  // 3) forward projection
  logic               r_valid, r_ready;
  logic signed [31:0] r_data;
  logic               rq_valid, rq_ready;
  logic signed [31:0] rq_data;
  forward_projector #(.LATENCY(LATENCY)) u_fp (
    .clk, .rst_n,
    .in_valid(pf_valid && rb_in_ready), .in_ready(fp_in_ready),
    .in_f(pf_data.st.f[0]), .in_w(pf_data.w), .in_last(pf_data.last),
    .g_valid(gq_valid), .g_ready(gq_pop), .g(gq_data),
    .out_valid(r_valid), .out_ready(r_ready), .out_r(r_data));

  stream_fifo #(.WIDTH(32), .DEPTH(2)) u_rq (
    .clk, .rst_n,
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_data), .count());

  // local ray buffer: the beam's local copy of f and v
  logic   rb_valid, rb_ready;
  fetch_t rb_data;
  stream_fifo #(.WIDTH($bits(fetch_t)), .DEPTH(MAX_RAY)) u_rb (
    .clk, .rst_n,
    .in_valid(pf_valid && fp_in_ready), .in_ready(rb_in_ready), .in_data(pf_data),
    .out_valid(rb_valid), .out_ready(rb_ready), .out_data(rb_data), .count());

  // 4) gradient descent
  logic gd_valid, gd_ready;
  upd_t gd_data;
  gradient_update u_gd (
    .clk, .rst_n, .lambda, .mu,
    .r_valid(rq_valid), .r_ready(rq_ready), .r(rq_data),
    .in_valid(rb_valid), .in_ready(rb_ready), .in_data(rb_data),
    .out_valid(gd_valid), .out_ready(gd_ready), .out_data(gd_data));

  logic uq_valid, uq_ready;
  upd_t uq_data;
  stream_fifo #(.WIDTH($bits(upd_t)), .DEPTH(4)) u_uq (
    .clk, .rst_n,
    .in_valid(gd_valid), .in_ready(gd_ready), .in_data(gd_data),
    .out_valid(uq_valid), .out_ready(uq_ready), .out_data(uq_data), .count());

  // 5) write-back
  write_back u_wb (
    .clk, .rst_n,
    .in_valid(uq_valid), .in_ready(uq_ready), .in_data(uq_data),
    .wr_valid, .wr_ready, .wr_data, .beam_done, .commits);

endmodule
