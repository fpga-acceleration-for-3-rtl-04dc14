// mem_prefetch: second PE stage. For each voxel produced by the ray tracer
// it reads the voxel's five-point cross stencil of f and v from the shared
// tile cache and passes the voxel, its weight and the stencil on as a local
// copy for forward projection and gradient descent.
// The cache answers exactly one cycle after it accepts a read, and a
// response cannot be refused, so a read is only issued while the output FIFO
// has room for it and for the one still in flight. At most one read is
// outstanding; with a free cache port the stage moves one voxel per cycle.
// Interface: in_* trace_t from the ray tracer; rd_* / rsp_* to the cache
// port (through the arbiter); out_* fetch_t. Fetching the whole stencil
// rather than the centre alone is this design's choice (it makes the
// regularisation terms available to the gradient stage).
module mem_prefetch
  import ct_pkg::*;
#(
  parameter int OUT_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  trace_t   in_data,
  output logic     rd_valid,
  input  logic     rd_ready,
  output vox_t     rd_vox,
  input  logic     rsp_valid,
  input  stencil_t rsp_data,
  output logic     out_valid,
  input  logic     out_ready,
  output fetch_t   out_data
);
  localparam int CW = $clog2(OUT_DEPTH) + 1;
  logic   pend;
  trace_t meta;
  logic [CW-1:0] ocount;
  logic   room, ofifo_in_ready;
  fetch_t rec;

  assign room     = (32'(ocount) + 32'(pend) + 1) <= OUT_DEPTH;
  assign rd_valid = in_valid && room;
  assign rd_vox   = in_data.vox;
  assign in_ready = rd_ready && room;

  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else begin
      pend <= rd_valid && rd_ready;
      if (rd_valid && rd_ready) meta <= in_data;
    end
  end

  always_comb begin
    rec.vox  = meta.vox;
    rec.w    = meta.w;
    rec.last = meta.last;
    rec.st   = rsp_data;
  end

  stream_fifo #(.WIDTH($bits(fetch_t)), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid(rsp_valid), .in_ready(ofifo_in_ready), .in_data(rec),
    .out_valid, .out_ready, .out_data, .count(ocount));

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> pend);
  a_rsp_space:    assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> ofifo_in_ready);
endmodule
