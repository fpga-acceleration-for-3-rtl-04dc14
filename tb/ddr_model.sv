// ddr_model: behavioural model of the off-chip DDR memory that holds the
// image volume f and edge indicator v (one 24-bit word per voxel). Storage is
// sparse: a word never written reads as f = 0, v = 1.0, the initial values of
// the reconstruction. Requests are accepted with a pseudo-random ready and
// read data return in order RD_LAT cycles after acceptance.
// The DDR memory and its controller are outside the accelerator; this model
// only gives the testbenches a memory with the same request/response ports.
module ddr_model #(
  parameter int AW     = 32,
  parameter int DW     = 24,
  parameter int RD_LAT = 3,
  parameter logic [DW-1:0] INIT = 24'h000080
) (
  input  logic          clk,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [DW-1:0] req_wdata,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_rdata
);
  logic [DW-1:0] store [logic [AW-1:0]];
  logic [DW-1:0] pipe_d [RD_LAT];
  logic          pipe_v [RD_LAT];
  int unsigned   reads = 0, writes = 0;

  initial begin
    for (int i = 0; i < RD_LAT; i++) pipe_v[i] = 1'b0;
    req_ready = 1'b0;
  end

  function automatic logic [DW-1:0] peek(input logic [AW-1:0] a);
    return store.exists(a) ? store[a] : INIT;
  endfunction

  assign rsp_valid = pipe_v[RD_LAT-1];
  assign rsp_rdata = pipe_d[RD_LAT-1];

  always @(posedge clk) begin
    for (int i = RD_LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (req_valid && req_ready) begin
      if (req_we) begin
        store[req_addr] = req_wdata;
        writes++;
      end else begin
        pipe_v[0] <= 1'b1;
        pipe_d[0] <= peek(req_addr);
        reads++;
      end
    end
    req_ready <= ($urandom_range(3, 0) != 0);
  end
endmodule
