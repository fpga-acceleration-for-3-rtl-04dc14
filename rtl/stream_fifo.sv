// stream_fifo: synchronous first-in first-out buffer with valid/ready on both
// sides and a synchronous active-low reset. The PE stages (ray tracing, prefetch, forward projection, gradient
// descent, write-back) are linked with these FIFOs, which also hold a whole
// beam's local copy of f and v between forward projection and gradient descent.
// Show-ahead: out_data is valid in the same cycle out_valid is high; a word
// written into an empty FIFO appears at the output one cycle later. Full
// throughput of one word per cycle; a push into a full FIFO is refused through
// in_ready. Depth is rounded to a power of two by the pointer width.
// From the reconstruction method: stages joined by FIFOs. This design's own
// choices: the show-ahead valid/ready interface and the depths.
module stream_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic push, pop;

  assign in_ready  = (count < ($clog2(DEPTH)+1)'(2**AW));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (($clog2(DEPTH)+1)'(push)) - (($clog2(DEPTH)+1)'(pop));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH)+1)'(2**AW));
endmodule
