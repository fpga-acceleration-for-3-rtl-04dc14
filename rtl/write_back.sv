// write_back: fifth PE stage. Commits each updated voxel (new centre f and
// v) to the shared tile cache as soon as it is computed, without waiting for
// other beams that may touch the same voxel: the asynchronous update of the
// algorithm, whose conflicts are tolerated thanks to the diminishing step
// sizes. It counts committed voxels and raises beam_done for one cycle when
// the last voxel of a beam has been accepted by the cache, which tells the
// PE, and through it the ray controller, that the beam is finished.
// Interface: in_* upd_t from gradient descent; wr_* cache write port (through
// the arbiter). One voxel per cycle when the port is free, no added latency.
// From the reconstruction method: commit without waiting for other beams.
// This design's own choices: the beam_done pulse and the commit counter.
module write_back
  import ct_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  upd_t        in_data,
  output logic        wr_valid,
  input  logic        wr_ready,
  output cache_wr_t   wr_data,
  output logic        beam_done,
  output logic [31:0] commits
);
  assign wr_valid     = in_valid;
  assign in_ready     = wr_ready;
  assign wr_data.vox  = in_data.vox;
  assign wr_data.f    = in_data.f;
  assign wr_data.v    = in_data.v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beam_done <= 1'b0;
      commits   <= '0;
    end else begin
      beam_done <= wr_valid && wr_ready && in_data.last;
      if (wr_valid && wr_ready) commits <= commits + 1'b1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_data));
endmodule
