// ray_tracer: first PE stage. Takes one beam, a straight segment from a start
// to an end point given in voxel units (both already inside the
// reconstruction window), and streams out every voxel the segment passes
// through together with its intersection length w, one voxel per cycle:
// the index list I_k and weights w_k of eq. (5).
//
// How it works: a fast voxel traversal. The segment is parametrised by
// t in [0,1] (30 fractional bits). Setup (about 48 cycles per beam) computes,
// per axis, the t distance between voxel boundaries, tDelta = 1/|d|, with a
// restoring divider, and the segment length |d| with a digit-by-digit square
// root; then the t of the first boundary crossing, tMax. Traversal follows
// the two-variable scheme of the design: register set u holds the current
// voxel and boundary parameters ("replace" state), v is the successor
// computed from u in the same cycle ("update" state); u is read only by the
// update logic and written only from v, so the recurrence has no
// read-after-write hazard and the loop runs at one voxel per cycle.
// w = (min(tMax, 1) - t_prev) * |d|. Axes whose boundary is crossed at the
// same t advance together (no zero-length corner voxel).
//
// Interface: beam_valid/beam_ready accepts a beam_t (g is ignored here);
// out_valid/out_ready carries trace_t, last marks the final voxel.
// Fixed point instead of the floating point of the original algorithm, the
// divider/square-root setup and the clipped-segment input are this
// design's choices.
module ray_tracer
  import ct_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   beam_valid,
  output logic   beam_ready,
  input  beam_t  beam,
  output logic   out_valid,
  input  logic   out_ready,
  output trace_t out_data
);
  localparam int TB = 30;                       // fractional bits of t
  localparam logic [47:0] T_END = 48'(1) << TB;
  localparam logic [47:0] T_INF = '1;
  localparam int DIV_STEPS = 47;                // quotient bits of 2^46/|d|
  localparam int SQ_STEPS  = 28;                // result bits of sqrt

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_INIT, S_RUN} state_e;
  state_e state;

  logic [31:0] ad [3];          // |d| per axis, Q16
  logic [2:0]  neg;             // step direction is negative
  logic [15:0] frac [3];        // fractional part of the start point
  logic [46:0] quo [3];
  logic [31:0] rem [3];
  logic [55:0] sq_num, sq_res, sq_bit;
  logic [5:0]  cnt;

  // traversal state u (registered) and successor v (combinational)
  logic [X_W-1:0] u_x, u_y;
  logic [Z_W-1:0] u_z;
  logic [47:0]    u_tmax [3];
  logic [47:0]    u_tdel [3];
  logic [47:0]    u_tprev;
  logic [31:0]    len;

  logic [47:0] v_tn;
  logic [2:0]  v_adv;
  logic        v_last;
  logic [79:0] v_wprod;

  function automatic logic [31:0] absd(input logic signed [31:0] a,
                                       input logic signed [31:0] b);
    logic signed [32:0] d;
    d = 33'(b) - 33'(a);
    return d[32] ? 32'(-d) : d[31:0];
  endfunction

  always_comb begin
    v_tn = T_END;
    for (int a = 0; a < 3; a++)
      if (u_tmax[a] < v_tn) v_tn = u_tmax[a];
    for (int a = 0; a < 3; a++)
      v_adv[a] = (u_tmax[a] == v_tn) && (v_tn != T_END);
    v_last  = (v_tn == T_END);
    v_wprod = 80'(v_tn - u_tprev) * 80'(len);
  end

  wire emit = (state == S_RUN) && (!out_valid || out_ready);
  assign beam_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (beam_valid) begin
          ad[0] <= absd(beam.sx, beam.dx);
          ad[1] <= absd(beam.sy, beam.dy);
          ad[2] <= absd(beam.sz, beam.dz);
          neg   <= {beam.dz < beam.sz, beam.dy < beam.sy, beam.dx < beam.sx};
          frac[0] <= beam.sx[15:0];
          frac[1] <= beam.sy[15:0];
          frac[2] <= beam.sz[15:0];
          u_x <= beam.sx[Q+X_W-1:Q];
          u_y <= beam.sy[Q+X_W-1:Q];
          u_z <= beam.sz[Q+Z_W-1:Q];
          sq_num <= 56'(absd(beam.sx, beam.dx)) * 56'(absd(beam.sx, beam.dx))
                  + 56'(absd(beam.sy, beam.dy)) * 56'(absd(beam.sy, beam.dy))
                  + 56'(absd(beam.sz, beam.dz)) * 56'(absd(beam.sz, beam.dz));
          sq_res <= '0;
          sq_bit <= 56'(1) << 54;
          for (int a = 0; a < 3; a++) begin
            quo[a] <= '0;
            rem[a] <= '0;
          end
          cnt   <= '0;
          state <= S_SETUP;
        end
        S_SETUP: begin
          // restoring division of 2^46 by |d|, one quotient bit per cycle
          for (int a = 0; a < 3; a++) begin
            logic [32:0] r;
            r = {rem[a], (cnt == 6'd0)};
            if (r >= 33'(ad[a])) begin
              rem[a] <= 32'(r - 33'(ad[a]));
              quo[a] <= {quo[a][45:0], 1'b1};
            end else begin
              rem[a] <= r[31:0];
              quo[a] <= {quo[a][45:0], 1'b0};
            end
          end
          // digit-by-digit integer square root
          if (cnt < 6'(SQ_STEPS)) begin
            if (sq_num >= sq_res + sq_bit) begin
              sq_num <= sq_num - (sq_res + sq_bit);
              sq_res <= (sq_res >> 1) + sq_bit;
            end else begin
              sq_res <= sq_res >> 1;
            end
            sq_bit <= sq_bit >> 2;
          end
          cnt <= cnt + 1'b1;
          if (cnt == 6'(DIV_STEPS - 1)) state <= S_INIT;
        end
        S_INIT: begin
          len     <= sq_res[31:0];
          u_tprev <= '0;
          for (int a = 0; a < 3; a++) begin
            logic [16:0] bdist;
            bdist = neg[a] ? {1'b0, frac[a]} : (17'h10000 - 17'(frac[a]));
            if (ad[a] == '0) begin
              u_tdel[a] <= T_INF;
              u_tmax[a] <= T_INF;
            end else begin
              u_tdel[a] <= 48'(quo[a]);
              u_tmax[a] <= 48'((64'(bdist) * 64'(quo[a])) >> 16);
            end
          end
          state <= S_RUN;
        end
        S_RUN: if (emit) begin
          out_valid     <= 1'b1;
          out_data.vox  <= '{x: u_x, y: u_y, z: u_z};
          out_data.w    <= W_W'(v_wprod >> (TB + Q - W_FRAC));
          out_data.last <= v_last;
          // replace: u <= v
          u_tprev <= v_tn;
          if (v_adv[0]) begin
            u_x <= neg[0] ? u_x - 1'b1 : u_x + 1'b1;
            u_tmax[0] <= u_tmax[0] + u_tdel[0];
          end
          if (v_adv[1]) begin
            u_y <= neg[1] ? u_y - 1'b1 : u_y + 1'b1;
            u_tmax[1] <= u_tmax[1] + u_tdel[1];
          end
          if (v_adv[2]) begin
            u_z <= neg[2] ? u_z - 1'b1 : u_z + 1'b1;
            u_tmax[2] <= u_tmax[2] + u_tdel[2];
          end
          if (v_last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
