// forward_projector: third PE stage. Computes the forward projection of one
// beam, R_(i) f_(i) = sum_k f_Ik * w_k (eq. (5)), and the residual
// r = R_(i) f_(i) - g_i that the gradient step needs.
//
// Latency-aware accumulation: instead of one accumulator, whose add latency
// would limit the loop to one voxel every few cycles, products are added
// round-robin into LATENCY partial sums, so consecutive voxels never touch
// the same partial sum within LATENCY cycles and one voxel is taken every
// cycle. After the beam's last voxel the LATENCY partial sums are folded
// with the same single adder (LATENCY cycles) and g is subtracted.
//
// Interface: in_* carries f of the centre voxel (Q12) and w (Q14) with last;
// g_* carries the beam's measured value (Q16), consumed with the residual;
// out_* gives r (Q16). Timing: one voxel per cycle while a beam streams in;
// r appears LATENCY + 2 cycles after the last voxel, during which input is
// held off. The partial-sum scheme follows the design; the widths and the
// LATENCY default of 4 are this design's choices.
module forward_projector
  import ct_pkg::*;
#(
  parameter int LATENCY = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  f_t                 in_f,
  input  w_t                 in_w,
  input  logic               in_last,
  input  logic               g_valid,
  output logic               g_ready,
  input  logic signed [31:0] g,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [31:0] out_r
);
  localparam int PW = $clog2(LATENCY) > 0 ? $clog2(LATENCY) : 1;

  typedef enum logic [1:0] {S_ACC, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic signed [47:0] acc [LATENCY];
  logic [PW-1:0]      ptr, dcnt;
  logic               p_valid, p_last;
  logic signed [31:0] p;            // product, Q26
  logic signed [47:0] sum;

  assign in_ready  = (state == S_ACC) && !(p_valid && p_last);
  assign out_valid = (state == S_OUT) && g_valid;
  assign g_ready   = out_valid && out_ready;
  assign out_r     = 32'((sum >>> (F_FRAC + W_FRAC - Q)) - 48'(g));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_ACC;
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      ptr     <= '0;
      for (int i = 0; i < LATENCY; i++) acc[i] <= '0;
    end else begin
      // multiply stage
      p_valid <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        p      <= 32'(in_f) * $signed({1'b0, in_w});
        p_last <= in_last;
      end
      unique case (state)
        S_ACC: if (p_valid) begin
          acc[ptr] <= acc[ptr] + 48'(p);
          ptr      <= (32'(ptr) == LATENCY - 1) ? '0 : ptr + 1'b1;
          if (p_last) begin
            state <= S_DRAIN;
            dcnt  <= '0;
            sum   <= '0;
            p_last <= 1'b0;
          end
        end
        S_DRAIN: begin
          sum       <= sum + acc[dcnt];
          acc[dcnt] <= '0;
          dcnt      <= dcnt + 1'b1;
          if (32'(dcnt) == LATENCY - 1) state <= S_OUT;
        end
        S_OUT: if (out_valid && out_ready) begin
          ptr   <= '0;
          state <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end
endmodule
