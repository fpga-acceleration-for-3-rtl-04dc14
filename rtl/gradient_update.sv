// gradient_update: fourth PE stage. Applies one gradient-descent step of the
// Mumford-Shah functional (Gamma-approximation) to every voxel of a beam,
// from the beam's local copy of f and v and the beam residual r:
//   grad_f = 2 r w  - 2 alpha * div(v^2 grad f)                     (eq. 3)
//   grad_v = 2 alpha |grad f|^2 v + beta/(2 eps) (v - 1)
//            - 2 beta eps * Laplacian(v)                             (eq. 4)
//   f <- f - lambda_k grad_f,   v <- clamp(v - mu_k grad_v, 0, 1)
// with the differential operators taken on the 5-point cross stencil in the
// slice plane: Laplacian(u) = u_E + u_W + u_S + u_N - 4 u_C, grad f by
// central differences, and div(v^2 grad f) approximated as
// v_C^2 * Laplacian(f).
//
// Pipeline: three register stages (stencil terms, gradients, update), one
// voxel per cycle, the whole pipeline stalls when the output is not taken.
// Interface: in_* carries fetch_t records of the beam; r_* carries the beam
// residual (Q16), which must be present for the first voxel and is consumed
// with the last; lambda and mu are Q24 step sizes held for the iteration;
// out_* gives upd_t (new centre f and v). Arithmetic is in 16 fractional
// bits. The equations and alpha = 0.1, beta = 0.05 follow the design; the
// discretisation, epsilon = 1 voxel and fixed-point rounding (truncation) are
// this design's choices.
module gradient_update
  import ct_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        lambda,
  input  logic [31:0]        mu,
  input  logic               r_valid,
  output logic               r_ready,
  input  logic signed [31:0] r,
  input  logic               in_valid,
  output logic               in_ready,
  input  fetch_t             in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output upd_t               out_data
);
  typedef logic signed [63:0] q_t;   // Q16 working values

  function automatic q_t mulq(input q_t a, input q_t b);
    return (a * b) >>> Q;
  endfunction

  logic en;
  assign en       = !out_valid || out_ready;
  assign in_ready = en && r_valid;
  assign r_ready  = in_valid && in_ready && in_data.last;

  // stage 1
  logic s1_v, s1_last;
  vox_t s1_vox;
  q_t   s1_fc, s1_vc, s1_lapf, s1_lapv, s1_v2, s1_g2, s1_rw2;
  // stage 2
  logic s2_v, s2_last;
  vox_t s2_vox;
  q_t   s2_fc, s2_vc, s2_gf, s2_gv;

  q_t fq [5], vq [5], gx, gy;
  always_comb begin
    for (int p = 0; p < 5; p++) begin
      fq[p] = q_t'($signed(in_data.st.f[p])) <<< (Q - F_FRAC);
      vq[p] = q_t'({1'b0, in_data.st.v[p]}) <<< (Q - V_FRAC);
    end
    gx = (fq[1] - fq[2]) >>> 1;
    gy = (fq[3] - fq[4]) >>> 1;
  end

  q_t f_new, v_new;
  always_comb begin
    f_new = s2_fc - ((s2_gf * q_t'(lambda)) >>> 24);
    v_new = s2_vc - ((s2_gv * q_t'(mu)) >>> 24);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; out_valid <= 1'b0;
    end else if (en) begin
      // stage 1: stencil terms
      s1_v    <= in_valid && in_ready;
      s1_last <= in_data.last;
      s1_vox  <= in_data.vox;
      s1_fc   <= fq[0];
      s1_vc   <= vq[0];
      s1_lapf <= fq[1] + fq[2] + fq[3] + fq[4] - (fq[0] <<< 2);
      s1_lapv <= vq[1] + vq[2] + vq[3] + vq[4] - (vq[0] <<< 2);
      s1_v2   <= mulq(vq[0], vq[0]);
      s1_g2   <= mulq(gx, gx) + mulq(gy, gy);
      s1_rw2  <= mulq(q_t'(r) <<< 1, q_t'({1'b0, in_data.w}) <<< (Q - W_FRAC));
      // stage 2: gradients
      s2_v    <= s1_v;
      s2_last <= s1_last;
      s2_vox  <= s1_vox;
      s2_fc   <= s1_fc;
      s2_vc   <= s1_vc;
      s2_gf   <= s1_rw2 - mulq(q_t'(ALPHA2_Q16), mulq(s1_v2, s1_lapf));
      s2_gv   <= mulq(mulq(q_t'(ALPHA2_Q16), s1_g2), s1_vc)
               + mulq(q_t'(BETA_2EPS_Q16), s1_vc - (q_t'(1) <<< Q))
               - mulq(q_t'(BETA2EPS_Q16), s1_lapv);
      // stage 3: update and saturate
      out_valid     <= s2_v;
      out_data.vox  <= s2_vox;
      out_data.last <= s2_last;
      if ((f_new >>> (Q - F_FRAC)) > q_t'(32767))       out_data.f <= 16'sh7fff;
      else if ((f_new >>> (Q - F_FRAC)) < q_t'(-32768)) out_data.f <= 16'sh8000;
      else out_data.f <= F_W'(f_new >>> (Q - F_FRAC));
      if (v_new < 0)                               out_data.v <= '0;
      else if ((v_new >>> (Q - V_FRAC)) > q_t'(V_ONE)) out_data.v <= V_W'(V_ONE);
      else out_data.v <= V_W'(v_new >>> (Q - V_FRAC));
    end
  end
endmodule
