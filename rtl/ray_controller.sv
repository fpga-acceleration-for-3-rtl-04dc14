// ray_controller: schedules the beams of one source position and dispatches
// them to the PEs. Beams are visited in execution blocks of C_B detector
// channels by W_B detector rows, so that the beams in flight at any time are
// neighbours and share the cached tiles:
//   for cb in 0 .. ceil(C/C_B)-1
//     for wb in 0 .. ceil(W/W_B)-1
//       for c in block cb (C_B channels, fewer in the last block)
//         for w in block wb (W_B rows)
//           dispatch beam (c, w)
// For each beam the controller asks the projection memory for its descriptor
// (segment end points in window coordinates and measured value g, prepared
// from the scanner geometry), then hands it to the next idle PE in
// round-robin order. Each beam is dispatched exactly once. done pulses when
// every beam of the source position has been dispatched and all PEs are idle.
// Interface: start (pulse) begins a source position; desc_req_* / desc_rsp_*
// is the descriptor port (address = w * C + c); pe_valid/pe_ready/pe_beam
// are the dispatch ports, pe_busy the PEs' busy flags.
// Timing: one dispatch per descriptor round trip plus two cycles.
// From the reconstruction method: the blocked visiting order and the 48 x 1
// block. This design's own choices: the descriptor port, the round-robin PE
// choice and the done condition.
module ray_controller
  import ct_pkg::*;
#(
  parameter int N_PE = 48,
  parameter int C    = 736,
  parameter int W    = 16,
  parameter int C_B  = 48,
  parameter int W_B  = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            done,
  output logic            active,
  output logic            desc_req_valid,
  input  logic            desc_req_ready,
  output logic [31:0]     desc_req_addr,
  input  logic            desc_rsp_valid,
  input  beam_t           desc_rsp_beam,
  output logic [N_PE-1:0] pe_valid,
  input  logic [N_PE-1:0] pe_ready,
  output beam_t           pe_beam,
  input  logic [N_PE-1:0] pe_busy,
  output logic [31:0]     dispatched
);
  localparam int IW = (N_PE > 1) ? $clog2(N_PE) : 1;
  localparam int NCB = (C + C_B - 1) / C_B;
  localparam int NWB = (W + W_B - 1) / W_B;

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_DISP, S_DRAIN} state_e;
  state_e state;

  logic [15:0] cb, wb, c, w;
  beam_t       cur;
  logic        g_valid;
  logic [IW-1:0] g_idx;

  rr_arbiter #(.N(N_PE)) u_sel (
    .clk, .rst_n,
    .req(pe_ready & {N_PE{state == S_DISP}}), .accept(1'b1),
    .gnt_valid(g_valid), .gnt_idx(g_idx));

  assign active         = (state != S_IDLE);
  assign desc_req_valid = (state == S_REQ);
  assign desc_req_addr  = 32'(w) * 32'(C) + 32'(c);
  assign pe_beam        = cur;

  always_comb begin
    pe_valid = '0;
    if (state == S_DISP && g_valid) pe_valid[g_idx] = 1'b1;
  end

  // next beam in blocked order
  logic        last_beam;
  logic [15:0] c_end, w_end;
  always_comb begin
    c_end = ((32'(cb) + 1) * C_B < C) ? 16'((32'(cb) + 1) * C_B) : 16'(C);
    w_end = ((32'(wb) + 1) * W_B < W) ? 16'((32'(wb) + 1) * W_B) : 16'(W);
    last_beam = (32'(cb) == NCB - 1) && (32'(wb) == NWB - 1) &&
                (c + 1'b1 == c_end) && (w + 1'b1 == w_end);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      dispatched <= '0;
      cb <= '0; wb <= '0; c <= '0; w <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cb <= '0; wb <= '0; c <= '0; w <= '0;
          state <= S_REQ;
        end
        S_REQ:  if (desc_req_ready) state <= S_WAIT;
        S_WAIT: if (desc_rsp_valid) begin
          cur   <= desc_rsp_beam;
          state <= S_DISP;
        end
        S_DISP: if (g_valid) begin
          dispatched <= dispatched + 1'b1;
          if (last_beam) state <= S_DRAIN;
          else begin
            state <= S_REQ;
            if (w + 1'b1 != w_end) w <= w + 1'b1;
            else begin
              w <= wb * 16'(W_B);
              if (c + 1'b1 != c_end) c <= c + 1'b1;
              else if (32'(wb) + 1 < NWB) begin
                wb <= wb + 1'b1;
                w  <= (wb + 1'b1) * 16'(W_B);
                c  <= cb * 16'(C_B);
              end else begin
                wb <= '0;
                w  <= '0;
                cb <= cb + 1'b1;
                c  <= (cb + 1'b1) * 16'(C_B);
              end
            end
          end
        end
        S_DRAIN: if (pe_busy == '0 && pe_ready != '0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
