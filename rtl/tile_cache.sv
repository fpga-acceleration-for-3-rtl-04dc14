// tile_cache: on-chip cache of the reconstruction window, shared by all PEs.
// It holds whole tiles of TILE_XY x TILE_XY x TILE_Z voxels, each voxel a
// 16-bit image value f and an 8-bit edge indicator v, and serves one
// five-point cross stencil read (centre, x+1, x-1, y+1, y-1) and one
// single-voxel write per cycle.
//
// Colouring: storage is split into 16 banks; voxel (x, y) lives in bank
// (x mod 4) + 4*(y mod 4). The five points of a cross always fall in five
// different banks, so a stencil is read in a single cycle. Each bank has one
// read and one write port (true dual-port block RAM).
//
// Tiles: SLOTS_XY x SLOTS_XY tile slots, direct mapped by
// (tile_x mod SLOTS_XY, tile_y mod SLOTS_XY); a slot holds one tile at a
// time, identified by its (tile_x, tile_y, tile_z) tag. Inside the banks a
// voxel is placed by its coordinates modulo SLOTS_XY*TILE_XY, which must be a
// multiple of 4 so that the colour is unchanged by the wrap. A request whose
// tiles are not all resident is held (ready low) while the slot's old tile is
// written back if dirty and the new tile is loaded from the window memory,
// one word per transfer; it is then served. flush writes back every dirty
// tile and empties the cache, for use when the sliding window moves.
// Stencil points outside the volume take the centre value (zero-flux
// boundary).
//
// Timing: rd_ready and wr_ready are combinational hits; stencil data appear
// one cycle after a read is accepted (rsp_valid). The tile shape 110x110x6 and
// 16 colours follow the design; slot organisation, miss handling and the
// boundary rule are this design's choices.
module tile_cache
  import ct_pkg::*;
#(
  parameter int NX       = 874,
  parameter int NY       = 874,
  parameter int L        = 24,
  parameter int TILE_XY  = 110,
  parameter int TILE_Z   = 6,
  parameter int SLOTS_XY = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // stencil read
  input  logic      rd_valid,
  output logic      rd_ready,
  input  vox_t      rd_vox,
  output logic      rsp_valid,
  output stencil_t  rsp_data,
  // centre write
  input  logic      wr_valid,
  output logic      wr_ready,
  input  cache_wr_t wr_data,
  // flush
  input  logic      flush_req,
  output logic      flush_done,
  // window memory port (window coordinates)
  output logic      mem_req_valid,
  input  logic      mem_req_ready,
  output logic      mem_req_we,
  output vox_t      mem_req_vox,
  output logic [F_W+V_W-1:0] mem_req_wdata,
  input  logic      mem_rsp_valid,
  input  logic [F_W+V_W-1:0] mem_rsp_rdata,
  // events
  output logic      ev_miss,
  output logic      ev_evict
);
  localparam int CX     = SLOTS_XY * TILE_XY;       // cached extent in x and y
  localparam int CW     = CX / 4;                   // words per bank row
  localparam int BDEPTH = TILE_Z * CW * CW;         // words per bank
  localparam int BAW    = $clog2(BDEPTH);
  localparam int NSLOT  = SLOTS_XY * SLOTS_XY;
  localparam int SW     = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  localparam int DW     = F_W + V_W;

  initial begin
    assert (CX % 4 == 0) else $error("SLOTS_XY*TILE_XY must be a multiple of 4");
  end

  typedef struct packed {
    logic [Z_W-1:0] tz;
    logic [X_W-1:0] ty;
    logic [X_W-1:0] tx;
  } tag_t;

  function automatic tag_t tag_of(input vox_t p);
    tag_t t;
    t.tx = X_W'(32'(p.x) / TILE_XY);
    t.ty = X_W'(32'(p.y) / TILE_XY);
    t.tz = Z_W'(32'(p.z) / TILE_Z);
    return t;
  endfunction

  function automatic logic [SW-1:0] slot_of(input tag_t t);
    return SW'((32'(t.tx) % SLOTS_XY) + SLOTS_XY * (32'(t.ty) % SLOTS_XY));
  endfunction

  function automatic logic [BAW-1:0] addr_of(input vox_t p);
    int cx, cy, cz;
    cx = 32'(p.x) % CX;
    cy = 32'(p.y) % CX;
    cz = 32'(p.z) % TILE_Z;
    return BAW'((cz * CW + cy / 4) * CW + cx / 4);
  endfunction

  // ---------------- banks ----------------
  logic          ren   [16];
  logic [BAW-1:0] raddr [16];
  logic [DW-1:0] rq    [16];
  logic          wen   [16];
  logic [BAW-1:0] waddr [16];
  logic [DW-1:0] wdat  [16];

  for (genvar b = 0; b < 16; b++) begin : g_bank
    logic [DW-1:0] mem [BDEPTH];
    always_ff @(posedge clk) begin
      if (ren[b]) rq[b] <= mem[raddr[b]];
      if (wen[b]) mem[waddr[b]] <= wdat[b];
    end
  end

  // ---------------- tags ----------------
  tag_t tags [NSLOT];
  logic [NSLOT-1:0] tvalid, tdirty;

  // ---------------- control ----------------
  typedef enum logic [2:0] {S_IDLE, S_MISS, S_EV_RD, S_EV_WR, S_FL_RQ, S_FL_WT, S_FLUSH} state_e;
  state_e state;

  tag_t          m_tag;        // tile being loaded
  tag_t          e_tag;        // tile being written back
  logic [SW-1:0] m_slot;
  logic          flushing;
  logic [SW:0]   f_slot;
  logic [X_W-1:0] cx_cnt, cy_cnt;
  logic [Z_W-1:0] cz_cnt;

  // stencil points
  vox_t pts [5];
  logic inr [5];
  logic phit [5];
  logic rd_hit, wr_hit;
  logic [3:0] pbank [5];
  tag_t miss_tag;

  always_comb begin
    pts[0] = rd_vox;
    pts[1] = rd_vox; pts[1].x = rd_vox.x + 1'b1;
    pts[2] = rd_vox; pts[2].x = rd_vox.x - 1'b1;
    pts[3] = rd_vox; pts[3].y = rd_vox.y + 1'b1;
    pts[4] = rd_vox; pts[4].y = rd_vox.y - 1'b1;
    inr[0] = 1'b1;
    inr[1] = (32'(rd_vox.x) + 1 < NX);
    inr[2] = (rd_vox.x != '0);
    inr[3] = (32'(rd_vox.y) + 1 < NY);
    inr[4] = (rd_vox.y != '0);
    rd_hit   = 1'b1;
    miss_tag = tag_of(rd_vox);
    for (int p = 4; p >= 0; p--) begin
      tag_t t;
      t = tag_of(pts[p]);
      pbank[p] = color_of(pts[p].x, pts[p].y);
      phit[p]  = !inr[p] || (tvalid[slot_of(t)] && tags[slot_of(t)] == t);
      if (!phit[p]) begin
        rd_hit   = 1'b0;
        miss_tag = t;
      end
    end
    wr_hit = tvalid[slot_of(tag_of(wr_data.vox))] &&
             tags[slot_of(tag_of(wr_data.vox))] == tag_of(wr_data.vox);
  end

  assign rd_ready = (state == S_IDLE) && rd_hit;
  assign wr_ready = (state == S_IDLE) && wr_hit;

  // current word of the tile walk
  tag_t walk_tag;
  vox_t walk_vox;
  logic walk_inr, walk_end;
  always_comb begin
    walk_tag = (state == S_EV_RD || state == S_EV_WR) ? e_tag : m_tag;
    walk_vox.x = X_W'(32'(walk_tag.tx) * TILE_XY + 32'(cx_cnt));
    walk_vox.y = X_W'(32'(walk_tag.ty) * TILE_XY + 32'(cy_cnt));
    walk_vox.z = Z_W'(32'(walk_tag.tz) * TILE_Z + 32'(cz_cnt));
    walk_inr = (32'(walk_tag.tx) * TILE_XY + 32'(cx_cnt) < NX) &&
               (32'(walk_tag.ty) * TILE_XY + 32'(cy_cnt) < NY) &&
               (32'(walk_tag.tz) * TILE_Z + 32'(cz_cnt) < L);
    walk_end = (32'(cx_cnt) == TILE_XY - 1) && (32'(cy_cnt) == TILE_XY - 1) &&
               (32'(cz_cnt) == TILE_Z - 1);
  end

  // bank port steering
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      ren[b] = 1'b0; raddr[b] = '0;
      wen[b] = 1'b0; waddr[b] = '0; wdat[b] = '0;
    end
    if (state == S_IDLE && rd_valid && rd_hit) begin
      for (int p = 0; p < 5; p++)
        if (inr[p]) begin
          ren[pbank[p]]   = 1'b1;
          raddr[pbank[p]] = addr_of(pts[p]);
        end
    end
    if (state == S_IDLE && wr_valid && wr_hit) begin
      wen[color_of(wr_data.vox.x, wr_data.vox.y)]   = 1'b1;
      waddr[color_of(wr_data.vox.x, wr_data.vox.y)] = addr_of(wr_data.vox);
      wdat[color_of(wr_data.vox.x, wr_data.vox.y)]  = {wr_data.f, wr_data.v};
    end
    if (state == S_EV_RD && walk_inr) begin
      ren[color_of(walk_vox.x, walk_vox.y)]   = 1'b1;
      raddr[color_of(walk_vox.x, walk_vox.y)] = addr_of(walk_vox);
    end
    if (state == S_FL_WT && mem_rsp_valid) begin
      wen[color_of(walk_vox.x, walk_vox.y)]   = 1'b1;
      waddr[color_of(walk_vox.x, walk_vox.y)] = addr_of(walk_vox);
      wdat[color_of(walk_vox.x, walk_vox.y)]  = mem_rsp_rdata;
    end
  end

  // memory port
  assign mem_req_valid = (state == S_EV_WR) || (state == S_FL_RQ && walk_inr);
  assign mem_req_we    = (state == S_EV_WR);
  assign mem_req_vox   = walk_vox;
  assign mem_req_wdata = rq[color_of(walk_vox.x, walk_vox.y)];

  // stencil response
  logic [3:0] rsel [5];
  always_comb begin
    for (int p = 0; p < 5; p++) begin
      rsp_data.f[p] = rq[rsel[p]][DW-1:V_W];
      rsp_data.v[p] = rq[rsel[p]][V_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tvalid     <= '0;
      tdirty     <= '0;
      rsp_valid  <= 1'b0;
      flush_done <= 1'b0;
      flushing   <= 1'b0;
      ev_miss    <= 1'b0;
      ev_evict   <= 1'b0;
      cx_cnt <= '0; cy_cnt <= '0; cz_cnt <= '0;
    end else begin
      rsp_valid  <= 1'b0;
      flush_done <= 1'b0;
      ev_miss    <= 1'b0;
      ev_evict   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (rd_valid && rd_hit) begin
            rsp_valid <= 1'b1;
            for (int p = 0; p < 5; p++) rsel[p] <= inr[p] ? pbank[p] : pbank[0];
          end
          if (wr_valid && wr_hit)
            tdirty[slot_of(tag_of(wr_data.vox))] <= 1'b1;
          if (rd_valid && !rd_hit) begin
            m_tag   <= miss_tag;
            m_slot  <= slot_of(miss_tag);
            ev_miss <= 1'b1;
            state   <= S_MISS;
          end else if (wr_valid && !wr_hit) begin
            m_tag   <= tag_of(wr_data.vox);
            m_slot  <= slot_of(tag_of(wr_data.vox));
            ev_miss <= 1'b1;
            state   <= S_MISS;
          end else if (flush_req && !rd_valid && !wr_valid) begin
            flushing <= 1'b1;
            f_slot   <= '0;
            state    <= S_FLUSH;
          end
        end
        S_MISS: begin
          cx_cnt <= '0; cy_cnt <= '0; cz_cnt <= '0;
          if (tvalid[m_slot] && tdirty[m_slot]) begin
            e_tag    <= tags[m_slot];
            ev_evict <= 1'b1;
            state    <= S_EV_RD;
          end else begin
            tvalid[m_slot] <= 1'b0;
            state <= S_FL_RQ;
          end
        end
        S_EV_RD: begin
          if (walk_inr) state <= S_EV_WR;
          else if (walk_end) begin
            cx_cnt <= '0; cy_cnt <= '0; cz_cnt <= '0;
            tvalid[m_slot] <= 1'b0;
            tdirty[m_slot] <= 1'b0;
            state <= flushing ? S_FLUSH : S_FL_RQ;
          end else step_walk();
        end
        S_EV_WR: if (mem_req_ready) begin
          if (walk_end) begin
            cx_cnt <= '0; cy_cnt <= '0; cz_cnt <= '0;
            tvalid[m_slot] <= 1'b0;
            tdirty[m_slot] <= 1'b0;
            state <= flushing ? S_FLUSH : S_FL_RQ;
          end else begin
            step_walk();
            state <= S_EV_RD;
          end
        end
        S_FL_RQ: begin
          if (walk_inr) begin
            if (mem_req_ready) state <= S_FL_WT;
          end else if (walk_end) begin
            tags[m_slot]   <= m_tag;
            tvalid[m_slot] <= 1'b1;
            tdirty[m_slot] <= 1'b0;
            state <= S_IDLE;
          end else step_walk();
        end
        S_FL_WT: if (mem_rsp_valid) begin
          if (walk_end) begin
            tags[m_slot]   <= m_tag;
            tvalid[m_slot] <= 1'b1;
            tdirty[m_slot] <= 1'b0;
            state <= S_IDLE;
          end else begin
            step_walk();
            state <= S_FL_RQ;
          end
        end
        S_FLUSH: begin
          if (f_slot == (SW+1)'(NSLOT)) begin
            tvalid     <= '0;
            tdirty     <= '0;
            flushing   <= 1'b0;
            flush_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            f_slot <= f_slot + 1'b1;
            if (tvalid[SW'(f_slot)] && tdirty[SW'(f_slot)]) begin
              m_slot   <= SW'(f_slot);
              e_tag    <= tags[SW'(f_slot)];
              ev_evict <= 1'b1;
              cx_cnt <= '0; cy_cnt <= '0; cz_cnt <= '0;
              state    <= S_EV_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  task automatic step_walk();
    if (32'(cx_cnt) == TILE_XY - 1) begin
      cx_cnt <= '0;
      if (32'(cy_cnt) == TILE_XY - 1) begin
        cy_cnt <= '0;
        cz_cnt <= cz_cnt + 1'b1;
      end else cy_cnt <= cy_cnt + 1'b1;
    end else cx_cnt <= cx_cnt + 1'b1;
  endtask

  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid);
endmodule
