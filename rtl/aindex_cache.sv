// aindex_cache: two-way set-associative texture cache with adaptive index
// selection (A-index).
//
// A texel at (u, v) of texture tid belongs to the 4x4 block (ub, vb) =
// (u >> 2, v >> 2); the low two bits of u and v select the texel within the
// 64-byte line. A conventional texture cache takes the set index from the
// low bits of ub only (u-index). Here every request carries a direction bit:
// DIR_U takes the index from ub, DIR_V from vb (v-index); the remaining block
// bits form the tag. Each line keeps a 1-bit register telling which index it
// was written with. Because a block may already sit in the cache under the
// other index, the hit check compares tags in both candidate sets (four
// slots: two ways at the u-index set, two at the v-index set); a slot hits
// only when its direction bit matches the index of the set it was found
// in. This pre-comparison fixes the single set and way to read, so the data
// array is read once, after the compare, in the same cycle: one read port.
// These mechanisms follow the design; the LRU replacement, the fill protocol
// and the statistics outputs are this implementation's choices.
//
// Interface and timing:
//  * req_valid/req_ready: one lookup per cycle while idle. A hit returns
//    rsp_texel with rsp_valid one cycle after the request is accepted.
//  * On a miss the line is refilled in the set given by the request's own
//    index selection (LRU way, invalid ways first): mem_req_blk = {tid, vb,
//    ub} is held with mem_req_valid until mem_req_ready, then 16 texels
//    arrive on mem_rsp_valid/mem_rsp_data, row-major (beat = 4*vo + uo).
//    rsp_valid rises the cycle after the last beat; req_ready is low from
//    the miss until then (this is the pipeline stall).
//  * Reset is synchronous and active low; it invalidates every line.
//  * ev_* pulse in the cycle a request is accepted: ev_hit or ev_miss; on a
//    miss ev_victim_valid tells whether a valid line is replaced (else a
//    cold miss) and ev_victim_span gives the span that line was filled in (to be compared
//    with the request's req_span).
module aindex_cache
  import tex_pkg::*;
#(
  parameter int SETS = 128  // sets per way: 16 KB / 64 B / 2 ways
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup request
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [TIDW-1:0]  req_tid,
  input  logic [UW-1:0]    req_u,
  input  logic [VW-1:0]    req_v,
  input  dir_e             req_dir,
  input  logic [SPANW-1:0] req_span,
  // response
  output logic             rsp_valid,
  output texel_t           rsp_texel,
  // line fill from texture memory
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic [BLKAW-1:0] mem_req_blk,
  input  logic             mem_rsp_valid,
  input  texel_t           mem_rsp_data,
  // events for the miss statistics
  output logic             ev_hit,
  output logic             ev_miss,
  output logic             ev_victim_valid,
  output logic [SPANW-1:0] ev_victim_span
);

  localparam int WAYS  = 2;
  localparam int LT    = 16;                 // texels per line
  localparam int IDXW  = $clog2(SETS);
  localparam int TAGW  = TIDW + UBW + VBW - IDXW;
  localparam int DEPTH = WAYS * SETS * LT;

  // ---- per-line state ---------------------------------------------------
  logic [WAYS-1:0]  line_valid [SETS];
  logic [WAYS-1:0]  line_dir   [SETS];       // 0: written with u-index, 1: v-index
  logic [TAGW-1:0]  line_tag   [WAYS][SETS];
  logic [SPANW-1:0] line_span  [WAYS][SETS];
  logic             lru        [SETS];       // way to replace next
  texel_t           data_mem   [DEPTH];

  // ---- address split ----------------------------------------------------
  logic [UBW-1:0]  ub;
  logic [VBW-1:0]  vb;
  logic [IDXW-1:0] idx_u, idx_v;
  logic [TAGW-1:0] tag_u, tag_v;
  logic [3:0]      offs;

  assign ub    = req_u[UW-1:BLK];
  assign vb    = req_v[VW-1:BLK];
  assign idx_u = ub[IDXW-1:0];
  assign idx_v = vb[IDXW-1:0];
  assign tag_u = {req_tid, vb, ub[UBW-1:IDXW]};
  assign tag_v = {req_tid, ub, vb[VBW-1:IDXW]};
  assign offs  = {req_v[BLK-1:0], req_u[BLK-1:0]};

  // ---- pre-compare: four slots ------------------------------------------
  logic [WAYS-1:0] hit_u, hit_v;
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      hit_u[w] = line_valid[idx_u][w] && (line_dir[idx_u][w] == DIR_U) &&
                 (line_tag[w][idx_u] == tag_u);
      hit_v[w] = line_valid[idx_v][w] && (line_dir[idx_v][w] == DIR_V) &&
                 (line_tag[w][idx_v] == tag_v);
    end
  end

  logic            hit;
  logic [IDXW-1:0] hit_set;
  logic            hit_way;
  assign hit     = |hit_u || |hit_v;
  assign hit_set = (|hit_u) ? idx_u : idx_v;
  assign hit_way = (|hit_u) ? hit_u[1] : hit_v[1];

  // ---- victim selection (index of the request's own direction) ----------
  logic [IDXW-1:0] vic_set;
  logic            vic_way;
  always_comb begin
    vic_set = (req_dir == DIR_V) ? idx_v : idx_u;
    if (!line_valid[vic_set][0])      vic_way = 1'b0;
    else if (!line_valid[vic_set][1]) vic_way = 1'b1;
    else                              vic_way = lru[vic_set];
  end

  // ---- control ------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_MREQ, S_FILL} state_e;
  state_e state;

  logic [IDXW-1:0]  f_set;
  logic             f_way;
  logic [TAGW-1:0]  f_tag;
  dir_e             f_dir;
  logic [SPANW-1:0] f_span;
  logic [3:0]       f_offs;
  logic [3:0]       f_beat;
  logic [BLKAW-1:0] f_blk;
  texel_t           f_texel;

  logic accept;
  assign req_ready     = (state == S_IDLE);
  assign accept        = req_valid && req_ready;
  assign mem_req_valid = (state == S_MREQ);
  assign mem_req_blk   = f_blk;

  assign ev_hit          = accept && hit;
  assign ev_miss         = accept && !hit;
  assign ev_victim_valid = line_valid[vic_set][vic_way];
  assign ev_victim_span  = line_span[vic_way][vic_set];

  // Data array: single read (after pre-compare) and single write (fill).
  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_rsp_valid)
      data_mem[{f_way, f_set, f_beat}] <= mem_rsp_data;
  end

  always_ff @(posedge clk) begin
    if (accept && hit)
      rsp_texel <= data_mem[{hit_way, hit_set, offs}];
    else if (state == S_FILL && mem_rsp_valid && f_beat == 4'd15)
      rsp_texel <= (f_offs == 4'd15) ? mem_rsp_data : f_texel;
  end

  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_rsp_valid && f_beat == f_offs)
      f_texel <= mem_rsp_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rsp_valid <= 1'b0;
      f_set     <= '0;
      f_way     <= 1'b0;
      f_tag     <= '0;
      f_dir     <= DIR_U;
      f_span    <= '0;
      f_offs    <= '0;
      f_beat    <= '0;
      f_blk     <= '0;
      for (int s = 0; s < SETS; s++) begin
        line_valid[s] <= '0;
        line_dir[s]   <= '0;
        lru[s]        <= 1'b0;
      end
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (accept) begin
            if (hit) begin
              rsp_valid    <= 1'b1;
              lru[hit_set] <= ~hit_way;
            end else begin
              // The victim line is invalidated now and rewritten after fill.
              line_valid[vic_set][vic_way] <= 1'b0;
              f_set  <= vic_set;
              f_way  <= vic_way;
              f_tag  <= (req_dir == DIR_V) ? tag_v : tag_u;
              f_dir  <= req_dir;
              f_span <= req_span;
              f_offs <= offs;
              f_beat <= '0;
              f_blk  <= {req_tid, vb, ub};
              state  <= S_MREQ;
            end
          end
        end
        S_MREQ: begin
          if (mem_req_ready) state <= S_FILL;
        end
        S_FILL: begin
          if (mem_rsp_valid) begin
            f_beat <= f_beat + 4'd1;
            if (f_beat == 4'd15) begin
              line_valid[f_set][f_way] <= 1'b1;
              line_dir[f_set][f_way]   <= f_dir;
              lru[f_set]               <= ~f_way;
              rsp_valid                <= 1'b1;
              state                    <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Tag and span arrays have no reset: they are only read behind line_valid.
  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_rsp_valid && f_beat == 4'd15) begin
      line_tag[f_way][f_set]  <= f_tag;
      line_span[f_way][f_set] <= f_span;
    end
  end

  // The requester must hold a request stable until it is accepted.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable({req_tid, req_u, req_v, req_dir});
  endproperty
  assert property (p_req_stable) else $error("aindex_cache: request changed while stalled");

  // A block is never cached twice: at most one of the four slots hits.
  assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> $countones({hit_u, hit_v}) <= 1)
    else $error("aindex_cache: block found in more than one slot");

endmodule
