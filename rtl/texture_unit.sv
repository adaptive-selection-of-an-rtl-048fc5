// texture_unit: texture mapping pipeline with an A-index texture cache.
//
// Rasterized fragments pass through five stages: Fetch (fragment queue),
// AddrGen (bilinear footprint, and the direction decision that picks
// u-index or v-index from the movement of the texture sampling point),
// TexelRead (four lookups per mip level in the 16 KB two-way texture
// cache, stalling on misses while the line is fetched from texture memory),
// Filter (bilinear, or trilinear across two mip levels) and Blend (modulate
// with the fragment colour). The five-stage structure,
// the cache organisation and the A-index follow the design; the stage
// internals, handshakes and counters are this implementation's choices.
//
// Interface and timing: fragments enter on frag_valid/frag_ready, pixels
// leave in order on pix_valid/pix_ready. The texture memory port fetches
// whole 4x4 blocks: mem_req_blk = {tid, v >> 2, u >> 2} is held with
// mem_req_valid until mem_req_ready, then 16 texels are returned in
// row-major order on mem_rsp_valid/mem_rsp_data. Counters (cleared by
// stat_clear or reset): cache hits and misses, the misses split into cold
// misses, intra-span and inter-span replacements, and the cycles in which
// any fragment is inside the pipeline, and the stall cycles in which a
// texel lookup waits for a line fill. Reset is synchronous, active low.
module texture_unit
  import tex_pkg::*;
#(
  parameter int SETS        = 128,  // cache sets per way (16 KB cache)
  parameter int FETCH_DEPTH = 4     // fragment queue depth
) (
  input  logic             clk,
  input  logic             rst_n,
  // fragments from the rasterizer
  input  logic             frag_valid,
  output logic             frag_ready,
  input  frag_t            frag,
  // finished pixels
  output logic             pix_valid,
  input  logic             pix_ready,
  output pix_t             pix,
  // texture memory
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic [BLKAW-1:0] mem_req_blk,
  input  logic             mem_rsp_valid,
  input  texel_t           mem_rsp_data,
  // statistics
  input  logic             stat_clear,
  output logic [CNTW-1:0]  n_hit,
  output logic [CNTW-1:0]  n_miss,
  output logic [CNTW-1:0]  n_cold,
  output logic [CNTW-1:0]  n_intra,
  output logic [CNTW-1:0]  n_inter,
  output logic [CNTW-1:0]  n_cycles,
  output logic [CNTW-1:0]  n_stall
);

  // Fetch -> AddrGen
  logic  fe_valid, fe_ready;
  frag_t fe_frag;
  // AddrGen -> TexelRead
  logic  ag_valid, ag_ready;
  foot_t ag_foot;
  // TexelRead -> Filter
  logic  tr_valid, tr_ready;
  quad_t tr_quad;
  // Filter -> Blend
  logic  fi_valid, fi_ready;
  filt_t fi_filt;
  // TexelRead <-> cache
  logic             c_req_valid, c_req_ready, c_rsp_valid;
  logic [TIDW-1:0]  c_req_tid;
  logic [UW-1:0]    c_req_u;
  logic [VW-1:0]    c_req_v;
  dir_e             c_req_dir;
  logic [SPANW-1:0] c_req_span;
  texel_t           c_rsp_texel;
  logic             tr_stall;
  // cache -> statistics
  logic             ev_hit, ev_miss, ev_victim_valid;
  logic [SPANW-1:0] ev_victim_span;

  frag_fetch #(.DEPTH(FETCH_DEPTH)) u_fetch (
    .clk, .rst_n,
    .in_valid (frag_valid), .in_ready (frag_ready), .in_frag (frag),
    .out_valid(fe_valid),   .out_ready(fe_ready),   .out_frag(fe_frag)
  );

  addr_gen u_addr_gen (
    .clk, .rst_n,
    .in_valid (fe_valid), .in_ready (fe_ready), .in_frag (fe_frag),
    .out_valid(ag_valid), .out_ready(ag_ready), .out_foot(ag_foot)
  );

  texel_read u_texel_read (
    .clk, .rst_n,
    .in_valid   (ag_valid),    .in_ready  (ag_ready),  .in_foot (ag_foot),
    .out_valid  (tr_valid),    .out_ready (tr_ready),  .out_quad(tr_quad),
    .c_req_valid(c_req_valid), .c_req_ready(c_req_ready),
    .c_req_tid  (c_req_tid),   .c_req_u   (c_req_u),   .c_req_v (c_req_v),
    .c_req_dir  (c_req_dir),   .c_req_span(c_req_span),
    .c_rsp_valid(c_rsp_valid), .c_rsp_texel(c_rsp_texel),
    .stall      (tr_stall)
  );

  aindex_cache #(.SETS(SETS)) u_cache (
    .clk, .rst_n,
    .req_valid (c_req_valid), .req_ready(c_req_ready),
    .req_tid   (c_req_tid),   .req_u    (c_req_u),   .req_v(c_req_v),
    .req_dir   (c_req_dir),   .req_span (c_req_span),
    .rsp_valid (c_rsp_valid), .rsp_texel(c_rsp_texel),
    .mem_req_valid, .mem_req_ready, .mem_req_blk, .mem_rsp_valid, .mem_rsp_data,
    .ev_hit, .ev_miss, .ev_victim_valid, .ev_victim_span
  );

  bilinear_filter u_filter (
    .clk, .rst_n,
    .in_valid (tr_valid), .in_ready (tr_ready), .in_quad (tr_quad),
    .out_valid(fi_valid), .out_ready(fi_ready), .out_filt(fi_filt)
  );

  blend_unit u_blend (
    .clk, .rst_n,
    .in_valid (fi_valid),  .in_ready (fi_ready),  .in_filt(fi_filt),
    .out_valid(pix_valid), .out_ready(pix_ready), .out_pix(pix)
  );

  miss_classifier u_stats (
    .clk, .rst_n,
    .clear (stat_clear),
    .ev_hit, .ev_miss, .ev_victim_valid, .ev_victim_span, .ev_span(c_req_span),
    .n_hit, .n_miss, .n_cold, .n_intra, .n_inter
  );

  // Busy cycles: some fragment is inside the pipeline.
  logic busy;
  assign busy = fe_valid || ag_valid || !ag_ready || tr_valid || fi_valid || pix_valid;

  always_ff @(posedge clk) begin
    if (!rst_n || stat_clear) n_cycles <= '0;
    else if (busy)            n_cycles <= n_cycles + 1'b1;
  end

  // Stall cycles: a texel lookup waits while the cache refills a line.
  always_ff @(posedge clk) begin
    if (!rst_n || stat_clear) n_stall <= '0;
    else if (tr_stall)        n_stall <= n_stall + 1'b1;
  end

endmodule
