// addr_gen: AddrGen stage of the texture pipeline.
//
// For each fragment it forms the 2x2 texel footprint used by bilinear
// filtering: (u0, v0) is the integer part of the sampling point, (u1, v1)
// the next column and row, both wrapped to the texture size (repeat
// addressing, power-of-two textures); the fraction bits become the filter
// weights fu, fv. For trilinear filtering the same is done in the next
// coarser mip level (identifier tid+1, coordinates and size halved). In the same stage the direction decision compares the
// sampling point with the previous one and chooses u-index or v-index for
// the cache, and a span counter numbers the spans for the miss statistics.
// That the direction decision sits here follows the design; the footprint
// arithmetic, the wrap mode, the mip-level numbering and the span numbering
// are this implementation's choices (sampling points are taken at texel corners,
// without the half-texel shift of some APIs).
//
// Interface and timing: valid/ready in and out, one output register. A
// fragment accepted in one cycle appears at the output in the next; the
// stage accepts a fragment whenever its register is empty or being read.
module addr_gen
  import tex_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  frag_t in_frag,
  output logic  out_valid,
  input  logic  out_ready,
  output foot_t out_foot
);

  logic take;
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  // direction decision on the fixed-point sampling point
  dir_e dir;
  dir_decision u_dir (
    .clk        (clk),
    .rst_n      (rst_n),
    .take       (take),
    .span_start (in_frag.span_start),
    .u          (in_frag.u),
    .v          (in_frag.v),
    .dir        (dir)
  );

  // wrap masks from the texture size
  function automatic logic [UW-1:0] size_mask(input logic [3:0] log2n, input int width);
    logic [UW-1:0] m;
    m = '0;
    for (int i = 0; i < UW; i++)
      if (i < int'(log2n) && i < width) m[i] = 1'b1;
    return m;
  endfunction

  // footprint of one level: the coordinate is shifted right by `lvl` bits
  // (level n+1 has half the resolution) and wrapped to the level's size
  function automatic lvl_t footprint(input logic [CW-1:0] u, input logic [CW-1:0] v,
                                     input logic [TIDW-1:0] tid,
                                     input logic [3:0] log2w, input logic [3:0] log2h,
                                     input logic lvl);
    lvl_t          r;
    logic [CW-1:0] us, vs;
    logic [UW-1:0] mu;
    logic [VW-1:0] mv;
    logic [3:0]    lw, lh;
    us = lvl ? (u >> 1) : u;
    vs = lvl ? (v >> 1) : v;
    lw = (lvl && log2w != 4'd0) ? log2w - 4'd1 : log2w;
    lh = (lvl && log2h != 4'd0) ? log2h - 4'd1 : log2h;
    mu    = size_mask(lw, UW);
    mv    = VW'(size_mask(lh, VW));
    r.tid = tid + TIDW'(lvl);
    r.u0  = us[CW-1:FW] & mu;
    r.v0  = vs[VW+FW-1:FW] & mv;
    r.u1  = (r.u0 + 1'b1) & mu;
    r.v1  = (r.v0 + 1'b1) & mv;
    r.fu  = us[FW-1:0];
    r.fv  = vs[FW-1:0];
    return r;
  endfunction

  logic [SPANW-1:0] span_cnt, span_now;
  assign span_now = in_frag.span_start ? span_cnt + 1'b1 : span_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      span_cnt  <= '0;
      out_foot  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid      <= 1'b1;
        span_cnt       <= span_now;
        out_foot.x     <= in_frag.x;
        out_foot.y     <= in_frag.y;
        out_foot.lv[0] <= footprint(in_frag.u, in_frag.v, in_frag.tid,
                                    in_frag.log2w, in_frag.log2h, 1'b0);
        out_foot.lv[1] <= footprint(in_frag.u, in_frag.v, in_frag.tid,
                                    in_frag.log2w, in_frag.log2h, 1'b1);
        out_foot.trilin   <= in_frag.trilin;
        out_foot.lod_f <= in_frag.lod_f;
        out_foot.dir   <= dir;
        out_foot.span  <= span_now;
        out_foot.color <= in_frag.color;
      end
    end
  end

endmodule
