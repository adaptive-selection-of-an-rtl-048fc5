// texel_read: TexelRead stage of the texture pipeline.
//
// Reads the texels of a fragment's footprint from the texture cache: the
// four texels (u0,v0), (u1,v0), (u0,v1), (u1,v1) of the finer mip level,
// and for a trilinear fragment the same four of the coarser level after
// them, each with the fragment's index selection and span number. Lookups
// are issued back to back, one per cycle while the cache accepts them; the
// cache answers in order, so responses are simply counted into place.
// While the cache refills a line it stops accepting requests and this
// stage, and through the valid/ready handshakes every stage before it,
// stalls. The design names the stage; the issue order and the overlapped
// issue are this implementation's choices.
//
// Interface and timing: valid/ready on the footprint input and the texel
// output. With all hits a bilinear fragment takes five cycles from
// acceptance to out_valid (a trilinear one nine); the next fragment is
// accepted in the cycle the texels are taken, so with hits a bilinear
// fragment passes every six cycles, a trilinear one every ten. `stall` is
// high in every cycle a lookup waits for the cache.
module texel_read
  import tex_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  foot_t            in_foot,
  output logic             out_valid,
  input  logic             out_ready,
  output quad_t            out_quad,
  // texture cache lookup
  output logic             c_req_valid,
  input  logic             c_req_ready,
  output logic [TIDW-1:0]  c_req_tid,
  output logic [UW-1:0]    c_req_u,
  output logic [VW-1:0]    c_req_v,
  output dir_e             c_req_dir,
  output logic [SPANW-1:0] c_req_span,
  input  logic             c_rsp_valid,
  input  texel_t           c_rsp_texel,
  output logic             stall
);

  logic       busy;
  foot_t      f;
  logic [3:0] n_iss, n_rsp;          // lookups issued / answered (0..8)
  logic [3:0] n_need;                // 4 (bilinear) or 8 (trilinear)
  texel_t     t [8];
  logic       lvl;                   // level of the lookup being issued

  assign n_need      = f.trilin ? 4'd8 : 4'd4;
  assign lvl         = n_iss[2];
  assign in_ready    = !busy || (out_valid && out_ready);
  assign c_req_valid = busy && (n_iss != n_need);
  assign c_req_tid   = f.lv[lvl].tid;
  assign c_req_u     = n_iss[0] ? f.lv[lvl].u1 : f.lv[lvl].u0;
  assign c_req_v     = n_iss[1] ? f.lv[lvl].v1 : f.lv[lvl].v0;
  assign c_req_dir   = f.dir;
  assign c_req_span  = f.span;
  assign stall       = c_req_valid && !c_req_ready;
  assign out_valid   = busy && (n_rsp == n_need);

  always_comb begin
    out_quad        = '0;
    out_quad.x      = f.x;
    out_quad.y      = f.y;
    for (int k = 0; k < 8; k++) out_quad.tx[k] = t[k];
    out_quad.fu[0]  = f.lv[0].fu;
    out_quad.fv[0]  = f.lv[0].fv;
    out_quad.fu[1]  = f.lv[1].fu;
    out_quad.fv[1]  = f.lv[1].fv;
    out_quad.trilin = f.trilin;
    out_quad.lod_f  = f.lod_f;
    out_quad.color  = f.color;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      n_iss <= '0;
      n_rsp <= '0;
      f     <= '0;
    end else begin
      if (in_ready) begin
        // idle, or the finished texels leave in this cycle
        busy  <= in_valid;
        n_iss <= '0;
        n_rsp <= '0;
        if (in_valid) f <= in_foot;
      end else begin
        if (c_req_valid && c_req_ready) n_iss <= n_iss + 4'd1;
        if (c_rsp_valid)                n_rsp <= n_rsp + 4'd1;
      end
    end
  end

  // Texels of a bilinear fragment's unused coarser level are left as they
  // are; the filter ignores them.
  always_ff @(posedge clk) begin
    if (busy && c_rsp_valid && n_rsp != n_need) t[n_rsp[2:0]] <= c_rsp_texel;
  end

endmodule
