// tb_texture_unit: end-to-end testbench of the texture pipeline at its
// default parameters (16 KB cache).
//
// A small scene is rasterized here: NTRI triangles, each a stack of
// horizontal spans whose texture coordinates advance about one texel per
// pixel along a direction rotated by a per-triangle angle, so that spans
// map to u-major and to v-major lines in texture space. Textures are
// 256x256 (wrapping at the edge); every third triangle is filtered
// trilinearly between that level and its 128x128 coarser level. Every output pixel is compared, in order,
// with a value computed here from the fragment: texel contents from
// tb_pkg::texel_of, bilinear weights and modulation with the same rounding
// rules as the specification of the stages. Every cache lookup is replayed
// on tb_pkg::cache_model, and its hit/miss outcome must agree; a u-index
// only model is run alongside to report the misses the A-index saves.
// Counters are checked for consistency (hits + misses = 4 per level read,
// cold + intra + inter = misses = memory requests). Each mechanism must
// occur at least once: bilinear and trilinear fragments, hit, miss, stall, u-index and v-index lookups,
// a lookup that hits a line written under the other index, cold miss,
// intra-span and inter-span replacement, a full fragment queue and pixel
// back-pressure.
module tb_texture_unit;
  import tex_pkg::*;
  import tb_pkg::*;

  localparam int NTRI = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             frag_valid = 1'b0, frag_ready;
  frag_t            frag = '0;
  logic             pix_valid, pix_ready = 1'b1;
  pix_t             pix;
  logic             mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [BLKAW-1:0] mem_req_blk;
  texel_t           mem_rsp_data;
  logic             stat_clear = 1'b0;
  logic [CNTW-1:0]  n_hit, n_miss, n_cold, n_intra, n_inter, n_cycles, n_stall;
  int               n_req;

  texture_unit dut (.*);
  tex_mem_model #(.LAT(20), .GAPS(1'b1)) mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_blk,
    .mem_rsp_valid, .mem_rsp_data, .n_req
  );

  int checks = 0, failures = 0;
  pix_t exp_q[$];
  int n_frag = 0, n_pix = 0, n_tri = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", m);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference pixel --------------------------------------------------
  function automatic logic [7:0] ref_lerp(int a, int b, int c, int d, int fu, int fv);
    int top, bot;
    top = a * (16 - fu) + b * fu;
    bot = c * (16 - fu) + d * fu;
    return 8'((top * (16 - fv) + bot * fv + 128) / 256);
  endfunction

  // bilinear sample of one channel in level lvl (0: finer, 1: coarser)
  function automatic int ref_bil(frag_t f, int lvl, int ch);
    int lw, lh, mw, mh, us, vs, ui, vi, u1, v1, tid;
    texel_t t00, t10, t01, t11;
    lw  = int'(f.log2w) - lvl;
    lh  = int'(f.log2h) - lvl;
    if (lw < 0) lw = 0;
    if (lh < 0) lh = 0;
    mw  = (1 << lw) - 1;
    mh  = (1 << lh) - 1;
    us  = int'(f.u) >> lvl;
    vs  = int'(f.v) >> lvl;
    ui  = (us >> FW) & mw;
    vi  = (vs >> FW) & mh;
    u1  = (ui + 1) & mw;
    v1  = (vi + 1) & mh;
    tid = int'(f.tid) + lvl;
    t00 = texel_of(TIDW'(tid), UW'(ui), VW'(vi));
    t10 = texel_of(TIDW'(tid), UW'(u1), VW'(vi));
    t01 = texel_of(TIDW'(tid), UW'(ui), VW'(v1));
    t11 = texel_of(TIDW'(tid), UW'(u1), VW'(v1));
    return ref_lerp(t00[8*ch +: 8], t10[8*ch +: 8], t01[8*ch +: 8], t11[8*ch +: 8],
                    us % 16, vs % 16);
  endfunction

  function automatic pix_t ref_pix(frag_t f);
    pix_t p;
    int b0, b1, tx, w;
    p.x = f.x;
    p.y = f.y;
    w = int'(f.lod_f);
    for (int ch = 0; ch < 4; ch++) begin
      b0 = ref_bil(f, 0, ch);
      b1 = ref_bil(f, 1, ch);
      tx = f.trilin ? (b0 * (16 - w) + b1 * w + 8) / 16 : b0;
      p.color[8*ch +: 8] = 8'((2 * tx * int'(f.color[8*ch +: 8]) + 255) / 510);
    end
    return p;
  endfunction

  // ---- pixel checker and back-pressure -----------------------------------
  int n_bp = 0;
  always @(posedge clk) begin
    if (rst_n && pix_valid && pix_ready) begin
      chk(exp_q.size() > 0 && pix == exp_q[0],
          $sformatf("pixel (%0d,%0d) %h exp %h", pix.x, pix.y, pix.color,
                    exp_q.size() ? exp_q[0].color : '0));
      if (exp_q.size()) void'(exp_q.pop_front());
      n_pix++;
    end
    if (pix_valid && !pix_ready) n_bp++;
    pix_ready <= ($urandom % 8) != 0;
  end

  // ---- cache lookup monitor ----------------------------------------------
  cache_model amodel, umodel;
  int n_look_u = 0, n_look_v = 0, n_cross = 0, n_umiss = 0, n_amiss = 0, n_full = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_cache.req_valid && dut.u_cache.req_ready) begin
      bit eh, uh;
      eh = amodel.access(dut.u_cache.req_tid, dut.u_cache.req_u, dut.u_cache.req_v,
                         dut.u_cache.req_dir, int'(dut.u_cache.req_span));
      uh = umodel.access(dut.u_cache.req_tid, dut.u_cache.req_u, dut.u_cache.req_v,
                         1'b0, 0);
      chk(eh == dut.u_cache.ev_hit, "cache hit/miss differs from model");
      if (!eh) n_amiss++;
      if (!uh) n_umiss++;
      if (dut.u_cache.req_dir == DIR_U) n_look_u++; else n_look_v++;
      if (dut.u_cache.ev_hit &&
          ((|dut.u_cache.hit_u) != (dut.u_cache.req_dir == DIR_U))) n_cross++;
    end
    if (rst_n && frag_valid && !frag_ready) n_full++;
  end

  // ---- scene ---------------------------------------------------------------
  initial begin
    frag_t f;
    int ang, cs, sn, x0, y0, h, len, u0, v0, tid;
    amodel = new(128);
    umodel = new(128);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < NTRI; t++) begin
      // direction of the texture walk along a span: cos/sin in 1/16 texel
      ang = t % 8;
      case (ang)
        0: begin cs = 16;  sn = 0;   end
        1: begin cs = 0;   sn = 16;  end
        2: begin cs = 11;  sn = 11;  end
        3: begin cs = 6;   sn = 15;  end
        4: begin cs = 15;  sn = 6;   end
        5: begin cs = -11; sn = 11;  end
        6: begin cs = 3;   sn = -16; end
        default: begin cs = -16; sn = 2; end
      endcase
      tid = t % 5;
      x0  = $urandom % 400;
      y0  = $urandom % 300;
      u0  = $urandom % 4096;
      v0  = $urandom % 4096;
      h   = 8 + $urandom % 24;
      for (int r = 0; r < h; r++) begin
        len = 2 + ((r < h / 2) ? 3 * r : 3 * (h - r));
        for (int i = 0; i < len; i++) begin
          f = '0;
          f.x = XYW'(x0 + i);
          f.y = XYW'(y0 + r);
          // span direction (cs, sn); next row moves perpendicular
          f.u = CW'(u0 + i * cs - r * sn);
          f.v = CW'(v0 + i * sn + r * cs);
          f.tid = TIDW'(tid);
          f.log2w = 4'd8;
          f.log2h = 4'd8;
          f.trilin = (t % 3 == 2);
          f.lod_f = FW'(t * 5);
          f.color = $urandom | 32'h4040_4040;
          f.span_start = (i == 0);
          frag_valid = 1'b1;
          frag = f;
          #1;
          while (!frag_ready) begin
            @(posedge clk);
            #1;
          end
          exp_q.push_back(ref_pix(f));
          n_frag++;
          if (f.trilin) n_tri++;
          @(posedge clk);
          #1;
          frag_valid = 1'b0;
        end
      end
    end
    frag_valid = 1'b0;
    while (n_pix < n_frag) begin
      @(posedge clk);
      #1;
    end
    repeat (5) @(posedge clk);
    #1;
    chk(exp_q.size() == 0, "pixels missing");
    chk(n_hit + n_miss == CNTW'(4 * n_frag + 4 * n_tri), "hits + misses = 4 per level and fragment");
    chk(n_cold + n_intra + n_inter == n_miss, "cold + intra + inter = misses");
    chk(n_miss == CNTW'(n_req), "misses = memory requests");
    chk(n_miss == CNTW'(n_amiss), "misses = model misses");
    chk(n_cycles > 0 && n_stall > 0, "busy and stall cycles counted");
    $display("trilinear fragments %0d", n_tri);
    $display("fragments %0d, cycles %0d, stall cycles %0d", n_frag, n_cycles, n_stall);
    $display("lookups %0d: hits %0d misses %0d (cold %0d intra %0d inter %0d)",
             n_hit + n_miss, n_hit, n_miss, n_cold, n_intra, n_inter);
    $display("A-index misses %0d; u-index-only model misses %0d", n_amiss, n_umiss);
    $display("mechanisms: u-lookups %0d v-lookups %0d cross-index hits %0d queue-full %0d pixel-backpressure %0d",
             n_look_u, n_look_v, n_cross, n_full, n_bp);
    chk(n_hit > 0, "mechanism: hit");
    chk(n_tri > 0 && n_tri < n_frag, "mechanism: bilinear and trilinear fragments");
    chk(n_miss > 0, "mechanism: miss");
    chk(n_stall > 0, "mechanism: stall");
    chk(n_look_u > 0, "mechanism: u-index lookup");
    chk(n_look_v > 0, "mechanism: v-index lookup");
    chk(n_cross > 0, "mechanism: hit under the other index");
    chk(n_cold > 0, "mechanism: cold miss");
    chk(n_intra > 0, "mechanism: intra-span replacement");
    chk(n_inter > 0, "mechanism: inter-span replacement");
    chk(n_full > 0, "mechanism: fragment queue full");
    chk(n_bp > 0, "mechanism: pixel back-pressure");
    // clearing the statistics
    stat_clear = 1'b1;
    @(posedge clk);
    #1;
    stat_clear = 1'b0;
    chk(n_hit == 0 && n_miss == 0 && n_cycles == 0 && n_stall == 0, "statistics clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
