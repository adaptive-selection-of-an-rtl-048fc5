// tb_addr_gen: self-checking testbench of the AddrGen stage.
// Spans of fragments walk along lines of random slope in textures of random
// power-of-two size (so that footprints wrap at the texture edge); the
// footprints of both mip levels, weights, direction and span number of
// every output are compared with a reference computed here, in order,
// under random back-pressure. The output must appear one cycle after acceptance.
module tb_addr_gen;
  import tex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  frag_t in_frag = '0;
  foot_t out_foot;

  addr_gen dut (.*);

  int checks = 0, failures = 0;
  foot_t exp_q[$];
  int n_wrap = 0, n_u = 0, n_v = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_foot != exp_q[0]) begin
        failures++;
        $display("FAIL: footprint %h exp %h", out_foot, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  // reference footprint: level 1 halves the coordinate and the size
  function automatic lvl_t ref_lvl(int u, int v, int tid, int lw, int lh, int lvl);
    lvl_t r;
    int us, vs, mw, mh;
    us = u >> lvl;
    vs = v >> lvl;
    if (lvl == 1) begin
      lw = (lw > 0) ? lw - 1 : 0;
      lh = (lh > 0) ? lh - 1 : 0;
    end
    mw = (1 << lw) - 1;
    mh = (1 << lh) - 1;
    r.tid = TIDW'(tid + lvl);
    r.u0  = UW'((us >> FW) & mw);
    r.v0  = VW'((vs >> FW) & mh);
    r.u1  = UW'(((us >> FW) + 1) & mw);
    r.v1  = VW'(((vs >> FW) + 1) & mh);
    r.fu  = FW'(us);
    r.fv  = FW'(vs);
    return r;
  endfunction

  function automatic int absd(int a, int b);
    int d;
    d = (a - b) & ((1 << CW) - 1);
    if (d >= (1 << (CW - 1))) d = (1 << CW) - d;
    return d;
  endfunction

  initial begin
    int pu, pv, pdir, span, su, sv, len, lw, lh, d;
    frag_t f;
    foot_t e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    pu = 0; pv = 0; pdir = 0; span = 0;
    for (int s = 0; s < 400; s++) begin
      su  = int'($urandom % 65) - 32;
      sv  = int'($urandom % 65) - 32;
      len = 1 + $urandom % 12;
      lw  = $urandom % 11;
      lh  = $urandom % 11;
      f   = '0;
      f.u = CW'($urandom);
      f.v = CW'($urandom);
      f.tid = TIDW'($urandom);
      f.log2w = 4'(lw);
      f.log2h = 4'(lh);
      f.trilin = $urandom % 2;
      for (int i = 0; i < len; i++) begin
        if (i > 0) begin
          f.u = f.u + CW'(su);
          f.v = f.v + CW'(sv);
        end
        f.x = XYW'(i);
        f.y = XYW'(s);
        f.color = $urandom;
        f.span_start = (i == 0);
        // reference
        if (i == 0) begin
          d = pdir;
          span++;
        end else d = (absd(int'(f.u), pu) > absd(int'(f.v), pv)) ? 0 : 1;
        f.lod_f = FW'($urandom);
        e = '0;
        e.x = f.x; e.y = f.y; e.color = f.color;
        e.lv[0] = ref_lvl(int'(f.u), int'(f.v), int'(f.tid), lw, lh, 0);
        e.lv[1] = ref_lvl(int'(f.u), int'(f.v), int'(f.tid), lw, lh, 1);
        e.trilin = f.trilin;
        e.lod_f = f.lod_f;
        e.dir = dir_e'(d);
        e.span = SPANW'(span);
        // drive until accepted
        in_valid = 1'b1;
        in_frag  = f;
        forever begin
          out_ready = ($urandom % 3) != 0;
          #1;
          if (in_ready) break;
          @(posedge clk);
          #1;
        end
        exp_q.push_back(e);
        pu = int'(f.u); pv = int'(f.v); pdir = d;
        if (e.lv[0].u1 < e.lv[0].u0 || e.lv[0].v1 < e.lv[0].v0) n_wrap++;
        if (d == 0) n_u++; else n_v++;
        @(posedge clk);
        #1;
        in_valid = 1'b0;
      end
    end
    out_ready = 1'b1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_wrap == 0 || n_u == 0 || n_v == 0) begin
      failures++;
      $display("FAIL: left %0d, wraps %0d, u %0d, v %0d", exp_q.size(), n_wrap, n_u, n_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
