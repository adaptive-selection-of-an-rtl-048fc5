// tb_texel_read: self-checking testbench of the TexelRead stage.
// A stand-in cache answers each accepted lookup one cycle later with
// tb_pkg::texel_of and drops req_ready at random to imitate line fills.
// Checked: the lookups of each footprint (coordinates in the order
// (u0,v0) (u1,v0) (u0,v1) (u1,v1), finer level first and, for trilinear
// footprints, then the coarser level; direction and span), the assembled
// texels, the stall flag, that without stalls a footprint is ready five
// (bilinear) or nine (trilinear) cycles after it was accepted, and that
// bilinear footprints offered back to back pass one every six cycles.
module tb_texel_read;
  import tex_pkg::*;
  import tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  foot_t            in_foot = '0;
  quad_t            out_quad;
  logic             c_req_valid, c_req_ready = 1'b1;
  logic [TIDW-1:0]  c_req_tid;
  logic [UW-1:0]    c_req_u;
  logic [VW-1:0]    c_req_v;
  dir_e             c_req_dir;
  logic [SPANW-1:0] c_req_span;
  logic             c_rsp_valid = 1'b0;
  texel_t           c_rsp_texel = '0;
  logic             stall;

  texel_read dut (.*);

  int checks = 0, failures = 0;
  bit stall_mode = 0;
  int n_tri = 0;
  int n_stall = 0;
  foot_t cur;
  int    k_req;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic quad_t expect_of(foot_t f, quad_t prev);
    quad_t e;
    e = '0;
    e.x = f.x; e.y = f.y; e.color = f.color;
    e.trilin = f.trilin; e.lod_f = f.lod_f;
    for (int l = 0; l < 2; l++) begin
      e.fu[l] = f.lv[l].fu;
      e.fv[l] = f.lv[l].fv;
    end
    for (int k = 0; k < 8; k++) begin
      if (k < 4 || f.trilin)
        e.tx[k] = texel_of(f.lv[k / 4].tid, (k % 2) ? f.lv[k / 4].u1 : f.lv[k / 4].u0,
                           ((k / 2) % 2) ? f.lv[k / 4].v1 : f.lv[k / 4].v0);
      else
        e.tx[k] = prev.tx[k];          // coarser-level texels not read
    end
    return e;
  endfunction

  // streaming-phase checker
  bit    stream = 0;
  foot_t exp_q[$];
  int    cyc = 0, n_out = 0, first_out = 0, last_out = 0;
  always @(posedge clk) begin
    cyc++;
    if (stream && out_valid && out_ready) begin
      chk(exp_q.size() > 0 && out_quad == expect_of(exp_q[0], out_quad), "streamed quad");
      if (exp_q.size()) void'(exp_q.pop_front());
      if (n_out == 0) first_out = cyc;
      last_out = cyc;
      n_out++;
    end
  end

  // stand-in cache
  always @(posedge clk) begin
    c_rsp_valid <= 1'b0;
    if (rst_n && c_req_valid && c_req_ready) begin
      c_rsp_valid <= 1'b1;
      c_rsp_texel <= texel_of(c_req_tid, c_req_u, c_req_v);
      chk(c_req_u == (k_req[0] ? cur.lv[k_req[2]].u1 : cur.lv[k_req[2]].u0) &&
          c_req_v == (k_req[1] ? cur.lv[k_req[2]].v1 : cur.lv[k_req[2]].v0) &&
          c_req_tid == cur.lv[k_req[2]].tid && c_req_dir == cur.dir && c_req_span == cur.span,
          $sformatf("lookup %0d of footprint", k_req));
      k_req++;
    end
    if (rst_n) chk(stall == (c_req_valid && !c_req_ready), "stall flag");
    if (stall) n_stall++;
    c_req_ready <= stall_mode ? ($urandom % 3) == 0 : 1'b1;
  end

  initial begin
    foot_t f;
    quad_t e;
    int t0, lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 600; n++) begin
      stall_mode = n >= 100;
      f = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      in_valid = 1'b1;
      in_foot  = f;
      #1;
      while (!in_ready) begin
        @(posedge clk);
        #1;
      end
      cur = f;
      k_req = 0;
      @(posedge clk);
      t0 = 0;
      #1;
      in_valid = 1'b0;
      out_ready = 1'b0;
      while (!out_valid) begin
        @(posedge clk);
        #1;
        t0++;
      end
      if (!stall_mode) chk(t0 == (f.trilin ? 9 : 5), $sformatf("footprint latency %0d", t0));
      e = expect_of(f, out_quad);
      // hold the quad for a few cycles under back-pressure
      repeat ($urandom % 3) begin
        @(posedge clk);
        #1;
      end
      chk(out_valid && out_quad == e, "quad");
      chk(k_req == (f.trilin ? 8 : 4), "number of lookups");
      if (f.trilin) n_tri++;
      out_ready = 1'b1;
      @(posedge clk);
      #1;
    end
    chk(n_stall > 0, "stalls seen");
    chk(n_tri > 0, "trilinear footprints seen");
    // Streaming phase: footprints offered back to back with all hits and
    // no back-pressure; one must pass every six cycles.
    stall_mode = 0;
    out_ready  = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    stream = 1;
    for (int n = 0; n < 50; n++) begin
      f = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      f.trilin = 1'b0;
      in_valid = 1'b1;
      in_foot  = f;
      #1;
      while (!in_ready) begin
        @(posedge clk);
        #1;
      end
      cur = f;
      k_req = 0;
      exp_q.push_back(f);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    while (exp_q.size() != 0) begin
      @(posedge clk);
      #1;
    end
    chk(n_out == 50, $sformatf("streamed quads %0d", n_out));
    chk(last_out - first_out == 6 * 49, $sformatf("50 quads in %0d cycles", last_out - first_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
