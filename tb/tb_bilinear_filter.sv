// tb_bilinear_filter: self-checking testbench of the Filter stage.
// Random texels and weights (plus the corner weights 0 and 15, and flat
// quads that must come out unchanged) are compared with a reference
// computed in integers: per level round(((t00*(16-fu)+t10*fu)*(16-fv)
// + (t01*(16-fu)+t11*fu)*fv) / 256), and for trilinear inputs
// round((b0*(16-w) + b1*w) / 16) of the two levels (halves rounded up). Output one cycle after acceptance, in
// order, with back-pressure.
module tb_bilinear_filter;
  import tex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  quad_t in_quad = '0;
  filt_t out_filt;

  bilinear_filter dut (.*);

  int checks = 0, failures = 0;
  filt_t exp_q[$];
  int n_tri = 0;

  function automatic logic [7:0] ref_lerp(int a, int b, int c, int d, int fu, int fv);
    int top, bot;
    top = a * (16 - fu) + b * fu;
    bot = c * (16 - fu) + d * fu;
    return 8'((top * (16 - fv) + bot * fv + 128) / 256);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_filt != exp_q[0]) begin
        failures++;
        $display("FAIL: filtered %h exp %h", out_filt.tex, exp_q.size() ? exp_q[0].tex : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    int n;
    quad_t q;
    filt_t e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    n = 0;
    while (n < 20000) begin
      q = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom};
      if (n % 10 == 0) for (int k = 1; k < 4; k++) q.tx[k] = q.tx[0];
      if (n % 7 == 0) q.fu[0] = (n % 14 == 0) ? '0 : 4'hf;
      if (n % 11 == 0) q.fv[0] = (n % 22 == 0) ? '0 : 4'hf;
      e.x = q.x; e.y = q.y; e.color = q.color;
      for (int ch = 0; ch < 4; ch++) begin
        int b0, b1;
        b0 = ref_lerp(q.tx[0][8*ch +: 8], q.tx[1][8*ch +: 8], q.tx[2][8*ch +: 8],
                      q.tx[3][8*ch +: 8], q.fu[0], q.fv[0]);
        b1 = ref_lerp(q.tx[4][8*ch +: 8], q.tx[5][8*ch +: 8], q.tx[6][8*ch +: 8],
                      q.tx[7][8*ch +: 8], q.fu[1], q.fv[1]);
        e.tex[8*ch +: 8] = q.trilin ? 8'((b0 * (16 - int'(q.lod_f)) + b1 * int'(q.lod_f) + 8) / 16)
                                    : 8'(b0);
      end
      if (q.trilin) n_tri++;
      in_valid  = 1'b1;
      in_quad   = q;
      out_ready = ($urandom % 3) != 0;
      #1;
      if (in_ready) begin
        exp_q.push_back(e);
        n++;
      end
      @(posedge clk);
      #1;
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_tri == 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
