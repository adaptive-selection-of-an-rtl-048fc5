// tb_blend_unit: self-checking testbench of the Blend stage. Every pair of
// channel values a, b in 0..255 appears once in some channel; the result
// must be round(a*b/255) = (2ab + 255) div 510, one cycle after acceptance,
// with x, y passed along and back-pressure respected.
module tb_blend_unit;
  import tex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  filt_t in_filt = '0;
  pix_t  out_pix;

  blend_unit dut (.*);

  int checks = 0, failures = 0;
  pix_t exp_q[$];

  function automatic logic [7:0] ref_mod(int a, int b);
    return 8'((2 * a * b + 255) / 510);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_pix != exp_q[0]) begin
        failures++;
        $display("FAIL: pixel %h exp %h", out_pix, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    int n;
    filt_t f;
    pix_t  p;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    n = 0;
    while (n < 65536) begin
      f.x = XYW'($urandom); f.y = XYW'($urandom);
      for (int ch = 0; ch < 4; ch++) begin
        int k;
        k = (n + ch * 16411) % 65536;
        f.tex[8*ch +: 8]   = 8'(k / 256);
        f.color[8*ch +: 8] = 8'(k % 256);
        p.color[8*ch +: 8] = ref_mod(k / 256, k % 256);
      end
      p.x = f.x; p.y = f.y;
      in_valid  = 1'b1;
      in_filt   = f;
      out_ready = ($urandom % 4) != 0;
      #1;
      if (in_ready) begin
        exp_q.push_back(p);
        n++;
      end
      @(posedge clk);
      #1;
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d pixels missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
