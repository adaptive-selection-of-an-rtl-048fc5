// tb_dir_decision: self-checking testbench of the direction decision.
// Drives sequences of sampling points along lines of random slope (as a
// span maps to a line in texture space), plus random jumps, and compares
// dir with a reference: |du| > |dv| gives DIR_U, otherwise DIR_V; the first
// point of a span repeats the previous decision; `take` low keeps history.
module tb_dir_decision;
  import tex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          take = 1'b0, span_start = 1'b0;
  logic [CW-1:0] u = '0, v = '0;
  dir_e          dir;

  dir_decision dut (.*);

  int checks = 0, failures = 0;
  int pu, pv, pdir, nu_cnt, nv_cnt;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absd(int a, int b);
    int d;
    d = (a - b) & ((1 << CW) - 1);
    if (d >= (1 << (CW - 1))) d = (1 << CW) - d;
    return d;
  endfunction

  initial begin
    int su, sv, len, exp_dir;
    bit st;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    pu = 0; pv = 0; pdir = 0; nu_cnt = 0; nv_cnt = 0;
    for (int span = 0; span < 300; span++) begin
      // step per fragment in 1/16 texel, signed, in [-40, 40]
      su  = int'($urandom % 81) - 40;
      sv  = int'($urandom % 81) - 40;
      len = 1 + $urandom % 20;
      u  <= CW'($urandom);
      v  <= CW'($urandom);
      for (int i = 0; i < len; i++) begin
        st = (i == 0);
        span_start <= st;
        take <= ($urandom % 5) != 0;
        if (i > 0) begin
          u <= u + CW'(su);
          v <= v + CW'(sv);
        end
        #1;
        if (st) exp_dir = pdir;
        else    exp_dir = (absd(int'(u), pu) > absd(int'(v), pv)) ? 0 : 1;
        checks++;
        if (int'(dir) != exp_dir) begin
          failures++;
          $display("FAIL: span %0d frag %0d: dir %0d exp %0d", span, i, dir, exp_dir);
        end
        if (take) begin
          pu = int'(u); pv = int'(v); pdir = exp_dir;
          if (exp_dir == 0) nu_cnt++; else nv_cnt++;
        end
        @(posedge clk);
      end
    end
    checks++;
    if (nu_cnt == 0 || nv_cnt == 0) begin
      failures++;
      $display("FAIL: only one direction seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
