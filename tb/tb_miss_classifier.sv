// tb_miss_classifier: self-checking testbench of the miss statistics.
// Random hit/miss events with random victim flags and spans (victim span
// equal to the current span half of the time); counters are compared with
// counts kept here, before and after a clear.
module tb_miss_classifier;
  import tex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clear = 1'b0, ev_hit = 1'b0, ev_miss = 1'b0, ev_victim_valid = 1'b0;
  logic [SPANW-1:0] ev_victim_span = '0, ev_span = '0;
  logic [CNTW-1:0]  n_hit, n_miss, n_cold, n_intra, n_inter;

  miss_classifier dut (.*);

  int checks = 0, failures = 0;
  int h, m, c, ia, ie;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string when);
    checks++;
    if (n_hit != CNTW'(h) || n_miss != CNTW'(m) || n_cold != CNTW'(c) ||
        n_intra != CNTW'(ia) || n_inter != CNTW'(ie)) begin
      failures++;
      $display("FAIL %s: dut %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", when,
               n_hit, n_miss, n_cold, n_intra, n_inter, h, m, c, ia, ie);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int round = 0; round < 3; round++) begin
      h = 0; m = 0; c = 0; ia = 0; ie = 0;
      for (int i = 0; i < 3000; i++) begin
        int k;
        k = $urandom % 3;
        ev_hit          = (k == 0);
        ev_miss         = (k == 1);
        ev_victim_valid = $urandom % 2;
        ev_span         = SPANW'($urandom % 8);
        ev_victim_span  = ($urandom % 2) ? ev_span : SPANW'($urandom % 8);
        if (ev_hit) h++;
        if (ev_miss) begin
          m++;
          if (!ev_victim_valid)                c++;
          else if (ev_victim_span == ev_span) ia++;
          else                                ie++;
        end
        @(posedge clk);
        #1;
        compare($sformatf("round %0d step %0d", round, i));
      end
      ev_hit = 0; ev_miss = 0;
      checks++;
      if (c == 0 || ia == 0 || ie == 0) begin
        failures++;
        $display("FAIL: a class never occurred");
      end
      clear = 1'b1;
      @(posedge clk);
      #1;
      clear = 1'b0;
      h = 0; m = 0; c = 0; ia = 0; ie = 0;
      compare("after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
