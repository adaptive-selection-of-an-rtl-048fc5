// tb_frag_fetch: self-checking testbench of the Fetch-stage fragment queue.
// Random pushes and pops; every fragment must come out once, in order; the
// queue must refuse input exactly when it holds DEPTH fragments.
module tb_frag_fetch;
  import tex_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  frag_t in_frag = '0, out_frag;

  frag_fetch #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  frag_t q[$];
  int n_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 5000; cyc++) begin
      in_valid  <= ($urandom % 3) != 0;
      in_frag   <= {$urandom, $urandom, $urandom, $urandom};
      out_ready <= (cyc / 500) % 2 == 0 ? ($urandom % 4) == 0 : ($urandom % 4) != 0;
      #1;
      checks++;
      if (in_ready != (q.size() < DEPTH)) begin
        failures++;
        $display("FAIL: in_ready %0d with %0d queued", in_ready, q.size());
      end
      checks++;
      if (out_valid != (q.size() > 0)) begin
        failures++;
        $display("FAIL: out_valid %0d with %0d queued", out_valid, q.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_frag != q[0]) begin
          failures++;
          $display("FAIL: wrong fragment out");
        end
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_frag);
      if (!in_ready) n_full++;
      @(posedge clk);
    end
    checks++;
    if (n_full == 0) begin
      failures++;
      $display("FAIL: queue never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
