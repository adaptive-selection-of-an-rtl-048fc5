// tb_aindex_cache: self-checking testbench of the A-index texture cache.
//
// Phases:
//  1. a vertical walk down one texel column over 200 blocks, done twice
//     with v-index: the first pass misses on every block, the second hits
//     on every block, because v-index spreads the column over 200 sets;
//  2. the same walk with u-index: every block maps to one set, so both
//     passes miss on every block (the conflict the A-index avoids);
//  3. a block filled under u-index is found by a v-index lookup and the
//     other way round (the double tag comparison);
//  4. random lookups in a small window with random index selection,
//     compared with an independent model (tb_pkg::cache_model).
// Every returned texel is compared with tb_pkg::texel_of; hit latency must
// be one cycle and miss latency 3 + LAT + 16 cycles with the gap-free memory
// model (request cycle, LAT + 1 memory cycles, 16 beats, response register); the miss events' cold/replacement flags are compared with the model.
module tb_aindex_cache;
  import tex_pkg::*;
  import tb_pkg::*;

  localparam int SETS = 128;
  localparam int LAT  = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             req_valid = 1'b0, req_ready;
  logic [TIDW-1:0]  req_tid = '0;
  logic [UW-1:0]    req_u = '0;
  logic [VW-1:0]    req_v = '0;
  dir_e             req_dir = DIR_U;
  logic [SPANW-1:0] req_span = '0;
  logic             rsp_valid;
  texel_t           rsp_texel;
  logic             mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [BLKAW-1:0] mem_req_blk;
  texel_t           mem_rsp_data;
  logic             ev_hit, ev_miss, ev_victim_valid;
  logic [SPANW-1:0] ev_victim_span;
  int               n_req;

  aindex_cache #(.SETS(SETS)) dut (.*);
  tex_mem_model #(.LAT(LAT)) mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_blk,
    .mem_rsp_valid, .mem_rsp_data, .n_req
  );

  int checks = 0, failures = 0;
  cache_model model;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // One lookup; returns 1 on a hit. Checks data, latency and events.
  task automatic lookup(input logic [TIDW-1:0] tid, input logic [UW-1:0] u,
                        input logic [VW-1:0] v, input dir_e d, input int sp,
                        output bit was_hit);
    int  cyc;
    bit  exp_hit, saw_hit, saw_miss, saw_vv;
    int  saw_vspan;
    exp_hit = model.access(tid, u, v, d, sp);
    req_valid <= 1'b1; req_tid <= tid; req_u <= u; req_v <= v; req_dir <= d;
    req_span <= SPANW'(sp);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    saw_hit = ev_hit; saw_miss = ev_miss; saw_vv = ev_victim_valid;
    saw_vspan = int'(ev_victim_span);
    req_valid <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!rsp_valid && cyc < 1000);
    check(rsp_valid, "no response");
    check(rsp_texel == texel_of(tid, u, v),
          $sformatf("texel (%0d,%0d,%0d) got %h exp %h", tid, u, v, rsp_texel, texel_of(tid, u, v)));
    check(saw_hit == exp_hit && saw_miss == !exp_hit,
          $sformatf("hit mismatch at (%0d,%0d) dir %0d: dut %0d model %0d", u, v, d, saw_hit, exp_hit));
    if (exp_hit) check(cyc == 1, $sformatf("hit latency %0d", cyc));
    else begin
      check(cyc == 3 + LAT + 16, $sformatf("miss latency %0d", cyc));
      check(saw_vv == model.last_victim_valid, "victim valid flag");
      if (saw_vv) check(saw_vspan == model.last_victim_span, "victim span");
    end
    if (!saw_hit) total_miss++;
    was_hit = saw_hit;
  endtask

  int misses;
  int total_miss = 0;
  bit h;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = new(SETS);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. vertical walk with v-index
    for (int pass = 0; pass < 2; pass++) begin
      misses = 0;
      for (int b = 0; b < 200; b++) begin
        lookup(8'd1, 10'd17, VW'(4 * b + (b % 4)), DIR_V, 1, h);
        misses += !h;
      end
      check(misses == (pass == 0 ? 200 : 0), $sformatf("v-index walk pass %0d misses %0d", pass, misses));
    end

    // 2. the same walk with u-index in another texture
    for (int pass = 0; pass < 2; pass++) begin
      misses = 0;
      for (int b = 0; b < 200; b++) begin
        lookup(8'd2, 10'd17, VW'(4 * b), DIR_U, 2, h);
        misses += !h;
      end
      check(misses == 200, $sformatf("u-index walk pass %0d misses %0d", pass, misses));
    end

    // 3. cross-index hits
    lookup(8'd3, 10'd600, 10'd40, DIR_U, 3, h);
    check(!h, "cross: first access misses");
    lookup(8'd3, 10'd601, 10'd42, DIR_V, 3, h);
    check(h, "cross: v-index lookup finds u-indexed line");
    lookup(8'd3, 10'd100, 10'd900, DIR_V, 3, h);
    check(!h, "cross: first access misses (v)");
    lookup(8'd3, 10'd103, 10'd901, DIR_U, 3, h);
    check(h, "cross: u-index lookup finds v-indexed line");

    // 4. random lookups in a 64x64 window of two textures
    for (int i = 0; i < 4000; i++) begin
      lookup(TIDW'(4 + $urandom % 2), UW'(512 + $urandom % 64), VW'(256 + $urandom % 64),
             dir_e'($urandom % 2), 4 + i / 16, h);
    end

    check(n_req == total_miss, $sformatf("memory requests %0d misses %0d", n_req, total_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
