// workload_lane: one cache configuration of the index-comparison testbench.
//
// Wraps an aindex_cache of SETS sets per way and a texture memory model.
// ADAPT = 1 passes the direction given with each lookup (A-index); ADAPT = 0
// always uses u-index, the conventional cache. A one-cycle `start` launches
// a lookup; `busy` stays high until its texel has returned. The lane counts
// misses, the cycles it spends busy and texels that differ from
// tb_pkg::texel_of. A reset clears the cache and the counts.
module workload_lane
  import tex_pkg::*;
#(
  parameter int SETS  = 128,
  parameter bit ADAPT = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [TIDW-1:0] tid,
  input  logic [UW-1:0]   u,
  input  logic [VW-1:0]   v,
  input  dir_e            dir,
  output logic            busy,
  output int              misses,
  output int              cycles,
  output int              errors
);
  logic             req_valid, req_ready, rsp_valid;
  logic [TIDW-1:0]  r_tid;
  logic [UW-1:0]    r_u;
  logic [VW-1:0]    r_v;
  dir_e             r_dir;
  texel_t           rsp_texel;
  logic             mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [BLKAW-1:0] mem_req_blk;
  texel_t           mem_rsp_data;
  logic             ev_hit, ev_miss, ev_victim_valid;
  logic [SPANW-1:0] ev_victim_span;
  int               n_req;

  aindex_cache #(.SETS(SETS)) u_cache (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_tid(r_tid), .req_u(r_u), .req_v(r_v),
    .req_dir(r_dir), .req_span('0),
    .rsp_valid, .rsp_texel,
    .mem_req_valid, .mem_req_ready, .mem_req_blk, .mem_rsp_valid, .mem_rsp_data,
    .ev_hit, .ev_miss, .ev_victim_valid, .ev_victim_span
  );

  tex_mem_model #(.LAT(10)) u_mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_blk,
    .mem_rsp_valid, .mem_rsp_data, .n_req
  );

  always @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      req_valid <= 1'b0;
      misses    <= 0;
      cycles    <= 0;
      errors    <= 0;
    end else begin
      if (start) begin
        busy      <= 1'b1;
        req_valid <= 1'b1;
        r_tid     <= tid;
        r_u       <= u;
        r_v       <= v;
        r_dir     <= ADAPT ? dir : DIR_U;
      end else if (req_valid && req_ready) begin
        req_valid <= 1'b0;
      end
      if (ev_miss) misses <= misses + 1;
      if (busy)    cycles <= cycles + 1;
      if (rsp_valid) begin
        busy <= 1'b0;
        if (rsp_texel != tb_pkg::texel_of(r_tid, r_u, r_v)) errors <= errors + 1;
      end
    end
  end
endmodule
