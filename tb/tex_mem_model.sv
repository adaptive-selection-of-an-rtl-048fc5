// tex_mem_model: behavioural model of the texture memory behind the cache.
//
// Not synthesizable logic of the design: it stands for the external memory
// and system bus. A block request {tid, vb, ub} is accepted when the model
// is idle (mem_req_ready high); after LAT cycles it returns the block's 16
// texels, row-major, one per cycle on mem_rsp_valid. With GAPS set, valid
// is dropped at random on some beats. Texel contents come from
// tb_pkg::texel_of. `n_req` counts accepted block requests.
module tex_mem_model
  import tex_pkg::*;
#(
  parameter int LAT  = 8,
  parameter bit GAPS = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_req_valid,
  output logic             mem_req_ready,
  input  logic [BLKAW-1:0] mem_req_blk,
  output logic             mem_rsp_valid,
  output texel_t           mem_rsp_data,
  output int               n_req
);
  logic [BLKAW-1:0] blk;
  int               wait_cnt;
  int               beat;
  logic             busy;

  assign mem_req_ready = rst_n && !busy;

  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (!rst_n) begin
      busy  <= 1'b0;
      n_req <= 0;
    end else if (!busy) begin
      if (mem_req_valid) begin
        busy     <= 1'b1;
        blk      <= mem_req_blk;
        wait_cnt <= LAT;
        beat     <= 0;
        n_req    <= n_req + 1;
      end
    end else if (wait_cnt > 0) begin
      wait_cnt <= wait_cnt - 1;
    end else if (!GAPS || ($urandom % 4) != 0) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= tb_pkg::texel_of(blk[BLKAW-1 -: TIDW],
                         {blk[UBW-1:0], 2'(beat % 4)},
                         {blk[UBW +: VBW], 2'(beat / 4)});
      beat <= beat + 1;
      if (beat == 15) busy <= 1'b0;
    end
  end
endmodule
