// frag_fetch: Fetch stage of the texture pipeline.
//
// Takes rasterized fragments from the span rasterizer and queues them for
// address generation, so that the rasterizer can keep going while a cache
// miss stalls the stages behind. The design names this stage only; the
// first-in first-out queue of DEPTH fragments is this implementation's
// choice.
//
// Interface and timing: valid/ready on both sides. A fragment written in
// one cycle can be read in the next; in_ready is low only when the queue is
// full, out_valid is high whenever it is not empty. Reset (synchronous,
// active low) empties the queue.
module frag_fetch
  import tex_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  frag_t in_frag,
  output logic  out_valid,
  input  logic  out_ready,
  output frag_t out_frag
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  frag_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          push, pop;

  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign out_frag  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_frag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
