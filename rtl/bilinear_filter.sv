// bilinear_filter: Filter stage of the texture pipeline.
//
// Weights the four texels of a footprint by their distance from the
// sampling point, for each of the four 8-bit channels:
//   top = t00*(16-fu) + t10*fu,  bot = t01*(16-fu) + t11*fu
//   bil = (top*(16-fv) + bot*fv + 128) >> 8
// with fu, fv the 4-bit fractions of the texture coordinate (so the result
// is rounded to nearest and never exceeds 255). For a trilinear fragment
// the same is done in the coarser mip level and the two results are mixed
// by the level weight lod_f: out = (b0*(16-lod_f) + b1*lod_f + 8) >> 4.
// The design names the stage and bilinear or trilinear filtering; the
// weight precision and the rounding are this implementation's choices.
//
// Interface and timing: valid/ready in and out, one output register; the
// texels accepted in one cycle appear filtered in the next.
module bilinear_filter
  import tex_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  quad_t in_quad,
  output logic  out_valid,
  input  logic  out_ready,
  output filt_t out_filt
);

  localparam int ONE = 1 << FW;

  function automatic logic [7:0] lerp2(input logic [7:0] a, input logic [7:0] b,
                                       input logic [7:0] c, input logic [7:0] d,
                                       input logic [FW-1:0] fu, input logic [FW-1:0] fv);
    logic [FW:0]       wu0, wu1, wv0, wv1;
    logic [8+FW:0]     top, bot;
    logic [8+2*FW:0]   acc;
    wu1 = {1'b0, fu};
    wu0 = (FW+1)'(ONE) - wu1;
    wv1 = {1'b0, fv};
    wv0 = (FW+1)'(ONE) - wv1;
    top = (9+FW)'(a * wu0) + (9+FW)'(b * wu1);
    bot = (9+FW)'(c * wu0) + (9+FW)'(d * wu1);
    acc = (9+2*FW)'(top * wv0) + (9+2*FW)'(bot * wv1) + (9+2*FW)'(1 << (2*FW - 1));
    return 8'(acc >> (2*FW));
  endfunction

  function automatic logic [7:0] mix(input logic [7:0] a, input logic [7:0] b,
                                     input logic [FW-1:0] w);
    logic [FW:0]   w0, w1;
    logic [8+FW:0] acc;
    w1  = {1'b0, w};
    w0  = (FW+1)'(ONE) - w1;
    acc = (9+FW)'(a * w0) + (9+FW)'(b * w1) + (9+FW)'(1 << (FW - 1));
    return 8'(acc >> FW);
  endfunction

  texel_t res;
  always_comb begin
    logic [7:0] b0, b1;
    for (int ch = 0; ch < 4; ch++) begin
      b0 = lerp2(in_quad.tx[0][8*ch +: 8], in_quad.tx[1][8*ch +: 8],
                 in_quad.tx[2][8*ch +: 8], in_quad.tx[3][8*ch +: 8],
                 in_quad.fu[0], in_quad.fv[0]);
      b1 = lerp2(in_quad.tx[4][8*ch +: 8], in_quad.tx[5][8*ch +: 8],
                 in_quad.tx[6][8*ch +: 8], in_quad.tx[7][8*ch +: 8],
                 in_quad.fu[1], in_quad.fv[1]);
      res[8*ch +: 8] = in_quad.trilin ? mix(b0, b1, in_quad.lod_f) : b0;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_filt  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid      <= 1'b1;
        out_filt.x     <= in_quad.x;
        out_filt.y     <= in_quad.y;
        out_filt.tex   <= res;
        out_filt.color <= in_quad.color;
      end
    end
  end

endmodule
