// blend_unit: Blend stage of the texture pipeline.
//
// Combines the filtered texel with the fragment's interpolated colour by
// modulation, channel by channel: out = round(tex * col / 255), computed
// without a divider as p = tex*col, out = (p + 128 + ((p + 128) >> 8)) >> 8,
// which is exact for all 8-bit inputs. The design names the stage; the
// modulate function is this implementation's choice (the usual default of a
// fixed-function texture unit).
//
// Interface and timing: valid/ready in and out, one output register; the
// finished pixel appears the cycle after the filtered texel is accepted.
module blend_unit
  import tex_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  filt_t in_filt,
  output logic  out_valid,
  input  logic  out_ready,
  output pix_t  out_pix
);

  function automatic logic [7:0] mul255(input logic [7:0] a, input logic [7:0] b);
    logic [16:0] p;
    p = 17'(a * b) + 17'd128;
    p = p + 17'(p[16:8]);
    return p[15:8];
  endfunction

  texel_t res;
  always_comb begin
    for (int ch = 0; ch < 4; ch++)
      res[8*ch +: 8] = mul255(in_filt.tex[8*ch +: 8], in_filt.color[8*ch +: 8]);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid     <= 1'b1;
        out_pix.x     <= in_filt.x;
        out_pix.y     <= in_filt.y;
        out_pix.color <= res;
      end
    end
  end

endmodule
