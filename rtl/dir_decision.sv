// dir_decision: texel-access direction decision for the A-index.
//
// A horizontal screen span maps onto a straight line in texture space. The
// unit keeps the previous texture sampling point and compares it with the
// current one: if |du| > |dv| the span is u-major and the cache is indexed
// with u (DIR_U), otherwise it is v-major and indexed with v (DIR_V). This
// rule follows the design. Its own choices: the first fragment of a span
// has no predecessor on the same line, so it keeps the decision of the
// previous fragment (initially DIR_U, the conventional index), and a
// fragment with du = dv is v-major as the rule reads.
//
// Interface and timing: dir is combinational from the current point (u, v)
// and the stored history. When `take` is high the point and the decision
// are stored at the clock edge, becoming the history for the next fragment.
// Coordinates are unsigned fixed point; differences are taken modulo 2**CW
// and interpreted as signed, which is exact for steps below half the range.
module dir_decision
  import tex_pkg::*;
#(
  parameter int CW_P = CW          // coordinate width (integer + fraction bits)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            take,        // fragment accepted: update history
  input  logic            span_start,  // first fragment of a span
  input  logic [CW_P-1:0] u,
  input  logic [CW_P-1:0] v,
  output dir_e            dir
);

  logic [CW_P-1:0] u_prev, v_prev;
  dir_e            dir_prev;

  logic signed [CW_P-1:0] du, dv;
  logic        [CW_P-1:0] adu, adv;

  always_comb begin
    du  = $signed(u - u_prev);
    dv  = $signed(v - v_prev);
    adu = du[CW_P-1] ? CW_P'(-du) : CW_P'(du);
    adv = dv[CW_P-1] ? CW_P'(-dv) : CW_P'(dv);
    if (span_start) dir = dir_prev;
    else            dir = (adu > adv) ? DIR_U : DIR_V;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_prev   <= '0;
      v_prev   <= '0;
      dir_prev <= DIR_U;
    end else if (take) begin
      u_prev   <= u;
      v_prev   <= v;
      dir_prev <= dir;
    end
  end

endmodule
