// miss_classifier: cache hit/miss counters with the span-based miss
// decomposition
//   total misses = cold misses + intra-span replacements
//                                + inter-span replacements.
// A miss that fills an empty line is a cold miss. A miss that replaces a
// valid line is an intra-span replacement when that line was filled during
// the same span as the request that now evicts it, and an inter-span
// replacement otherwise. The decomposition follows the design; recording
// the filling span number with each line (SPANW bits, compared for
// equality, so spans exactly 2**SPANW apart alias) is this implementation's
// way of telling the two kinds apart.
//
// Interface and timing: the ev_* inputs come from the cache and are
// sampled in the cycle they are high; each counter is visible the next
// cycle. `clear` (or reset) zeroes all counters. Counters wrap at 2**CNTW.
module miss_classifier
  import tex_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_hit,
  input  logic             ev_miss,
  input  logic             ev_victim_valid,
  input  logic [SPANW-1:0] ev_victim_span,
  input  logic [SPANW-1:0] ev_span,
  output logic [CNTW-1:0]  n_hit,
  output logic [CNTW-1:0]  n_miss,
  output logic [CNTW-1:0]  n_cold,
  output logic [CNTW-1:0]  n_intra,
  output logic [CNTW-1:0]  n_inter
);

  logic is_cold, is_intra, is_inter;
  assign is_cold  = ev_miss && !ev_victim_valid;
  assign is_intra = ev_miss &&  ev_victim_valid && (ev_victim_span == ev_span);
  assign is_inter = ev_miss &&  ev_victim_valid && (ev_victim_span != ev_span);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      n_hit   <= '0;
      n_miss  <= '0;
      n_cold  <= '0;
      n_intra <= '0;
      n_inter <= '0;
    end else begin
      n_hit   <= n_hit   + CNTW'(ev_hit);
      n_miss  <= n_miss  + CNTW'(ev_miss);
      n_cold  <= n_cold  + CNTW'(is_cold);
      n_intra <= n_intra + CNTW'(is_intra);
      n_inter <= n_inter + CNTW'(is_inter);
    end
  end

endmodule
