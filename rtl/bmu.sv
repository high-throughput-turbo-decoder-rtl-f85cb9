// bmu: branch metric unit of the max-log MAP decoder.
//
// For one trellis stage it turns the systematic LLR ls, the parity LLR lp
// and the a-priori LLR la into the branch metrics of the four possible
// (systematic bit, parity bit) labels. With LLRs defined as ln(P(1)/P(0))
// the metric of a branch labelled (u,p) is u*(ls+la) + p*lp; the (0,0)
// metric is the constant 0 and is left implicit, which is allowed because
// the decoder only compares metric differences.
//
// The document states only that branch metrics are computed for
// successive trellis stages; the formula and the register at the output
// are this design's choices. Timing: one stage per clock, outputs are
// registered, latency 1 cycle.
module bmu
  import turbo_pkg::*;
(
  input  logic   clk,
  input  llr_t   ls,
  input  llr_t   lp,
  input  ext_t   la,
  output bmset_t bm
);

  bm_t sys_apr;

  always_comb begin
    sys_apr = bm_t'(ls) + bm_t'(la);
  end

  always_ff @(posedge clk) begin
    bm.g10 <= sys_apr;
    bm.g01 <= bm_t'(lp);
    bm.g11 <= sys_apr + bm_t'(lp);
  end

endmodule
