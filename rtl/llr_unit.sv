// llr_unit: a posteriori and extrinsic LLR computation of the MAP decoder.
//
// For trellis stage k it combines the forward metrics alpha of the state
// before the transition, the backward metrics beta of the state after it
// and the stage's branch metrics:
//   L(k)  = max over branches with u=1 of (alpha(s) + gamma(s,s') + beta(s'))
//         - max over branches with u=0 of the same sum   (max-log)
//   Le(k) = L(k) - ls(k) - la(k)
// The a posteriori LLR feeds the hard decision, the extrinsic LLR is
// passed to the other constituent decoder. Both saturate to their widths.
//
// The document gives the a posteriori LLR as a function of these three
// operands; the max-log form, the widths and the output register are this
// design's choices. Latency 1 cycle (registered outputs).
module llr_unit
  import turbo_pkg::*;
(
  input  logic   clk,
  input  smset_t alpha,
  input  smset_t beta,
  input  bmset_t bm,
  input  llr_t   ls,
  input  ext_t   la,
  output app_t   llr_app,
  output ext_t   llr_ext
);

  typedef logic signed [SMW+2:0] wide_t;

  wide_t best1, best0, l_app, l_ext;
  bm_t   gam [4];   // branch metric by label {u, p}

  always_comb begin
    gam[0] = '0;
    gam[1] = bm.g01;
    gam[2] = bm.g10;
    gam[3] = bm.g11;
  end

  always_comb begin
    best1 = '0;
    best0 = '0;
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 2; u++) begin
        wide_t m;
        logic [2:0] sn;
        sn = next_state(3'(s), 1'(u));
        m  = wide_t'(alpha[s]) + wide_t'(beta[sn])
           + wide_t'(gam[{1'(u), parity_bit(3'(s), 1'(u))}]);
        if (u == 1) begin
          if (s == 0 || m > best1) best1 = m;
        end else begin
          if (s == 0 || m > best0) best0 = m;
        end
      end
    end
    l_app = best1 - best0;
    l_ext = l_app - wide_t'(ls) - wide_t'(la);
  end

  always_ff @(posedge clk) begin
    llr_app <= sat_app(l_app);
    llr_ext <= sat_ext(l_ext);
  end

endmodule
