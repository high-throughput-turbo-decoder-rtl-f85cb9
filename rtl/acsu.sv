// acsu: add-compare-select unit for one recursion step of the 8-state
// trellis, with state metric normalization.
//
// Forward (BACKWARD = 0): alpha'(s') = max over the two branches (s -> s')
//   of alpha(s) + gamma(s,s').
// Backward (BACKWARD = 1): beta'(s) = max over the two branches (s -> s')
//   of beta(s') + gamma(s,s').
// The max is the max-log approximation of the log-MAP max* operator.
// After selection every new metric has the new metric of state 0
// subtracted, so state 0 always carries 0 and the metrics stay within a
// fixed range without a separate search for the largest metric. Results
// saturate to the state metric width.
//
// The document says that the ACSU normalizes the state metrics to shorten
// the critical path; which state is used as the reference is this
// design's choice. Purely combinational.
module acsu
  import turbo_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  smset_t sm_in,
  input  bmset_t bm,
  output smset_t sm_out
);

  typedef logic signed [SMW+2:0] wide_t;

  wide_t sel [NS];
  bm_t   gam [4];   // branch metric by label {u, p}

  always_comb begin
    gam[0] = '0;
    gam[1] = bm.g01;
    gam[2] = bm.g10;
    gam[3] = bm.g11;
  end

  always_comb begin
    for (int t = 0; t < NS; t++) begin
      wide_t c0, c1;
      logic [2:0] st;
      logic [2:0] s0, s1;
      logic u0, u1;
      st = 3'(t);
      if (!BACKWARD) begin
        // the two predecessors of st differ in their oldest bit
        s0 = {st[1:0], 1'b0};
        s1 = {st[1:0], 1'b1};
        u0 = st[2] ^ st[0];
        u1 = st[2] ^ st[0] ^ 1'b1;
        c0 = wide_t'(sm_in[s0]) + wide_t'(gam[{u0, parity_bit(s0, u0)}]);
        c1 = wide_t'(sm_in[s1]) + wide_t'(gam[{u1, parity_bit(s1, u1)}]);
      end else begin
        c0 = wide_t'(sm_in[next_state(st, 1'b0)]) + wide_t'(gam[{1'b0, parity_bit(st, 1'b0)}]);
        c1 = wide_t'(sm_in[next_state(st, 1'b1)]) + wide_t'(gam[{1'b1, parity_bit(st, 1'b1)}]);
      end
      sel[t] = (c1 > c0) ? c1 : c0;
    end
    for (int t = 0; t < NS; t++) begin
      sm_out[t] = sat_sm(sel[t] - sel[0]);
    end
  end

endmodule
