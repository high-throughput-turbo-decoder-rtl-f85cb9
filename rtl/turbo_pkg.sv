// turbo_pkg: types, widths and trellis functions shared by the parallel
// turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of LTE (feedback 1+D^2+D^3, feed-forward 1+D+D^3). A state is the
// 3-bit shift register {s1,s2,s3}; s1 is the most recent feedback bit.
// Fixed-point widths are this design's own choice: 6-bit channel LLRs,
// 8-bit a-priori/extrinsic LLRs, 10-bit branch metrics and 12-bit
// normalized state metrics. All metric arithmetic saturates.
package turbo_pkg;

  localparam int NS  = 8;   // trellis states
  localparam int LW  = 6;   // channel LLR width
  localparam int EW  = 8;   // a-priori / extrinsic LLR width
  localparam int GW  = 10;  // branch metric width
  localparam int SMW = 12;  // state metric width
  localparam int AW  = 12;  // a posteriori LLR width

  typedef logic signed [LW-1:0]  llr_t;
  typedef logic signed [EW-1:0]  ext_t;
  typedef logic signed [GW-1:0]  bm_t;
  typedef logic signed [SMW-1:0] sm_t;
  typedef logic signed [AW-1:0]  app_t;

  // state metrics of all states of one trellis stage
  typedef sm_t [NS-1:0] smset_t;

  // branch metrics of one stage, named by their (systematic, parity)
  // bits. The (0,0) branch metric is always zero and is not stored.
  typedef struct packed {
    bm_t g11;
    bm_t g10;
    bm_t g01;
  } bmset_t;

  // initialisation of the forward recursion at a stage
  typedef enum logic [1:0] {
    A_RUN   = 2'd0,  // continue from the previous stage
    A_EQUI  = 2'd1,  // all states equally likely (acquisition start)
    A_ZERO  = 2'd2   // encoder known to be in state 0 (block start)
  } amode_e;

  function automatic logic [2:0] next_state(logic [2:0] s, logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(logic [2:0] s, logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // saturate a wide signed value into a state metric
  function automatic sm_t sat_sm(logic signed [SMW+2:0] v);
    localparam logic signed [SMW+2:0] HI = (SMW+3)'(2**(SMW-1) - 1);
    localparam logic signed [SMW+2:0] LO = -(SMW+3)'(2**(SMW-1));
    if (v > HI) return sm_t'(HI);
    if (v < LO) return sm_t'(LO);
    return sm_t'(v);
  endfunction

  // saturate a wide signed value into an extrinsic LLR
  function automatic ext_t sat_ext(logic signed [SMW+2:0] v);
    localparam logic signed [SMW+2:0] HI = (SMW+3)'(2**(EW-1) - 1);
    localparam logic signed [SMW+2:0] LO = -(SMW+3)'(2**(EW-1));
    if (v > HI) return ext_t'(HI);
    if (v < LO) return ext_t'(LO);
    return ext_t'(v);
  endfunction

  // saturate a wide signed value into an a posteriori LLR
  function automatic app_t sat_app(logic signed [SMW+2:0] v);
    localparam logic signed [SMW+2:0] HI = (SMW+3)'(2**(AW-1) - 1);
    localparam logic signed [SMW+2:0] LO = -(SMW+3)'(2**(AW-1));
    if (v > HI) return app_t'(HI);
    if (v < LO) return app_t'(LO);
    return app_t'(v);
  endfunction

endpackage
