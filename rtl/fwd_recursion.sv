// fwd_recursion: forward state metric recursion of the MAP decoder.
//
// Holds the forward metrics alpha of the current trellis stage in a
// register and advances them by one add-compare-select step per clock,
// using the branch metrics of that stage. The metrics used for the
// current stage (alpha_cur) come from the register, or, when mode asks
// for it, from one of two initial sets: A_ZERO, state 0 at 0 and every
// other state at minus infinity (the start of a code block, as in the
// document's forward initialisation), or A_EQUI, all states equal (the
// start of an acquisition run in front of a sub-block, this design's
// choice for parallel sub-blocks).
//
// Timing: alpha_cur is combinational from the register and mode; the
// register loads the next stage's metrics at the clock edge whenever en
// is high.
module fwd_recursion
  import turbo_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  amode_e mode,
  input  bmset_t bm,
  output smset_t alpha_cur
);

  // "minus infinity" for the states that are impossible at a block start
  localparam sm_t SM_NEG_INF = sm_t'(-1024);

  smset_t alpha_q, alpha_next;

  always_comb begin
    unique case (mode)
      A_ZERO: begin
        for (int s = 0; s < NS; s++) alpha_cur[s] = (s == 0) ? sm_t'(0) : SM_NEG_INF;
      end
      A_EQUI: alpha_cur = '0;
      default: alpha_cur = alpha_q;
    endcase
  end

  acsu #(.BACKWARD(1'b0)) u_acsu (
    .sm_in (alpha_cur),
    .bm    (bm),
    .sm_out(alpha_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  alpha_q <= '0;
    else if (en) alpha_q <= alpha_next;
  end

endmodule
