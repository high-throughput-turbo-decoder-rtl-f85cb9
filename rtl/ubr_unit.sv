// ubr_unit: pipelined ungrouped backward recursion (modified sliding
// window) of the MAP decoder.
//
// Instead of one backward recursion per window, every trellis stage k gets
// its own backward recursion: it starts at stage k+M-1 with all backward
// metrics equal (the logarithm of 1/Ns, represented as 0) and runs M-1
// add-compare-select steps down to the backward metrics that stage k needs.
// The M-1 steps are laid out as M-1 pipeline stages, so that in every
// clock one recursion starts (the "new set"), M-3 advance (the
// "consecutive sets") and one ends (the "effective set"). Pipeline stage i
// (1..M-1) needs the branch metrics of a stage that arrived 2(i-1) cycles
// earlier, taken from a branch metric history shift register.
//
// Branch metric sets enter in increasing stage order, one per clock,
// without gaps. If the set of stage j enters in cycle c, beta_out during
// cycle c + 2M - 2 ... is the effective set for stage j - M + 1, i.e. the
// backward metrics of the state after that stage's transition, computed
// from the branch metrics of stages j-M+2 .. j. Put differently: the
// effective set for stage k appears 2M-2 cycles after stage k's branch
// metrics entered. The structure follows the document's description of
// ungrouped backward recursions and their new/consecutive/effective sets;
// the window M is a parameter because its value is not given.
module ubr_unit
  import turbo_pkg::*;
#(
  parameter int M = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  bmset_t bm_in,
  output smset_t beta_out
);

  localparam int NSTG = M - 1;           // ACS pipeline stages
  localparam int HLEN = 2 * (M - 2);     // branch metric history length

  // hist[d] is bm_in delayed by d cycles (hist[0] is bm_in itself)
  bmset_t hist [HLEN + 1];
  smset_t stg_q [1:NSTG];                // stg_q[i]: output of ACS stage i
  smset_t stg_d [1:NSTG];

  assign hist[0] = bm_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d <= HLEN; d++) hist[d] <= '0;
    end else begin
      for (int d = 1; d <= HLEN; d++) hist[d] <= hist[d-1];
    end
  end

  // the equiprobable initial set of every new recursion
  smset_t init_set;
  assign init_set = '0;

  for (genvar i = 1; i <= NSTG; i++) begin : g_stage
    smset_t prev;
    if (i == 1) begin : g_first
      assign prev = init_set;
    end else begin : g_next
      assign prev = stg_q[i-1];
    end
    acsu #(.BACKWARD(1'b1)) u_acsu (
      .sm_in (prev),
      .bm    (hist[2*(i-1)]),
      .sm_out(stg_d[i])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stg_q[i] <= '0;
      else        stg_q[i] <= stg_d[i];
    end
  end

  assign beta_out = stg_q[NSTG];

  initial begin
    assert (M >= 2) else $error("ubr_unit: M must be at least 2");
  end

endmodule
