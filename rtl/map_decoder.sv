// map_decoder: one radix-2 max-log MAP (LBCJR) decoder using the modified
// sliding window schedule with ungrouped backward recursions.
//
// Trellis stages stream in one per clock, in increasing order and without
// gaps: systematic LLR ls, parity LLR lp, a-priori LLR la, the forward
// initialisation mode amode and an opaque tag. The branch metric unit
// turns each stage into branch metrics; the ungrouped backward recursion
// pipeline (ubr_unit) produces the backward metrics of a stage 2M-2 cycles
// after its branch metrics; the branch metrics, LLRs, mode and tag are
// delayed by the same amount so that the forward recursion, which follows
// the backward one as in the document, and the LLR unit see all operands
// of one stage together. The LLRs of a stage are therefore only correct
// when the M-1 stages that follow it have also been streamed in; the
// caller appends them (or zero-LLR padding stages past the block end).
//
// Interface: out_app (a posteriori LLR), out_ext (extrinsic LLR) and
// out_tag belong to the stage that entered LAT = 2M cycles earlier.
// Throughput is one trellis stage per clock.
module map_decoder
  import turbo_pkg::*;
#(
  parameter int M    = 16,
  parameter int TAGW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  llr_t            ls,
  input  llr_t            lp,
  input  ext_t            la,
  input  amode_e          amode,
  input  logic [TAGW-1:0] tag,
  output app_t            out_app,
  output ext_t            out_ext,
  output logic [TAGW-1:0] out_tag
);

  localparam int DB  = 2 * M - 2;      // branch metric to beta alignment

  bmset_t bm, bm_d;
  smset_t beta, alpha;

  // stage side information, aligned with bm (one cycle after the input)
  typedef struct packed {
    llr_t            ls;
    ext_t            la;
    amode_e          amode;
    logic [TAGW-1:0] tag;
  } side_t;

  side_t side_in, side_q, side_d;
  logic [TAGW-1:0] tag_o;

  bmu u_bmu (.clk(clk), .ls(ls), .lp(lp), .la(la), .bm(bm));

  assign side_in = '{ls: ls, la: la, amode: amode, tag: tag};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) side_q <= '0;
    else        side_q <= side_in;
  end

  ubr_unit #(.M(M)) u_ubr (.clk(clk), .rst_n(rst_n), .bm_in(bm), .beta_out(beta));

  delay_line #(.W($bits(bmset_t)), .DEPTH(DB)) u_dl_bm (
    .clk(clk), .rst_n(rst_n), .d(bm), .q(bm_d)
  );
  delay_line #(.W($bits(side_t)), .DEPTH(DB)) u_dl_side (
    .clk(clk), .rst_n(rst_n), .d(side_q), .q(side_d)
  );

  fwd_recursion u_fwd (
    .clk(clk), .rst_n(rst_n), .en(1'b1),
    .mode(side_d.amode), .bm(bm_d), .alpha_cur(alpha)
  );

  llr_unit u_llr (
    .clk(clk), .alpha(alpha), .beta(beta), .bm(bm_d),
    .ls(side_d.ls), .la(side_d.la),
    .llr_app(out_app), .llr_ext(out_ext)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_o <= '0;
    else        tag_o <= side_d.tag;
  end

  assign out_tag = tag_o;

endmodule
