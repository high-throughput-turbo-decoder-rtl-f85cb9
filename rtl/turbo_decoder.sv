// turbo_decoder: parallel turbo decoder for the LTE turbo code.
//
// The block's channel LLRs (systematic ls, parity of the first encoder
// lp1, parity of the second encoder lp2, all in natural bit order) are
// loaded through the load port. After start, P max-log MAP decoders work
// in parallel on the P sub-blocks of the block, each one trellis stage per
// clock, for N_ITER full iterations (2*N_ITER half-iterations). Each MAP
// decoder uses ungrouped backward recursions (map_decoder, ubr_unit) and
// normalizing add-compare-select units (acsu).
//
// Half-iteration 0 (natural order): stage x reads ls[x], lp1[x] and the
//   a-priori LLR le2[x], and writes its extrinsic LLR to le1[x].
// Half-iteration 1 (interleaved order): stage x reads ls[pi(x)], lp2[x]
//   and le1[pi(x)], and writes its extrinsic LLR to le2[pi(x)] and its
//   hard decision (a posteriori LLR > 0) to dec[pi(x)].
// In the first half-iteration the a-priori LLRs are taken as zero. The
// two extrinsic memories keep the values read in a half-iteration apart
// from those written in it. When done pulses, dec holds the decoded bits,
// readable through rd_addr/rd_bit (one cycle read latency).
//
// From the document: the parallel turbo decoder built from P = 8 MAP
// decoders, the LBCJR MAP decoders with ungrouped backward recursion, the
// ACSU normalization. This design's own choices: LTE code and QPP
// interleaver parameters (default block size 6144, the LTE maximum),
// window M = 16, N_ITER = 8, max-log arithmetic, fixed-point widths,
// memory organisation, sub-block schedule, no trellis termination (tail
// bits are not used; stages past the block end are padded with zero LLRs).
//
// Timing: one stage per decoder per clock; a half-iteration takes
// K/P + 2(M-1) + 2M + 2 clocks; done rises 2*N_ITER times that plus one
// clocks after the clock edge that samples start.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int K      = 6144,
  parameter int P      = 8,
  parameter int M      = 16,
  parameter int F1     = 263,
  parameter int F2     = 480,
  parameter int N_ITER = 8,
  localparam int AWID  = $clog2(K)
) (
  input  logic            clk,
  input  logic            rst_n,
  // channel LLR load port
  input  logic            ld_en,
  input  logic [AWID-1:0] ld_addr,
  input  llr_t            ld_ls,
  input  llr_t            ld_lp1,
  input  llr_t            ld_lp2,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  // decoded bit read port
  input  logic [AWID-1:0] rd_addr,
  output logic            rd_bit
);

  localparam int TAGW = AWID + 1;

  // ---------------------------------------------------------------- control
  logic                   issue, half, first_half;
  logic [P-1:0][AWID-1:0] nat_addr, int_addr;
  logic [P-1:0]           pad, own;
  amode_e [P-1:0]         amode;

  turbo_ctrl #(.K(K), .P(P), .M(M), .F1(F1), .F2(F2), .N_ITER(N_ITER)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .issue(issue), .half(half), .first_half(first_half),
    .nat_addr(nat_addr), .int_addr(int_addr), .pad(pad), .own(own), .amode(amode)
  );

  // --------------------------------------------------------------- memories
  logic [P-1:0][AWID-1:0] ls_ra, le_ra;
  logic [P-1:0][LW-1:0]   ls_rd, lp1_rd, lp2_rd;
  logic [P-1:0][EW-1:0]   le1_rd, le2_rd;
  logic [P-1:0]           le1_we, le2_we, dec_we;
  logic [P-1:0][AWID-1:0] wr_addr;
  logic [P-1:0][EW-1:0]   ext_wd;
  logic [P-1:0][0:0]      dec_wd;
  logic [0:0][0:0]        rd_bit_v;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      ls_ra[p] = half ? int_addr[p] : nat_addr[p];
      le_ra[p] = half ? int_addr[p] : nat_addr[p];
    end
  end

  llr_ram #(.W(LW), .DEPTH(K), .NRD(P), .NWR(1)) u_mem_ls (
    .clk(clk), .we(ld_en), .waddr(ld_addr), .wdata(ld_ls), .raddr(ls_ra), .rdata(ls_rd)
  );
  llr_ram #(.W(LW), .DEPTH(K), .NRD(P), .NWR(1)) u_mem_lp1 (
    .clk(clk), .we(ld_en), .waddr(ld_addr), .wdata(ld_lp1), .raddr(nat_addr), .rdata(lp1_rd)
  );
  llr_ram #(.W(LW), .DEPTH(K), .NRD(P), .NWR(1)) u_mem_lp2 (
    .clk(clk), .we(ld_en), .waddr(ld_addr), .wdata(ld_lp2), .raddr(nat_addr), .rdata(lp2_rd)
  );
  // le1: written by the natural half-iteration, read by the interleaved one
  llr_ram #(.W(EW), .DEPTH(K), .NRD(P), .NWR(P)) u_mem_le1 (
    .clk(clk), .we(le1_we), .waddr(wr_addr), .wdata(ext_wd), .raddr(le_ra), .rdata(le1_rd)
  );
  // le2: written by the interleaved half-iteration, read by the natural one
  llr_ram #(.W(EW), .DEPTH(K), .NRD(P), .NWR(P)) u_mem_le2 (
    .clk(clk), .we(le2_we), .waddr(wr_addr), .wdata(ext_wd), .raddr(le_ra), .rdata(le2_rd)
  );
  llr_ram #(.W(1), .DEPTH(K), .NRD(1), .NWR(P)) u_mem_dec (
    .clk(clk), .we(dec_we), .waddr(wr_addr), .wdata(dec_wd), .raddr(rd_addr), .rdata(rd_bit_v)
  );
  assign rd_bit = rd_bit_v[0][0];

  // --------------------------------------------------- parallel MAP decoders
  for (genvar p = 0; p < P; p++) begin : g_map
    // control of the stage whose memory words arrive this cycle
    logic            v_q, pad_q, own_q;
    amode_e          amode_q;
    logic [AWID-1:0] waddr_q;
    llr_t            ls_in, lp_in;
    ext_t            la_in;
    logic [TAGW-1:0] tag_in, tag_out;
    app_t            app_out;
    ext_t            ext_out;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q     <= 1'b0;
        pad_q   <= 1'b1;
        own_q   <= 1'b0;
        amode_q <= A_EQUI;
        waddr_q <= '0;
      end else begin
        v_q     <= issue;
        pad_q   <= pad[p] || !issue;
        own_q   <= own[p] && issue;
        amode_q <= amode[p];
        waddr_q <= half ? int_addr[p] : nat_addr[p];
      end
    end

    always_comb begin
      if (pad_q) begin
        ls_in = '0;
        lp_in = '0;
        la_in = '0;
      end else begin
        ls_in = llr_t'(ls_rd[p]);
        lp_in = half ? llr_t'(lp2_rd[p]) : llr_t'(lp1_rd[p]);
        la_in = first_half ? ext_t'(0) : (half ? ext_t'(le1_rd[p]) : ext_t'(le2_rd[p]));
      end
    end

    assign tag_in = {own_q & v_q, waddr_q};

    map_decoder #(.M(M), .TAGW(TAGW)) u_map (
      .clk(clk), .rst_n(rst_n),
      .ls(ls_in), .lp(lp_in), .la(la_in), .amode(amode_q), .tag(tag_in),
      .out_app(app_out), .out_ext(ext_out), .out_tag(tag_out)
    );

    assign wr_addr[p] = tag_out[AWID-1:0];
    assign ext_wd[p]  = ext_out;
    assign dec_wd[p]  = app_out > 0;
    assign le1_we[p]  = tag_out[AWID] && !half;
    assign le2_we[p]  = tag_out[AWID] && half;
    assign dec_we[p]  = tag_out[AWID] && half;
  end

endmodule
