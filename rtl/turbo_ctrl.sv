// turbo_ctrl: schedule controller of the parallel turbo decoder.
//
// A code block of K bits is split into P sub-blocks of S = K/P stages, one
// per MAP decoder, and decoded in 2*N_ITER half-iterations: even
// half-iterations run the first constituent code in natural order, odd
// ones the second code in QPP-interleaved order. In every half-iteration
// decoder p is fed, one stage per clock, the stages
//   x = p*S - (M-1) ... p*S + S + M-2      (NSTEP = S + 2(M-1) stages):
// M-1 acquisition stages in front of its sub-block (its forward recursion
// starts there with all states equal), its S own stages, and the M-1
// stages behind it that its ungrouped backward recursions need. Stages
// outside 0..K-1 are marked as padding (zero LLRs); stage 0 restarts the
// forward recursion in the known state 0. After the last stage the
// controller waits DRAIN cycles until every result of the half-iteration
// has been written, then starts the next one.
//
// Outputs per decoder and clock (valid while issue is high): natural
// address, interleaved address pi(x), pad, own (stage in the decoder's
// sub-block, result to be written) and the forward init mode. half is the
// current half-iteration's code (0 natural, 1 interleaved), first_half
// marks the very first half-iteration (no a-priori information yet).
// done pulses for one clock when the block is decoded; busy is high from
// start until then.
//
// The document gives the parallel MAP decoders and their number, not the
// schedule between them; splitting the block into contiguous sub-blocks
// with overlapping acquisition stages is this design's choice.
module turbo_ctrl
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
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     issue,
  output logic                     half,
  output logic                     first_half,
  output logic [P-1:0][AWID-1:0]   nat_addr,
  output logic [P-1:0][AWID-1:0]   int_addr,
  output logic [P-1:0]             pad,
  output logic [P-1:0]             own,
  output amode_e [P-1:0]           amode
);

  localparam int S     = K / P;
  localparam int NSTEP = S + 2 * (M - 1);
  localparam int DRAIN = 2 * M + 2;
  localparam int NHALF = 2 * N_ITER;
  localparam int CW    = $clog2(NSTEP + DRAIN + 1);
  localparam int HW    = $clog2(NHALF + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic [HW-1:0] hcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      hcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN;
            cnt   <= '0;
            hcnt  <= '0;
          end
        end
        S_RUN: begin
          if (cnt == CW'(NSTEP - 1)) begin
            state <= S_DRAIN;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: begin
          if (cnt == CW'(DRAIN - 1)) begin
            cnt <= '0;
            if (hcnt == HW'(NHALF - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              hcnt  <= hcnt + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign issue      = (state == S_RUN);
  assign half       = hcnt[0];
  assign first_half = (hcnt == '0);

  for (genvar p = 0; p < P; p++) begin : g_dec
    localparam int X0 = p * S - (M - 1);
    logic signed [AWID+2:0] x;

    qpp_gen #(.K(K), .F1(F1), .F2(F2), .X0(X0)) u_qpp (
      .clk(clk), .rst_n(rst_n),
      .restart(state != S_RUN), .step(1'b1),
      .pi(int_addr[p])
    );

    always_comb begin
      x           = (AWID+3)'(X0) + (AWID+3)'(cnt);
      nat_addr[p] = x[AWID-1:0];
      pad[p]      = (x < 0) || (x >= (AWID+3)'(K));
      own[p]      = (x >= (AWID+3)'(p * S)) && (x < (AWID+3)'(p * S + S));
      if (x == 0)        amode[p] = A_ZERO;
      else if (cnt == 0) amode[p] = A_EQUI;
      else               amode[p] = A_RUN;
    end
  end

  initial begin
    assert (K % P == 0) else $error("turbo_ctrl: K must be a multiple of P");
  end

endmodule
