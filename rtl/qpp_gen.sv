// qpp_gen: quadratic permutation polynomial (QPP) interleaver address
// generator, the interleaver of the LTE turbo code (3GPP TS 36.212):
//   pi(x) = (F1*x + F2*x^2) mod K.
// It walks x = X0, X0+1, X0+2, ... without multipliers, using
//   pi(x+1) = pi(x) + g(x) mod K,  g(x) = F1 + F2*(2x+1) mod K,
//   g(x+1)  = g(x) + 2*F2 mod K,
// each update being one modular addition of two values below K. The
// start values pi(X0) and g(X0) are elaboration-time constants; X0 may be
// negative (both sequences are periodic in x with period K).
//
// The document names no interleaver; the QPP is the one LTE specifies.
// Timing: while restart is high the generator holds x = X0; every clock
// with step high (and restart low) it advances x by one. pi is a
// register output.
module qpp_gen #(
  parameter int K  = 6144,
  parameter int F1 = 263,
  parameter int F2 = 480,
  parameter int X0 = 0,
  localparam int AWID = $clog2(K)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            step,
  output logic [AWID-1:0] pi
);

  function automatic longint unsigned mod_k(longint v);
    longint r;
    r = v % longint'(K);
    if (r < 0) r = r + longint'(K);
    return longint'(r);
  endfunction

  localparam longint unsigned XM     = mod_k(longint'(X0));
  localparam longint unsigned PI0    = mod_k(longint'(F1) * longint'(XM) + mod_k(longint'(F2) * longint'(XM) * longint'(XM)));
  localparam longint unsigned G0     = mod_k(longint'(F1) + longint'(F2) * (2 * longint'(XM) + 1));
  localparam longint unsigned TWO_F2 = mod_k(2 * longint'(F2));

  logic [AWID-1:0] g_q;

  // (a + b) mod K for a, b < K
  function automatic logic [AWID-1:0] add_mod(logic [AWID-1:0] a, logic [AWID-1:0] b);
    logic [AWID:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (AWID+1)'(K)) s = s - (AWID+1)'(K);
    return s[AWID-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi  <= AWID'(PI0);
      g_q <= AWID'(G0);
    end else if (restart) begin
      pi  <= AWID'(PI0);
      g_q <= AWID'(G0);
    end else if (step) begin
      pi  <= add_mod(pi, g_q);
      g_q <= add_mod(g_q, AWID'(TWO_F2));
    end
  end

endmodule
