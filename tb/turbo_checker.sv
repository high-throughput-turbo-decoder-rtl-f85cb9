// turbo_checker: stimulus and checking for end-to-end tests of the turbo
// decoder, shared by the testbenches that instantiate the decoder at
// different sizes. The testbench instantiates the decoder, this checker
// with the same parameters, and connects the decoder's ports and a few of
// its control signals (for counting mechanisms) to the checker.
//
// For each of NBLK blocks it draws random information bits, encodes them
// with the LTE turbo encoder (two 8-state RSC encoders and the QPP
// interleaver, no trellis termination), sends them over a BPSK/AWGN
// channel (Gaussian noise from a sum of 12 uniforms) and quantizes the
// received values to 6-bit LLRs. Block 0 is nearly noise free, the others
// use noise standard deviation SIGMA_MILLI/1000. It loads the LLRs,
// starts the decoder and checks:
//   - the decode time in clocks against 2*N_ITER*(K/P + 2(M-1) + 2M + 2) + 1;
//   - every decoded bit against a bit-exact reference turbo decoder
//     (same schedule and arithmetic, from tb_ref_pkg);
//   - that no decoded bit differs from the transmitted bit;
// and counts the mechanisms of the design: forward recursion started in
// the known state 0, acquisition starts with equal metrics, padding stages
// before the block and past its end, natural and interleaved
// half-iterations, and channel errors corrected. A mechanism that never
// occurred counts as a failure. It raises finished when done; the
// testbench then reports checks and failures.
module turbo_checker
  import turbo_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int K           = 6144,
  parameter int P           = 8,
  parameter int M           = 16,
  parameter int F1          = 263,
  parameter int F2          = 480,
  parameter int N_ITER      = 8,
  parameter int NBLK        = 2,
  parameter int SIGMA_MILLI = 800,
  localparam int AWID       = $clog2(K)
) (
  input  logic                   clk,
  output logic                   rst_n,
  output logic                   ld_en,
  output logic [AWID-1:0]        ld_addr,
  output llr_t                   ld_ls,
  output llr_t                   ld_lp1,
  output llr_t                   ld_lp2,
  output logic                   start,
  input  logic                   busy,
  input  logic                   done,
  output logic [AWID-1:0]        rd_addr,
  input  logic                   rd_bit,
  // monitored decoder internals
  input  logic                   mon_issue,
  input  logic                   mon_half,
  input  logic [P-1:0]           mon_pad,
  input  amode_e [P-1:0]         mon_amode,
  // results
  output logic                   finished,
  output int                     checks,
  output int                     failures
);

  localparam int S     = K / P;
  localparam int NSTEP = S + 2 * (M - 1);
  localparam int DRAIN = 2 * M + 2;

  int n_zero = 0, n_equi = 0, n_pad = 0, n_nat = 0, n_int = 0, n_corrected = 0;
  logic prev_issue = 0;

  // mechanism counters
  always @(posedge clk) begin
    prev_issue <= mon_issue;
    if (mon_issue) begin
      for (int p = 0; p < P; p++) begin
        if (mon_amode[p] == A_ZERO) n_zero++;
        if (mon_amode[p] == A_EQUI) n_equi++;
        if (mon_pad[p]) n_pad++;
      end
      if (!prev_issue) begin
        if (mon_half) n_int++;
        else          n_nat++;
      end
    end
  end

  task automatic cmp(string what, int a, int b);
    checks++;
    if (a != b) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, a, b);
    end
  endtask

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  function automatic int quant(real y);
    int q;
    q = int'(y * 8.0);      // about 8 LSB per unit amplitude
    return sat(q, LW);
  endfunction

  // reference turbo decoding with the decoder's schedule
  task automatic ref_decode(int ls[], int lp1[], int lp2[], ref int dec[]);
    int le1[], le2[], nle[];
    int sls[], slp[], sla[], sam[], app[], ext[];
    le1 = new[K]; le2 = new[K]; nle = new[K]; dec = new[K];
    sls = new[NSTEP]; slp = new[NSTEP]; sla = new[NSTEP]; sam = new[NSTEP];
    for (int i = 0; i < K; i++) begin le1[i] = 0; le2[i] = 0; end
    for (int h = 0; h < 2 * N_ITER; h++) begin
      for (int p = 0; p < P; p++) begin
        for (int j = 0; j < NSTEP; j++) begin
          int x, pix;
          x = p * S - (M - 1) + j;
          sam[j] = (x == 0) ? 2 : ((j == 0) ? 1 : 0);
          if (x < 0 || x >= K) begin
            sls[j] = 0; slp[j] = 0; sla[j] = 0;
          end else begin
            pix = qpp(x, K, F1, F2);
            sls[j] = (h % 2 == 1) ? ls[pix] : ls[x];
            slp[j] = (h % 2 == 1) ? lp2[x] : lp1[x];
            sla[j] = (h == 0) ? 0 : ((h % 2 == 1) ? le1[pix] : le2[x]);
          end
        end
        map_ref(NSTEP, M, sls, slp, sla, sam, app, ext);
        for (int j = M - 1; j < M - 1 + S; j++) begin
          int x, pix;
          x = p * S - (M - 1) + j;
          pix = qpp(x, K, F1, F2);
          if (h % 2 == 0) nle[x] = ext[j];
          else begin
            nle[pix] = ext[j];
            dec[pix] = (app[j] > 0) ? 1 : 0;
          end
        end
      end
      for (int i = 0; i < K; i++) begin
        if (h % 2 == 0) le1[i] = nle[i];
        else            le2[i] = nle[i];
      end
    end
  endtask

  initial begin
    int u[], ui[], p1[], p2[], ls[], lp1[], lp2[], rdec[];
    int st, nst, z, cyc, raw_err, dec_err, mism;
    real sigma;
    u = new[K]; ui = new[K]; p1 = new[K]; p2 = new[K];
    ls = new[K]; lp1 = new[K]; lp2 = new[K];
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; ld_en = 0; ld_addr = '0; ld_ls = '0; ld_lp1 = '0; ld_lp2 = '0;
    start = 0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      sigma = (b == 0) ? 0.05 : real'(SIGMA_MILLI) / 1000.0;
      // encoder
      for (int i = 0; i < K; i++) u[i] = int'($urandom % 2);
      for (int i = 0; i < K; i++) ui[i] = u[qpp(i, K, F1, F2)];
      st = 0;
      for (int i = 0; i < K; i++) begin enc_step(st, u[i], nst, z); p1[i] = z; st = nst; end
      st = 0;
      for (int i = 0; i < K; i++) begin enc_step(st, ui[i], nst, z); p2[i] = z; st = nst; end
      // channel
      raw_err = 0;
      for (int i = 0; i < K; i++) begin
        ls[i]  = quant((u[i]  ? 1.0 : -1.0) + sigma * gauss());
        lp1[i] = quant((p1[i] ? 1.0 : -1.0) + sigma * gauss());
        lp2[i] = quant((p2[i] ? 1.0 : -1.0) + sigma * gauss());
        if ((ls[i] > 0) != (u[i] == 1)) raw_err++;
      end
      ref_decode(ls, lp1, lp2, rdec);
      // load
      for (int i = 0; i < K; i++) begin
        ld_en = 1; ld_addr = AWID'(i);
        ld_ls = llr_t'(ls[i]); ld_lp1 = llr_t'(lp1[i]); ld_lp2 = llr_t'(lp2[i]);
        @(negedge clk);
      end
      ld_en = 0;
      cmp("busy before start", busy, 0);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      cmp("decode cycles", cyc, 2 * N_ITER * (NSTEP + DRAIN) + 1);
      // read back
      dec_err = 0; mism = 0;
      for (int i = 0; i < K; i++) begin
        rd_addr = AWID'(i);
        @(negedge clk);
        checks++;
        if (int'(rd_bit) != rdec[i]) begin
          mism++; failures++;
          if (mism < 5) $display("block %0d bit %0d: decoder %0d, reference %0d", b, i, rd_bit, rdec[i]);
        end
        if (int'(rd_bit) != u[i]) dec_err++;
      end
      cmp("decoded bit errors", dec_err, 0);
      if (raw_err > 0 && dec_err == 0) n_corrected += raw_err;
      $display("block %0d: K=%0d sigma=%0.3f channel errors %0d, decoded errors %0d, reference mismatches %0d, %0d cycles",
               b, K, sigma, raw_err, dec_err, mism, cyc);
    end
    $display("mechanisms: state0 starts %0d, acquisition starts %0d, padding stages %0d, natural halves %0d, interleaved halves %0d, channel errors corrected %0d",
             n_zero, n_equi, n_pad, n_nat, n_int, n_corrected);
    checks += 6;
    if (n_zero == 0)      begin failures++; $display("state-0 start never happened"); end
    if (n_equi == 0)      begin failures++; $display("acquisition start never happened"); end
    if (n_pad == 0)       begin failures++; $display("padding never happened"); end
    if (n_nat != NBLK * N_ITER) begin failures++; $display("natural half-iterations wrong"); end
    if (n_int != NBLK * N_ITER) begin failures++; $display("interleaved half-iterations wrong"); end
    if (n_corrected == 0) begin failures++; $display("no channel error was corrected"); end
    finished = 1;
  end
endmodule
