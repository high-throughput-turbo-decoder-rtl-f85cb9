// turbo_ctrl_tb: self-checking testbench of the schedule controller, run
// at K = 40 (smallest LTE block), P = 4, M = 4, N_ITER = 2. For every
// issue cycle of every half-iteration it checks each decoder's natural
// and interleaved address, padding, ownership and forward-init mode
// against the schedule worked out from the stage index
// x = p*S - (M-1) + j, checks the half/first_half flags, the number of
// issue and drain cycles per half-iteration and the cycle on which done
// pulses, and that the own flags cover every stage of the block once per
// half-iteration.
module turbo_ctrl_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 40, P = 4, M = 4, N_ITER = 2, F1 = 3, F2 = 10;
  localparam int S = K / P, NSTEP = S + 2 * (M - 1), DRAIN = 2 * M + 2;
  localparam int AWID = $clog2(K);

  logic clk = 0, rst_n = 0, start;
  logic busy, done, issue, half, first_half;
  logic [P-1:0][AWID-1:0] nat_addr, int_addr;
  logic [P-1:0] pad, own;
  amode_e [P-1:0] amode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  turbo_ctrl #(.K(K), .P(P), .M(M), .F1(F1), .F2(F2), .N_ITER(N_ITER)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .issue(issue),
    .half(half), .first_half(first_half), .nat_addr(nat_addr), .int_addr(int_addr),
    .pad(pad), .own(own), .amode(amode));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, int a, int b);
    checks++;
    if (a != b) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, a, b);
    end
  endtask

  initial begin
    int owned [K];
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cmp("busy idle", busy, 0);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int h = 0; h < 2 * N_ITER; h++) begin
      for (int i = 0; i < K; i++) owned[i] = 0;
      for (int j = 0; j < NSTEP; j++) begin
        cmp("issue", issue, 1);
        cmp("half", half, h % 2);
        cmp("first_half", first_half, h == 0);
        cmp("done", done, 0);
        for (int p = 0; p < P; p++) begin
          int x, xm;
          bit epad, eown;
          int eam;
          x = p * S - (M - 1) + j;
          xm = ((x % K) + K) % K;
          epad = (x < 0 || x >= K);
          eown = (x >= p * S && x < p * S + S);
          eam  = (x == 0) ? 2 : ((j == 0) ? 1 : 0);
          cmp("pad", pad[p], epad);
          cmp("own", own[p], eown);
          cmp("amode", int'(amode[p]), eam);
          if (!epad) begin
            cmp("nat_addr", nat_addr[p], x);
            cmp("int_addr", int_addr[p], qpp(xm, K, F1, F2));
          end
          if (eown) owned[x]++;
        end
        @(negedge clk);
      end
      for (int j = 0; j < DRAIN; j++) begin
        cmp("issue in drain", issue, 0);
        cmp("busy in drain", busy, 1);
        if (!(h == 2 * N_ITER - 1 && j == DRAIN - 1)) cmp("done early", done, 0);
        @(negedge clk);
      end
      for (int i = 0; i < K; i++) cmp("stage owned once", owned[i], 1);
    end
    cmp("done pulse", done, 1);
    cmp("busy after", busy, 0);
    @(negedge clk);
    cmp("done single", done, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
