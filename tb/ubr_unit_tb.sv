// ubr_unit_tb: self-checking testbench of the ungrouped backward recursion
// pipeline. A continuous stream of random branch metric sets is applied,
// one per clock; 2M-2 cycles after stage k entered, beta_out must equal a
// backward recursion started with equal metrics at stage k+M-1 and run
// over the branch metrics of stages k+M-1 down to k+1 (reference model).
// This also checks the 2M-2 cycle latency. Runs at the default M = 16 and,
// in a second instance, at M = 4.
module ubr_unit_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 400;

  logic   clk = 0, rst_n = 0;
  bmset_t bm;
  smset_t beta16, beta4;
  int     ls_a [N], lp_a [N], la_a [N];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  ubr_unit         dut16 (.clk(clk), .rst_n(rst_n), .bm_in(bm), .beta_out(beta16));
  ubr_unit #(.M(4)) dut4 (.clk(clk), .rst_n(rst_n), .bm_in(bm), .beta_out(beta4));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mset_t ref_beta(int k, int M);
    mset_t b;
    for (int s = 0; s < 8; s++) b[s] = 0;
    for (int j = k + M - 1; j > k; j--) b = bwd_step(b, ls_a[j], lp_a[j], la_a[j]);
    return b;
  endfunction

  task automatic check(int k, int M, smset_t got);
    mset_t r;
    r = ref_beta(k, M);
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (int'(got[s]) != r[s]) begin
        failures++;
        if (failures < 10) $display("M=%0d stage %0d state %0d: got %0d expected %0d", M, k, s, got[s], r[s]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      ls_a[i] = int'($urandom % 64) - 32;
      lp_a[i] = int'($urandom % 64) - 32;
      la_a[i] = (i < 100) ? 0 : int'($urandom % 256) - 128;
    end
    bm = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N + 40; c++) begin
      // cycle c: stage c enters
      if (c < N) begin
        bm.g10 = bm_t'(ls_a[c] + la_a[c]);
        bm.g01 = bm_t'(lp_a[c]);
        bm.g11 = bm_t'(ls_a[c] + la_a[c] + lp_a[c]);
      end else bm = '0;
      // effective sets visible in this cycle
      if (c - 30 >= 0 && c - 30 + 15 < N) check(c - 30, 16, beta16);
      if (c - 6 >= 0 && c - 6 + 3 < N) check(c - 6, 4, beta4);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
