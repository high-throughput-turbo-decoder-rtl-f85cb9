// fwd_recursion_tb: self-checking testbench of the forward recursion. A
// random branch metric stream with random initialisation modes (continue,
// all states equal, state 0 known) is applied; alpha_cur is compared each
// cycle with the reference forward recursion, and holding en low must
// freeze the register.
module fwd_recursion_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0, rst_n = 0, en;
  amode_e mode;
  bmset_t bm;
  smset_t alpha;
  int     checks = 0, failures = 0;
  int     n_zero = 0, n_equi = 0, n_hold = 0;

  always #5 clk = ~clk;

  fwd_recursion dut (.clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .bm(bm), .alpha_cur(alpha));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mset_t model, cur;
    int ls, lp, la, r;
    en = 1; mode = A_ZERO; bm = '0;
    for (int s = 0; s < 8; s++) model[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      ls = int'($urandom % 64) - 32;
      lp = int'($urandom % 64) - 32;
      la = int'($urandom % 256) - 128;
      r  = int'($urandom % 100);
      bm.g10 = bm_t'(ls + la); bm.g01 = bm_t'(lp); bm.g11 = bm_t'(ls + la + lp);
      mode = (c == 0 || r < 3) ? A_ZERO : ((r < 6) ? A_EQUI : A_RUN);
      en   = (r < 95);
      if (mode == A_ZERO) begin
        n_zero++;
        for (int s = 0; s < 8; s++) cur[s] = (s == 0) ? 0 : -1024;
      end else if (mode == A_EQUI) begin
        n_equi++;
        for (int s = 0; s < 8; s++) cur[s] = 0;
      end else cur = model;
      #1;
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(alpha[s]) != cur[s]) begin
          failures++;
          if (failures < 10) $display("cycle %0d state %0d: got %0d expected %0d", c, s, alpha[s], cur[s]);
        end
      end
      if (en) model = fwd_step(cur, ls, lp, la);
      else n_hold++;
      @(negedge clk);
    end
    if (n_zero == 0 || n_equi == 0 || n_hold == 0) failures++;
    $display("modes: zero=%0d equi=%0d hold=%0d", n_zero, n_equi, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
