// acsu_tb: self-checking testbench of the add-compare-select unit. A
// forward and a backward instance get random state metrics and branch
// metrics (including saturating extremes); their outputs are compared
// with the reference recursion steps of tb_ref_pkg, which also check that
// state 0 is normalized to zero.
module acsu_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  smset_t sm_in, f_out, b_out;
  bmset_t bm;
  int     checks = 0, failures = 0;

  acsu #(.BACKWARD(1'b0)) dut_f (.sm_in(sm_in), .bm(bm), .sm_out(f_out));
  acsu #(.BACKWARD(1'b1)) dut_b (.sm_in(sm_in), .bm(bm), .sm_out(b_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mset_t a, rf, rb;
    int ls, lp, la;
    for (int i = 0; i < 5000; i++) begin
      for (int s = 0; s < 8; s++) begin
        a[s] = (i < 50) ? ((($urandom & 1) != 0) ? 2047 : -2048) : (int'($urandom % 1201) - 600);
        sm_in[s] = sm_t'(a[s]);
      end
      ls = int'($urandom % 64) - 32;
      lp = int'($urandom % 64) - 32;
      la = int'($urandom % 256) - 128;
      bm.g10 = bm_t'(ls + la);
      bm.g01 = bm_t'(lp);
      bm.g11 = bm_t'(ls + la + lp);
      #1;
      rf = fwd_step(a, ls, lp, la);
      rb = bwd_step(a, ls, lp, la);
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (int'(f_out[s]) != rf[s]) begin
          failures++;
          if (failures < 10) $display("fwd state %0d: got %0d expected %0d", s, f_out[s], rf[s]);
        end
        if (int'(b_out[s]) != rb[s]) begin
          failures++;
          if (failures < 10) $display("bwd state %0d: got %0d expected %0d", s, b_out[s], rb[s]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
