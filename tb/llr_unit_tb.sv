// llr_unit_tb: self-checking testbench of the LLR unit. Random forward and
// backward metric sets, branch metrics and LLRs (with extremes that
// saturate the extrinsic output) are applied; one cycle later the a
// posteriori and extrinsic LLRs must match the reference model.
module llr_unit_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0;
  smset_t alpha, beta;
  bmset_t bm;
  llr_t   ls;
  ext_t   la;
  app_t   app;
  ext_t   ext;
  int     checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  llr_unit dut (.clk(clk), .alpha(alpha), .beta(beta), .bm(bm), .ls(ls), .la(la),
                .llr_app(app), .llr_ext(ext));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mset_t a, b;
    int ils, ilp, ila, eapp, eext, range;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      range = (i % 2 == 0) ? 200 : 1600;
      for (int s = 0; s < 8; s++) begin
        a[s] = int'($urandom % (range + 1)) - range / 2;
        b[s] = int'($urandom % (range + 1)) - range / 2;
        alpha[s] = sm_t'(a[s]);
        beta[s]  = sm_t'(b[s]);
      end
      ils = int'($urandom % 64) - 32;
      ilp = int'($urandom % 64) - 32;
      ila = int'($urandom % 256) - 128;
      ls = llr_t'(ils); la = ext_t'(ila);
      bm.g10 = bm_t'(ils + ila); bm.g01 = bm_t'(ilp); bm.g11 = bm_t'(ils + ila + ilp);
      llr(a, b, ils, ilp, ila, eapp, eext);
      if (eext == 127 || eext == -128) n_sat++;
      @(negedge clk);
      checks += 2;
      if (int'(app) != eapp || int'(ext) != eext) begin
        failures++;
        if (failures < 10) $display("vector %0d: app %0d/%0d ext %0d/%0d", i, app, eapp, ext, eext);
      end
    end
    if (n_sat == 0) failures++;
    $display("saturated extrinsic outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
