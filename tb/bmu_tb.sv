// bmu_tb: self-checking testbench of the branch metric unit. Random
// systematic, parity and a-priori LLRs (full range) are applied each
// clock; one cycle later the three branch metrics must equal ls+la, lp
// and ls+la+lp.
module bmu_tb;
  import turbo_pkg::*;

  logic   clk = 0;
  llr_t   ls, lp;
  ext_t   la;
  bmset_t bm;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  bmu dut (.clk(clk), .ls(ls), .lp(lp), .la(la), .bm(bm));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int els, elp, ela;
    ls = '0; lp = '0; la = '0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      ls = llr_t'($urandom); lp = llr_t'($urandom); la = ext_t'($urandom);
      if (i < 4) begin  // extremes
        ls = (i[0]) ? llr_t'(-32) : llr_t'(31);
        la = (i[1]) ? ext_t'(-128) : ext_t'(127);
        lp = ls;
      end
      els = int'(ls); elp = int'(lp); ela = int'(la);
      @(negedge clk);
      checks++;
      if (int'(bm.g10) != els + ela || int'(bm.g01) != elp || int'(bm.g11) != els + ela + elp) begin
        failures++;
        if (failures < 10)
          $display("mismatch ls=%0d lp=%0d la=%0d: g10=%0d g01=%0d g11=%0d",
                   els, elp, ela, bm.g10, bm.g01, bm.g11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
