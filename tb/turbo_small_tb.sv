// turbo_small_tb: end-to-end test of the turbo decoder at the smallest
// LTE block size, K = 40 (QPP coefficients 3 and 10), with 4 parallel MAP
// decoders, window 4 and 2 iterations; three blocks are decoded.
module turbo_small_tb;
  import turbo_pkg::*;

  localparam int K = 40, P = 4, M = 4, F1 = 3, F2 = 10, N_ITER = 2, AWID = $clog2(K);
  localparam int WATCHDOG = 20000;

  logic clk = 0;
  logic rst_n, ld_en, start, busy, done, rd_bit, finished;
  logic [AWID-1:0] ld_addr, rd_addr;
  llr_t ld_ls, ld_lp1, ld_lp2;
  int checks, failures;

  always #5 clk = ~clk;

  turbo_decoder #(.K(K), .P(P), .M(M), .F1(F1), .F2(F2), .N_ITER(N_ITER)) dut (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_addr(ld_addr), .ld_ls(ld_ls),
    .ld_lp1(ld_lp1), .ld_lp2(ld_lp2), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_bit(rd_bit));

  turbo_checker #(.K(K), .P(P), .M(M), .F1(F1), .F2(F2), .N_ITER(N_ITER),
                  .NBLK(3), .SIGMA_MILLI(500)) chk (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_addr(ld_addr), .ld_ls(ld_ls),
    .ld_lp1(ld_lp1), .ld_lp2(ld_lp2), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_bit(rd_bit),
    .mon_issue(dut.u_ctrl.issue), .mon_half(dut.u_ctrl.half),
    .mon_pad(dut.u_ctrl.pad), .mon_amode(dut.u_ctrl.amode),
    .finished(finished), .checks(checks), .failures(failures));

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);  // the checker clears finished at time 0
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
