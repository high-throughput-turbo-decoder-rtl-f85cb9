// turbo_p64_tb: end-to-end test of the 64-parallel configuration of the
// turbo decoder: LTE block of 6144 bits split over 64 MAP decoders of 96
// stages each, window 16, 8 iterations; two blocks are decoded.
module turbo_p64_tb;
  import turbo_pkg::*;

  localparam int K = 6144, P = 64, M = 16, F1 = 263, F2 = 480, N_ITER = 8, AWID = $clog2(K);
  localparam int WATCHDOG = 60000;

  logic clk = 0;
  logic rst_n, ld_en, start, busy, done, rd_bit, finished;
  logic [AWID-1:0] ld_addr, rd_addr;
  llr_t ld_ls, ld_lp1, ld_lp2;
  int checks, failures;

  always #5 clk = ~clk;

  turbo_decoder #(.P(P)) dut (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_addr(ld_addr), .ld_ls(ld_ls),
    .ld_lp1(ld_lp1), .ld_lp2(ld_lp2), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_bit(rd_bit));

  turbo_checker #(.K(K), .P(P), .M(M), .F1(F1), .F2(F2), .N_ITER(N_ITER),
                  .NBLK(2), .SIGMA_MILLI(800)) chk (
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
