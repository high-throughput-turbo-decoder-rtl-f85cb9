// qpp_gen_tb: self-checking testbench of the QPP address generator. Three
// instances (the smallest LTE block K=40, K=1024 and the largest K=6144,
// with their LTE coefficients) are started at several offsets, including a
// negative one, and stepped with gaps and restarts; every address is
// compared with (F1*x + F2*x^2) mod K computed directly, and a full period
// of K=40 and K=6144 must visit every address exactly once.
module qpp_gen_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart, step;
  logic [5:0]  pi40;
  logic [9:0]  pi1024;
  logic [12:0] pi6144;
  logic [12:0] pi6144b;
  int   checks = 0, failures = 0;
  bit   seen40 [40];
  bit   seen6144 [6144];

  always #5 clk = ~clk;

  qpp_gen #(.K(40),   .F1(3),   .F2(10),  .X0(-7))   d40   (.clk(clk), .rst_n(rst_n), .restart(restart), .step(step), .pi(pi40));
  qpp_gen #(.K(1024), .F1(31),  .F2(64),  .X0(512))  d1024 (.clk(clk), .rst_n(rst_n), .restart(restart), .step(step), .pi(pi1024));
  qpp_gen                                            d6144 (.clk(clk), .rst_n(rst_n), .restart(restart), .step(step), .pi(pi6144));
  qpp_gen #(.X0(5000))                               d6144b(.clk(clk), .rst_n(rst_n), .restart(restart), .step(step), .pi(pi6144b));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, int x, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s x=%0d: got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin
    int n;
    restart = 1; step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      restart = 1;
      @(negedge clk);
      restart = 0;
      n = 0;
      for (int c = 0; c < 6144 + 50; c++) begin
        step = (pass == 0) ? 1'b1 : (($urandom % 4) != 0);
        #1;
        cmp("K40",   n, int'(pi40),    qpp(((n - 7) % 40 + 40) % 40, 40, 3, 10));
        cmp("K1024", n, int'(pi1024),  qpp((n + 512) % 1024, 1024, 31, 64));
        cmp("K6144", n, int'(pi6144),  qpp(n % 6144, 6144, 263, 480));
        cmp("K6144b", n, int'(pi6144b), qpp((n + 5000) % 6144, 6144, 263, 480));
        if (pass == 0 && n < 40) seen40[pi40] = 1;
        if (pass == 0 && n < 6144) seen6144[pi6144] = 1;
        if (step) n++;
        @(negedge clk);
      end
    end
    for (int i = 0; i < 40; i++) begin checks++; if (!seen40[i]) failures++; end
    for (int i = 0; i < 6144; i++) begin checks++; if (!seen6144[i]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
