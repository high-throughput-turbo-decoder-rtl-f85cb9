// map_decoder_tb: self-checking testbench of the MAP decoder. Streams of
// random LLRs are decoded back to back, one stage per clock, with the
// forward initialisation modes the turbo decoder uses (all states equal at
// a stream start, state 0 known at a block start) and zero-LLR stages
// between streams. Every output is compared, bit exactly, with the
// windowed max-log MAP reference of tb_ref_pkg, and each stage's tag must
// come out exactly 2M cycles after the stage went in. Runs at M = 16
// (default) and M = 5.
module map_decoder_tb;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N    = 600;   // stages in the test stream
  localparam int TAGW = 16;

  logic            clk = 0, rst_n = 0;
  llr_t            ls, lp;
  ext_t            la;
  amode_e          amode;
  logic [TAGW-1:0] tag;
  app_t            app16, app5;
  ext_t            ext16, ext5;
  logic [TAGW-1:0] tag16, tag5;
  int              checks = 0, failures = 0;
  int              ls_a[], lp_a[], la_a[], am_a[];
  int              rapp16[], rext16[], rapp5[], rext5[];

  always #5 clk = ~clk;

  map_decoder #(.TAGW(TAGW)) dut16 (
    .clk(clk), .rst_n(rst_n), .ls(ls), .lp(lp), .la(la), .amode(amode), .tag(tag),
    .out_app(app16), .out_ext(ext16), .out_tag(tag16));
  map_decoder #(.M(5), .TAGW(TAGW)) dut5 (
    .clk(clk), .rst_n(rst_n), .ls(ls), .lp(lp), .la(la), .amode(amode), .tag(tag),
    .out_app(app5), .out_ext(ext5), .out_tag(tag5));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, int k, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s stage %0d: got %0d expected %0d", what, k, got, exp);
    end
  endtask

  initial begin
    ls_a = new[N]; lp_a = new[N]; la_a = new[N]; am_a = new[N];
    for (int i = 0; i < N; i++) begin
      // a stretch of zero-LLR padding between two streams
      bit padst;
      padst = (i >= 280 && i < 300);
      ls_a[i] = padst ? 0 : int'($urandom % 64) - 32;
      lp_a[i] = padst ? 0 : int'($urandom % 64) - 32;
      la_a[i] = (padst || i < 150) ? 0 : int'($urandom % 256) - 128;
      am_a[i] = (i == 0) ? 1 : ((i == 20 || i == 300) ? 2 : ((i == 200) ? 1 : 0));
    end
    map_ref(N, 16, ls_a, lp_a, la_a, am_a, rapp16, rext16);
    map_ref(N, 5,  ls_a, lp_a, la_a, am_a, rapp5,  rext5);
    ls = '0; lp = '0; la = '0; amode = A_EQUI; tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N + 40; c++) begin
      if (c < N) begin
        ls = llr_t'(ls_a[c]); lp = llr_t'(lp_a[c]); la = ext_t'(la_a[c]);
        amode = amode_e'(am_a[c]);
        tag = TAGW'(c + 1);
      end else begin
        ls = '0; lp = '0; la = '0; amode = A_RUN; tag = '0;
      end
      #1;
      // outputs visible now belong to stage c - 2M
      if (c - 32 >= 0 && c - 32 < N) begin
        cmp("tag16", c - 32, int'(tag16), c - 32 + 1);
        cmp("app16", c - 32, int'(app16), rapp16[c - 32]);
        cmp("ext16", c - 32, int'(ext16), rext16[c - 32]);
      end
      if (c - 10 >= 0 && c - 10 < N) begin
        cmp("tag5", c - 10, int'(tag5), c - 10 + 1);
        cmp("app5", c - 10, int'(app5), rapp5[c - 10]);
        cmp("ext5", c - 10, int'(ext5), rext5[c - 10]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
