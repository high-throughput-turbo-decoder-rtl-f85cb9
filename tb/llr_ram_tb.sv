// llr_ram_tb: self-checking testbench of the multi-port memory. A 64-word
// instance with 4 write and 3 read ports gets random writes to distinct
// addresses on all write ports at once and random reads on all read
// ports; read data (one cycle latency, old data on a read of a word being
// written) is compared with a model array.
module llr_ram_tb;
  localparam int W = 8, DEPTH = 64, NRD = 3, NWR = 4;

  logic                 clk = 0;
  logic [NWR-1:0]       we;
  logic [NWR-1:0][5:0]  waddr;
  logic [NWR-1:0][W-1:0] wdata;
  logic [NRD-1:0][5:0]  raddr;
  logic [NRD-1:0][W-1:0] rdata;
  logic [W-1:0]         model [DEPTH];
  logic [W-1:0]         expv  [NRD];
  int                   checks = 0, failures = 0;

  always #5 clk = ~clk;

  llr_ram #(.W(W), .DEPTH(DEPTH), .NRD(NRD), .NWR(NWR)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the memory first
    raddr = '0;
    for (int a = 0; a < DEPTH; a += NWR) begin
      @(negedge clk);
      for (int i = 0; i < NWR; i++) begin
        we[i] = 1; waddr[i] = 6'(a + i); wdata[i] = W'($urandom);
        model[a + i] = wdata[i];
      end
    end
    @(negedge clk);
    we = '0;
    for (int c = 0; c < 3000; c++) begin
      int base;
      base = int'($urandom % DEPTH);
      for (int i = 0; i < NWR; i++) begin
        we[i] = ($urandom % 2) != 0;
        waddr[i] = 6'((base + 7 * i) % DEPTH);
        wdata[i] = W'($urandom);
      end
      for (int r = 0; r < NRD; r++) begin
        raddr[r] = (r == 0) ? waddr[0] : 6'($urandom);
        expv[r] = model[raddr[r]];
      end
      for (int i = 0; i < NWR; i++) if (we[i]) model[waddr[i]] = wdata[i];
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rdata[r] != expv[r]) begin
          failures++;
          if (failures < 10) $display("port %0d: got %0h expected %0h", r, rdata[r], expv[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
