// llr_ram: multi-port memory for LLRs and decoded bits.
//
// DEPTH words of W bits with NWR write ports and NRD read ports, all
// usable in the same clock. Reads are synchronous: rdata[i] shows the word
// at raddr[i] one cycle after the address, with the contents before any
// write of that same edge. Writes to distinct addresses in one clock all
// take effect; if two write ports hit the same address the higher port
// wins. In the decoder the parallel MAP decoders always address distinct
// words, because the QPP interleaver is a permutation.
//
// The document does not describe its memory organisation; a single array
// with one port per MAP decoder is this design's simplest choice (a
// banked memory with a contention-free QPP crossbar would replace it in a
// silicon implementation).
module llr_ram #(
  parameter int W     = 8,
  parameter int DEPTH = 6144,
  parameter int NRD   = 8,
  parameter int NWR   = 8,
  localparam int AWID = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic [NWR-1:0]            we,
  input  logic [NWR-1:0][AWID-1:0]  waddr,
  input  logic [NWR-1:0][W-1:0]     wdata,
  input  logic [NRD-1:0][AWID-1:0]  raddr,
  output logic [NRD-1:0][W-1:0]     rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < NWR; i++) begin
      if (we[i]) mem[waddr[i]] <= wdata[i];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NRD; i++) begin
      rdata[i] <= mem[raddr[i]];
    end
  end

endmodule
