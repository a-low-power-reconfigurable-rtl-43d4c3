// fft_memory: the four-bank data memory of the processor.
//
// Four fft_ram_bank instances, each with its own read and write port, so
// that one radix-4 butterfly (or two radix-2 butterflies) can read four
// operands and write four results every cycle. Ports are indexed by bank
// number; bank b holds the samples n with fft_pkg::bank_sel(n) == b. Timing
// is that of fft_ram_bank: one cycle read latency, writes at the clock edge.
module fft_memory
  import fft_pkg::*;
#(
  parameter int unsigned AW = fft_pkg::BANK_AW
) (
  input  logic          clk,
  input  logic [3:0]    we,
  input  logic [AW-1:0] waddr [4],
  input  cplx_t         wdata [4],
  input  logic [3:0]    re,
  input  logic [AW-1:0] raddr [4],
  output cplx_t         rdata [4]
);
  for (genvar b = 0; b < 4; b++) begin : g_bank
    fft_ram_bank #(.AW(AW), .DW(32)) u_bank (
      .clk  (clk),
      .we   (we[b]),
      .waddr(waddr[b]),
      .wdata(wdata[b]),
      .re   (re[b]),
      .raddr(raddr[b]),
      .rdata(rdata[b])
    );
  end
endmodule
