// fft_ram_bank: one bank of the FFT data memory, a simple dual-port RAM of
// DEPTH words of 32 bits (default 2048 x 32, one quarter of an 8192-point
// transform).
//
// One write port and one read port work in the same cycle, so a butterfly
// can read its operands while the results of an earlier butterfly are written
// back. Both ports are synchronous: a write with we=1 takes effect at the
// clock edge; a read with re=1 presents the word on rdata after the edge and
// holds it while re=0. A read of the address being written in the same cycle
// returns the old word. The contents are not reset.
module fft_ram_bank #(
  parameter int unsigned AW = fft_pkg::BANK_AW,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
