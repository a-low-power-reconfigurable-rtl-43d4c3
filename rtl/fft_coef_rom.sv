// fft_coef_rom: twiddle factor ROM.
//
// With M = 4 * 2**AW, word k (0 <= k < M/4) holds
// W_M^k = cos(2*pi*k/M) - j*sin(2*pi*k/M) as {re, im}, each rounded to 16
// bits with 14 fractional bits. Only the first quadrant is stored: the phase
// compensators supply the factor (-j)^q. The processor uses one ROM with
// AW = 11 (M = NMAX = 8192, 2048 words) and two with AW = 10 (M = 4096,
// 1024 words, i.e. the even words of the large one), the ROM sizes of the
// design this follows. The table is computed when the ROM is initialised,
// with integer arithmetic only: sin and cos of x = (pi/2)*k/2**AW from their Taylor
// series to x**19 in 28-bit fixed point (error far below 1/2 LSB of the
// 16-bit result), then rounded half-up. Read is synchronous with enable: with en=1 the word at addr
// appears on data after the clock edge and then stays until the next enabled
// read, so a multiplier's coefficient input does not toggle while it is not
// being changed.
module fft_coef_rom
  import fft_pkg::*;
#(
  parameter int unsigned AW = fft_pkg::ROM_AW
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output cplx_t         data
);
  localparam int unsigned FB = 28;               // fraction bits of the series
  localparam longint PI_HALF = 64'd421657428;   // round(pi/2 * 2**28)

  function automatic cplx_t twiddle(int unsigned k);
    longint x, x2, ts, tc, s, c;
    cplx_t w;
    x  = (longint'(k) * PI_HALF) >>> AW;
    x2 = (x * x) >>> FB;
    ts = x;             s = x;
    tc = longint'(1) << FB; c = tc;
    for (int n = 1; n <= 9; n++) begin
      ts = -(((ts * x2) >>> FB) / longint'((2 * n) * (2 * n + 1)));
      tc = -(((tc * x2) >>> FB) / longint'((2 * n - 1) * (2 * n)));
      s += ts;
      c += tc;
    end
    w.re = sample_t'((c + (longint'(1) << (FB - COEF_FRAC - 1))) >>> (FB - COEF_FRAC));
    w.im = sample_t'(-((s + (longint'(1) << (FB - COEF_FRAC - 1))) >>> (FB - COEF_FRAC)));
    return w;
  endfunction

  cplx_t rom [1 << AW];

  initial begin
    for (int unsigned k = 0; k < (1 << AW); k++) rom[k] = twiddle(k);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
