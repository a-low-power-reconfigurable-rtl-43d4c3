// fft_cmult: complex multiplier, data times twiddle factor.
//
//   p = a * w,  p.re = a.re*w.re - a.im*w.im,  p.im = a.re*w.im + a.im*w.re
//
// a is a 16-bit complex sample, w a 16-bit complex coefficient with
// COEF_FRAC (14) fractional bits. The products are summed at full precision,
// rounded half-up to 16 bits and saturated. The result is registered and
// loaded only when en=1, so the output is steady while the multiplier is
// unused: p is valid one cycle after a and w with en=1.
module fft_cmult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  cplx_t a,
  input  cplx_t w,
  output cplx_t p
);
  localparam int unsigned PW = 2 * DATA_W + 2;
  typedef logic signed [PW-1:0] prod_t;

  function automatic sample_t round_sat(prod_t v);
    prod_t r;
    r = (v + prod_t'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > prod_t'(32767))       return sample_t'(16'sh7fff);
    else if (r < prod_t'(-32768)) return sample_t'(16'sh8000);
    else                          return sample_t'(r);
  endfunction

  prod_t pr, pi;
  always_comb begin
    pr = prod_t'(a.re) * prod_t'(w.re) - prod_t'(a.im) * prod_t'(w.im);
    pi = prod_t'(a.re) * prod_t'(w.im) + prod_t'(a.im) * prod_t'(w.re);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      p.re <= round_sat(pr);
      p.im <= round_sat(pi);
    end
  end
endmodule
