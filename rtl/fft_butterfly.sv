// fft_butterfly: radix-2/4 butterfly operator.
//
// In radix-4 mode (radix2=0) it computes the decimation-in-frequency radix-4
// butterfly of operands x0..x3:
//   y0 = (x0+x2) + (x1+x3)        y2 = (x0+x2) - (x1+x3)
//   y1 = (x0-x2) - j(x1-x3)       y3 = (x0-x2) + j(x1-x3)
// In radix-2 mode it computes two radix-2 butterflies side by side:
//   y0 = x0+x1, y1 = x0-x1, y2 = x2+x3, y3 = x2-x3
// so a radix-2 stage takes as many cycles as a radix-4 stage.
// To keep the 16-bit word from overflowing, results are scaled by 1/4
// (radix-4) or 1/2 (radix-2) with round-half-up and saturated to 16 bits;
// a whole transform is therefore scaled by 1/N. The scaling is this design's
// choice. Outputs are registered: valid and y follow the inputs by one cycle.
module fft_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  radix2,
  input  cplx_t x [4],
  output logic  out_valid,
  output cplx_t y [4]
);
  localparam int unsigned SW = DATA_W + 3;   // 4 operands plus rounding
  typedef logic signed [SW-1:0] wide_t;

  function automatic sample_t scale_sat(wide_t v, int unsigned sh);
    wide_t r;
    r = (v + wide_t'(1 << (sh - 1))) >>> sh;
    if (r > wide_t'(32767))       return sample_t'(16'sh7fff);
    else if (r < wide_t'(-32768)) return sample_t'(16'sh8000);
    else                          return sample_t'(r);
  endfunction

  cplx_t yc [4];

  always_comb begin
    wide_t ar, ai, br, bi, cr, ci, dr, di;   // a = x0+x2, b = x1+x3, c = x0-x2, d = x1-x3
    ar = wide_t'(x[0].re) + wide_t'(x[2].re);  ai = wide_t'(x[0].im) + wide_t'(x[2].im);
    br = wide_t'(x[1].re) + wide_t'(x[3].re);  bi = wide_t'(x[1].im) + wide_t'(x[3].im);
    cr = wide_t'(x[0].re) - wide_t'(x[2].re);  ci = wide_t'(x[0].im) - wide_t'(x[2].im);
    dr = wide_t'(x[1].re) - wide_t'(x[3].re);  di = wide_t'(x[1].im) - wide_t'(x[3].im);
    if (radix2) begin
      yc[0].re = scale_sat(wide_t'(x[0].re) + wide_t'(x[1].re), 1);
      yc[0].im = scale_sat(wide_t'(x[0].im) + wide_t'(x[1].im), 1);
      yc[1].re = scale_sat(wide_t'(x[0].re) - wide_t'(x[1].re), 1);
      yc[1].im = scale_sat(wide_t'(x[0].im) - wide_t'(x[1].im), 1);
      yc[2].re = scale_sat(wide_t'(x[2].re) + wide_t'(x[3].re), 1);
      yc[2].im = scale_sat(wide_t'(x[2].im) + wide_t'(x[3].im), 1);
      yc[3].re = scale_sat(wide_t'(x[2].re) - wide_t'(x[3].re), 1);
      yc[3].im = scale_sat(wide_t'(x[2].im) - wide_t'(x[3].im), 1);
    end else begin
      yc[0].re = scale_sat(ar + br, 2);  yc[0].im = scale_sat(ai + bi, 2);
      yc[2].re = scale_sat(ar - br, 2);  yc[2].im = scale_sat(ai - bi, 2);
      // -j*d = d.im - j*d.re ; +j*d = -d.im + j*d.re
      yc[1].re = scale_sat(cr + di, 2);  yc[1].im = scale_sat(ci - dr, 2);
      yc[3].re = scale_sat(cr - di, 2);  yc[3].im = scale_sat(ci + dr, 2);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  // Data registers load only with valid operands, so they hold still
  // (no switching) in idle cycles.
  always_ff @(posedge clk) begin
    if (in_valid) y <= yc;
  end
endmodule
