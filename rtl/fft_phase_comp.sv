// fft_phase_comp: phase compensator.
//
// The multipliers are fed modified coefficients W^c' with c' = c mod (N/4);
// the dropped factor W^(q*N/4) = (-j)^q is restored here by a swap of the
// real and imaginary parts and/or a negation:
//   q = 0: out = in        q = 1: out = -j*in
//   q = 2: out = -in       q = 3: out = +j*in
// Negation saturates (-(-32768) gives 32767). Purely combinational.
module fft_phase_comp
  import fft_pkg::*;
(
  input  logic [1:0] q,
  input  cplx_t      din,
  output cplx_t      dout
);
  function automatic sample_t neg_sat(sample_t v);
    return (v == sample_t'(16'sh8000)) ? sample_t'(16'sh7fff) : sample_t'(-v);
  endfunction

  always_comb begin
    unique case (q)
      2'd0: dout = din;
      2'd1: begin dout.re = din.im;          dout.im = neg_sat(din.re); end
      2'd2: begin dout.re = neg_sat(din.re); dout.im = neg_sat(din.im); end
      2'd3: begin dout.re = neg_sat(din.im); dout.im = din.re;          end
    endcase
  end
endmodule
