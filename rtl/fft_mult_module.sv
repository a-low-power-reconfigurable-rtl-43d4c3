// fft_mult_module: the multiplier module, three complex multipliers behind
// multiplexers, plus one-cycle buffers.
//
// Butterfly output 0 never needs a twiddle and output p (1..3) needs one
// unless its coefficient is trivial (W^0 times a power of -j). Each
// multiplier k takes, through an input multiplexer, the output p routed to
// it (route[p] == k, triv[p] == 0) and multiplies it by coef[k], the word
// held by its coefficient ROM. Outputs with a trivial coefficient, and
// output 0, pass through a one-cycle buffer instead so that all four results
// stay aligned; an output multiplexer picks multiplier or buffer. Unused
// multipliers are not clocked (enable low), so their inputs and outputs hold.
// The quadrant of each output is delayed alongside for the phase
// compensators.
//
// Timing: in_valid, y, triv, q, route and coef in cycle t; out_valid, z and
// zq in cycle t+1.
module fft_mult_module
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  cplx_t      y     [4],
  input  logic [3:0] triv,
  input  logic [1:0] q     [4],
  input  logic [1:0] route [4],
  input  cplx_t      coef  [3],
  input  logic       share,        // multiplier 2 uses coef[1]
  output logic       out_valid,
  output cplx_t      z     [4],
  output logic [1:0] zq    [4]
);
  cplx_t      a    [3];
  logic [2:0] men;
  cplx_t      prod [3];
  cplx_t      buf_q [4];
  logic [3:0] triv_q;
  logic [1:0] route_q [4];

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      a[k]   = '0;
      men[k] = 1'b0;
      for (int p = 1; p < 4; p++) begin
        if (in_valid && !triv[p] && route[p] == 2'(k)) begin
          a[k]   = y[p];
          men[k] = 1'b1;
        end
      end
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_mult
    fft_cmult u_cmult (
      .clk(clk),
      .en (men[k]),
      .a  (a[k]),
      .w  ((k == 2 && share) ? coef[1] : coef[k]),
      .p  (prod[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      triv_q  <= triv | 4'b0001;
      route_q <= route;
      zq      <= q;
      zq[0]   <= 2'd0;
      for (int p = 0; p < 4; p++) if (p == 0 || triv[p]) buf_q[p] <= y[p];
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) z[p] = triv_q[p] ? buf_q[p] : prod[route_q[p]];
  end
endmodule
