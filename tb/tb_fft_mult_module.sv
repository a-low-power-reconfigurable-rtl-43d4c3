// tb_fft_mult_module: random butterfly outputs, coefficients, trivial flags,
// quadrants and legal routings (no multiplier shared). Expected: output 0
// and trivial outputs delayed one cycle unchanged, the others multiplied by
// the coefficient of their multiplier (integer model of the complex
// multiplier; with share set, multiplier 2 uses coefficient 1); quadrants delayed with output 0 forced to 0. Also checks that
// an unused multiplier keeps its last product.
module tb_fft_mult_module;
  import fft_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t y [4], coef [3], z [4];
  logic [3:0] triv;
  logic share = 0;
  logic [1:0] q [4], route [4], zq [4];
  int checks = 0, failures = 0;

  fft_mult_module dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(longint v);
    longint r = (v + 8192) >>> 14;
    return r > 32767 ? 32767 : (r < -32768 ? -32768 : int'(r));
  endfunction

  initial begin
    static int perm [6][3] = '{'{0,1,2}, '{0,2,1}, '{1,0,2}, '{1,2,0}, '{2,0,1}, '{2,1,0}};
    for (int i = 0; i < 4; i++) begin y[i] = '0; q[i] = '0; route[i] = '0; end
    for (int k = 0; k < 3; k++) coef[k] = '0;
    triv = '1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int pr;
      int er [4], ei [4];
      pr = $urandom_range(5);
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 4; i++) begin
        y[i] = $urandom; q[i] = 2'($urandom);
      end
      for (int k = 0; k < 3; k++) coef[k] = $urandom;
      share = ($urandom_range(3) == 0);
      triv = 4'($urandom);
      route[0] = 2'($urandom);
      for (int p = 1; p < 4; p++) route[p] = 2'(perm[pr][p - 1]);
      for (int p = 0; p < 4; p++) begin
        if (p == 0 || triv[p]) begin er[p] = int'(y[p].re); ei[p] = int'(y[p].im); end
        else begin
          cplx_t w;
          w = (share && route[p] == 2'd2) ? coef[1] : coef[route[p]];
          er[p] = rs(longint'(y[p].re) * w.re - longint'(y[p].im) * w.im);
          ei[p] = rs(longint'(y[p].re) * w.im + longint'(y[p].im) * w.re);
        end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(z[p].re) != er[p] || int'(z[p].im) != ei[p] ||
            zq[p] != (p == 0 ? 2'd0 : q[p])) begin
          failures++;
          if (failures < 10) $display("t=%0d p=%0d triv=%b got %0d,%0d want %0d,%0d",
                                      t, p, triv, z[p].re, z[p].im, er[p], ei[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
