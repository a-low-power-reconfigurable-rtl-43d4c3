// tb_fft_butterfly: random operands, including full-scale corner values, in
// both modes. The expected results are computed here with integer arithmetic
// from the butterfly equations, with the same 1/4 (radix-4) or 1/2 (radix-2)
// scaling, round-half-up and saturation. Also checks the one-cycle latency of
// out_valid.
module tb_fft_butterfly;
  import fft_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, radix2 = 0, out_valid;
  cplx_t x [4], y [4];
  int checks = 0, failures = 0;

  fft_butterfly dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sc(int v, int sh);
    int r = (v + (1 << (sh - 1))) >>> sh;
    return r > 32767 ? 32767 : (r < -32768 ? -32768 : r);
  endfunction

  function automatic int rnd16(int t);
    case (t % 5)
      0: return 32767;
      1: return -32768;
      default: return int'($urandom_range(65535)) - 32768;
    endcase
  endfunction

  initial begin
    int er [4], ei [4], xr [4], xi [4];
    for (int i = 0; i < 4; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = 1;
      radix2 = t[0];
      for (int i = 0; i < 4; i++) begin
        x[i].re = 16'(t < 1000 ? rnd16($urandom) : int'($urandom_range(65535)) - 32768);
        x[i].im = 16'(t < 1000 ? rnd16($urandom) : int'($urandom_range(65535)) - 32768);
      end
      for (int i = 0; i < 4; i++) begin xr[i] = int'(x[i].re); xi[i] = int'(x[i].im); end
      if (radix2) begin
        er[0] = sc(xr[0] + xr[1], 1); ei[0] = sc(xi[0] + xi[1], 1);
        er[1] = sc(xr[0] - xr[1], 1); ei[1] = sc(xi[0] - xi[1], 1);
        er[2] = sc(xr[2] + xr[3], 1); ei[2] = sc(xi[2] + xi[3], 1);
        er[3] = sc(xr[2] - xr[3], 1); ei[3] = sc(xi[2] - xi[3], 1);
      end else begin
        // X(k) = sum_n x(n) (-j)^(nk), k = 0..3
        er[0] = sc(xr[0] + xr[1] + xr[2] + xr[3], 2);
        ei[0] = sc(xi[0] + xi[1] + xi[2] + xi[3], 2);
        er[1] = sc(xr[0] + xi[1] - xr[2] - xi[3], 2);
        ei[1] = sc(xi[0] - xr[1] - xi[2] + xr[3], 2);
        er[2] = sc(xr[0] - xr[1] + xr[2] - xr[3], 2);
        ei[2] = sc(xi[0] - xi[1] + xi[2] - xi[3], 2);
        er[3] = sc(xr[0] - xi[1] - xr[2] + xi[3], 2);
        ei[3] = sc(xi[0] + xr[1] - xi[2] - xr[3], 2);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(y[k].re) != er[k] || int'(y[k].im) != ei[k]) begin
          failures++;
          if (failures < 10) $display("r2=%0d k=%0d got %0d,%0d want %0d,%0d",
                                      radix2, k, y[k].re, y[k].im, er[k], ei[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
