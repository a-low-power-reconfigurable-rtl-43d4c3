// tb_fft_phase_comp: every quadrant on random values and on the most negative
// value; the expected output is in * (-j)^q worked out component-wise.
module tb_fft_phase_comp;
  import fft_pkg::*;
  logic [1:0] q;
  cplx_t din, dout;
  int checks = 0, failures = 0;

  fft_phase_comp dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return v > 32767 ? 32767 : v;
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int r, i, wr, wi;
      q = 2'(t);
      din.re = (t % 17 == 0) ? 16'sh8000 : 16'($urandom);
      din.im = (t % 13 == 0) ? 16'sh8000 : 16'($urandom);
      r = int'(din.re); i = int'(din.im);
      // (r + j i) * (-j)^q
      case (t % 4)
        0: begin wr = r;        wi = i;        end
        1: begin wr = i;        wi = sat(-r);  end
        2: begin wr = sat(-r);  wi = sat(-i);  end
        default: begin wr = sat(-i); wi = r;   end
      endcase
      #1;
      checks++;
      if (int'(dout.re) != wr || int'(dout.im) != wi) begin
        failures++;
        $display("q=%0d in %0d,%0d out %0d,%0d", q, r, i, dout.re, dout.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
