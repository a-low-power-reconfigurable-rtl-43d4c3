// tb_fft_cmult: random data times random and unit-circle coefficients,
// compared with an integer model of (a*w) >> 14 with round-half-up and
// saturation; also checks that the output holds while en=0.
module tb_fft_cmult;
  import fft_pkg::*;
  logic clk = 0, en = 0;
  cplx_t a, w, p;
  int checks = 0, failures = 0;

  fft_cmult dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(longint v);
    longint r = (v + 8192) >>> 14;
    return r > 32767 ? 32767 : (r < -32768 ? -32768 : int'(r));
  endfunction

  initial begin
    cplx_t last;
    real ang;
    for (int t = 0; t < 3000; t++) begin
      longint pr, pi;
      @(negedge clk);
      en = 1;
      a.re = 16'($urandom); a.im = 16'($urandom);
      if (t % 3 == 0) begin
        w.re = 16'($urandom); w.im = 16'($urandom);
      end else begin
        ang = 6.283185307179586 * real'($urandom_range(8191)) / 8192.0;
        w.re = 16'($rtoi($floor(16384.0 * $cos(ang) + 0.5)));
        w.im = 16'($rtoi($floor(-16384.0 * $sin(ang) + 0.5)));
      end
      pr = longint'(a.re) * w.re - longint'(a.im) * w.im;
      pi = longint'(a.re) * w.im + longint'(a.im) * w.re;
      @(negedge clk);
      checks++;
      if (int'(p.re) != rs(pr) || int'(p.im) != rs(pi)) begin
        failures++;
        if (failures < 10) $display("a=%0d,%0d w=%0d,%0d p=%0d,%0d want %0d,%0d",
                                    a.re, a.im, w.re, w.im, p.re, p.im, rs(pr), rs(pi));
      end
      last = p;
      en = 0; a = ~a;
      @(negedge clk);
      checks++;
      if (p !== last) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
