// tb_fft_snqr: quantisation-error workload. For every size 64..8192 it runs
// 100 random 16-bit patterns (uniform in re and im, half of full scale)
// through the processor and compares each result with a reference transform
// scaled by 1/N, computed here in double precision with an iterative radix-2
// decimation-in-time FFT (a different algorithm from the device's). It reports, per size, the mean square error (in LSB^2
// of the 16-bit output) and the signal-to-quantisation-noise ratio
//   SNQR = 10 log10( sum |X|^2 / sum |X - Xq|^2 ).
// Checks: no result is off by more than 4 LSB, SNQR stays above 30 dB, and
// SNQR falls as the size grows (each stage adds rounding noise while the
// 1/N-scaled signal shrinks).
module tb_fft_snqr;
  import fft_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        in_valid = 1'b0;
  logic [31:0] in_data = '0;
  logic [3:0]  sel = 4'b0100;
  logic        busy, out_valid;
  logic [31:0] out_data;

  fft_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PATTERNS [8] = '{100, 100, 100, 100, 100, 100, 100, 100};

  real xr [8192], xi [8192], cs [8192], sn [8192], fr [8192], fi [8192];

  // reference: fr/fi = DFT(xr, xi) / n
  task automatic ref_fft(input int log2n);
    int n;
    n = 1 << log2n;
    for (int i = 0; i < n; i++) begin
      int r;
      r = 0;
      for (int b = 0; b < log2n; b++) if ((i & (1 << b)) != 0) r |= 1 << (log2n - 1 - b);
      fr[r] = xr[i];
      fi[r] = xi[i];
    end
    for (int len = 2; len <= n; len *= 2) begin
      for (int s0 = 0; s0 < n; s0 += len) begin
        for (int j = 0; j < len / 2; j++) begin
          int w, a, b;
          real tr, ti;
          w = j * (n / len);
          a = s0 + j;
          b = a + len / 2;
          tr = fr[b] * cs[w] + fi[b] * sn[w];
          ti = fi[b] * cs[w] - fr[b] * sn[w];
          fr[b] = fr[a] - tr;  fi[b] = fi[a] - ti;
          fr[a] = fr[a] + tr;  fi[a] = fi[a] + ti;
        end
      end
    end
    for (int i = 0; i < n; i++) begin fr[i] /= n; fi[i] /= n; end
  endtask

  task automatic one_pattern(input int log2n, inout real sig, inout real noise, inout real err_max);
    int n;
    int got;
    n = 1 << log2n;
    for (int i = 0; i < n; i++) begin
      xr[i] = real'(int'($urandom_range(32767)) - 16384);
      xi[i] = real'(int'($urandom_range(32767)) - 16384);
    end
    @(negedge clk);
    sel = {log2n[0], 3'(log2n / 2 + 1)};
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1;
      in_data  = {16'(int'(xr[i])), 16'(int'(xi[i]))};
      @(negedge clk);
    end
    in_valid = 1'b0;
    ref_fft(log2n);
    got = 0;
    while (got < n) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        real rr, ri, er, ei;
        rr = fr[got];
        ri = fi[got];
        er = real'($signed(out_data[31:16])) - rr;
        ei = real'($signed(out_data[15:0])) - ri;
        sig   += rr * rr + ri * ri;
        noise += er * er + ei * ei;
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > err_max) err_max = er;
        if (ei > err_max) err_max = ei;
        checks++;
        if (er > 4.0 || ei > 4.0) failures++;
        got++;
      end
    end
    wait (!busy);
  endtask

  initial begin
    real prev;
    prev = 1.0e9;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int l = 6; l <= 13; l++) begin
      int n;
      real sig, noise, err_max, snqr;
      n = 1 << l;
      sig = 0.0; noise = 0.0; err_max = 0.0;
      for (int i = 0; i < n; i++) begin
        cs[i] = $cos(2.0 * 3.14159265358979323846 * i / n);
        sn[i] = $sin(2.0 * 3.14159265358979323846 * i / n);
      end
      for (int t = 0; t < PATTERNS[l - 6]; t++) one_pattern(l, sig, noise, err_max);
      snqr = 10.0 * $log10(sig / noise);
      $display("N=%5d patterns=%3d  MSE=%.3f LSB^2  max|err|=%.2f LSB  SNQR=%.2f dB",
               n, PATTERNS[l - 6], noise / (2.0 * n * PATTERNS[l - 6]), err_max, snqr);
      checks++;
      if (snqr < 30.0) failures++;
      checks++;
      if (snqr >= prev) failures++;
      prev = snqr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
