// tb_fft_coef_gen: drives the coefficient generator with the butterfly
// sequences of whole stages (radix-2 stages of 128..8192 points, radix-4
// stages of every span). A model of the three ROM output registers follows
// rom_en/rom_addr. Checks, for every output p of every butterfly, that the
// multiplier it is routed to holds W^(e mod NMAX/4), that the quadrant is
// e div NMAX/4 and the trivial flag is right, where e is the twiddle exponent
// worked out here from the DIF equations; that no ROM is read for a
// coefficient it already holds; that ROMs 0 and 2 are asked only for even
// words; that radix-2 outputs 1 and 3 use multipliers 1 and 2, both fed from
// ROM 1 (share); that in radix-4 stages other than the 16-point one output p
// uses multiplier p-1; and that in the 16-point stage the coefficient loads
// come to 2 per group of four butterflies once the first group is done
// (none at offsets 0 and 1, one each at offsets 2 and 3).
module tb_fft_coef_gen;
  import fft_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, r2stage = 0;
  logic [2:0] stage = '0;
  idx_t m = '0;
  logic [3:0] sh = '0;
  logic rom_en [3];
  raddr_t rom_addr [3];
  logic out_valid;
  logic [3:0] triv;
  logic [1:0] q [4], route [4];
  logic share;
  int checks = 0, failures = 0;
  int loads16 = 0, groups16 = 0, last_loads = 0;
  // loads per butterfly of the 16-point stage once steady: offsets 0..3
  localparam int LOADS16 [4] = '{0, 0, 1, 1};

  fft_coef_gen dut (.*);
  always #5 clk = ~clk;

  raddr_t held [3];
  bit     held_ok [3] = '{0, 0, 0};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(bit r2, int st, int mm, int shv, int e1, int e2, int e3);
    int e [4];
    int nloads;
    e[0] = 0; e[1] = e1; e[2] = e2; e[3] = e3;
    nloads = 0;
    @(negedge clk);
    in_valid = 1; r2stage = r2; stage = 3'(st); m = idx_t'(mm); sh = 4'(shv);
    #1;
    for (int k = 0; k < 3; k++) if (rom_en[k]) begin
      checks++;
      if (held_ok[k] && held[k] == rom_addr[k]) begin failures++; $display("needless read"); end
      // ROMs 0 and 2 hold only the even words
      if (k != 1) begin
        checks++;
        if (rom_addr[k][0]) begin failures++; $display("odd word asked of ROM %0d", k); end
      end
      nloads++;
    end
    @(posedge clk);
    for (int k = 0; k < 3; k++) if (rom_en[k]) begin held[k] = rom_addr[k]; held_ok[k] = 1; end
    #1;
    checks++;
    if (share != r2) begin failures++; $display("share=%0d in r2=%0d", share, r2); end
    for (int p = 1; p < 4; p++) begin
      int ca, qq, src;
      ca = e[p] % 2048;
      qq = e[p] / 2048;
      checks++;
      if (triv[p] != (ca == 0) || int'(q[p]) != qq) begin
        failures++;
        $display("st=%0d r2=%0d m=%0d p=%0d triv=%0d q=%0d want e=%0d", st, r2, mm, p, triv[p], q[p], e[p]);
      end
      if (ca != 0) begin
        checks++;
        // with share set, multiplier 2 takes ROM 1's word
        src = (share && route[p] == 2'd2) ? 1 : int'(route[p]);
        if (!held_ok[src] || int'(held[src]) != ca) begin
          failures++;
          $display("st=%0d m=%0d p=%0d mult %0d holds %0d want %0d", st, mm, p, route[p], held[src], ca);
        end
        if (r2) begin
          checks++;
          if (int'(route[p]) != (p == 1 ? 1 : 2)) failures++;
        end else if (st != 2) begin
          checks++;
          if (int'(route[p]) != p - 1) failures++;
        end
      end
    end
    if (!r2 && st == 2) loads16 += nloads;
    last_loads = nloads;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // radix-2 stages
    for (int l2n = 7; l2n <= 13; l2n += 2) begin
      int n;
      n = 1 << l2n;
      for (int b = 0; b < n / 4; b += 1 + (l2n > 9 ? 7 : 0)) begin
        int n0;
        n0 = b;
        one(1, 0, n0, 13 - l2n, n0 * (8192 / n), 0, (n0 + n / 4) * (8192 / n));
      end
    end
    // radix-4 stages: span 4^p, L = 4^(p+1), offsets m < 4^p
    for (int p = 5; p >= 0; p--) begin
      int l;
      l = 4 << (2 * p);
      for (int mm = 0; mm < (1 << (2 * p)); mm++)
        one(0, p + 1, mm, 13 - 2 * (p + 1), mm * (8192 / l), 2 * mm * (8192 / l), 3 * mm * (8192 / l));
    end
    // 16-point stage repeated over 8 groups
    loads16 = 0;
    for (int g = 0; g < 8; g++) begin
      for (int mm = 0; mm < 4; mm++) begin
        one(0, 2, mm, 9, mm * 512, 2 * mm * 512, 3 * mm * 512);
        if (g > 0) begin
          checks++;
          if (last_loads != LOADS16[mm]) begin
            failures++;
            $display("16-point stage m=%0d: %0d loads, want %0d", mm, last_loads, LOADS16[mm]);
          end
        end
      end
      if (g == 0) loads16 = 0;
    end
    checks++;
    $display("16-point stage: %0d coefficient loads in 7 groups", loads16);
    if (loads16 != 14) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
