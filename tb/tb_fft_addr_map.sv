// tb_fft_addr_map: checks the bank map against the 16- and 64-point address
// assignment tables, then checks for random radix-4 and radix-2 butterflies
// of every size that the four operands land in four different banks, in the
// order rot, rot+1, rot+2, rot+3, and that each in-bank address is index/4.
module tb_fft_addr_map;
  import fft_pkg::*;
  idx_t   idx  [4];
  bank_t  rot;
  bank_t  bank [4];
  baddr_t addr [4];
  int checks = 0, failures = 0;

  fft_addr_map dut (.*);

  // reference: digit sum computed with integer division
  function automatic int ref_bank(int n);
    int s = 0;
    while (n > 0) begin s += n % 4; n /= 4; end
    return s % 4;
  endfunction

  // Bank 1 column of the 64-point table (bank 0 here)
  localparam int BANK0_64 [16] = '{0, 7, 10, 13, 19, 22, 25, 28, 34, 37, 40, 47, 49, 52, 59, 62};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(bank[k]) != ref_bank(int'(idx[k])) || bank[k] != 2'(rot + k)) begin
        failures++;
        $display("idx %0d bank %0d rot %0d k %0d", idx[k], bank[k], rot, k);
      end
      checks++;
      if (int'(addr[bank[k]]) != int'(idx[k]) / 4) begin
        failures++;
        $display("idx %0d addr %0d", idx[k], addr[bank[k]]);
      end
    end
  endtask

  initial begin
    int l2n, n, b, n0, p, base;
    for (int i = 0; i < 16; i++) begin
      idx[0] = idx_t'(BANK0_64[i]); idx[1] = idx[0]; idx[2] = idx[0]; idx[3] = idx[0];
      #1;
      checks++;
      if (bank[0] != 2'd0) begin failures++; $display("table: %0d", BANK0_64[i]); end
    end
    for (int t = 0; t < 4000; t++) begin
      l2n = 6 + $urandom_range(7);
      n = 1 << l2n;
      if (l2n % 2 == 1 && $urandom_range(1) == 0) begin
        // radix-2 pair: n0, n0+N/2, n0+N/4, n0+3N/4 with n0 < N/4
        b = $urandom_range(n / 4 - 1);
        n0 = b;
        idx[0] = idx_t'(n0); idx[1] = idx_t'(n0 + n / 2);
        idx[2] = idx_t'(n0 + n / 4); idx[3] = idx_t'(n0 + n / 4 + n / 2);
      end else begin
        p = $urandom_range(l2n / 2 - 1);
        base = $urandom_range(n - 1) & ~(3 << (2 * p));
        for (int k = 0; k < 4; k++) idx[k] = idx_t'(base + (k << (2 * p)));
      end
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
