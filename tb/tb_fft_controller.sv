// tb_fft_controller: runs the controller alone through complete transforms of
// 64, 128, 256, 512 and 1024 points, with a memory model that returns, for
// each read, the sample index stored at that bank and address. Sample
// indices are rebuilt from bank and address (index = 4*addr + d with d fixed
// by the digit-sum bank rule). Checks:
//   load:    sample n is written to bank digitsum(n) mod 4, address n/4;
//   compute: the stage sequence (radix-2 first for odd log2 N, then radix-4
//            spans N/4 .. 1), every index read exactly once per stage, the
//            four operands of each butterfly (radix-2: n, n+N/2, n+N/4,
//            n+3N/4 in cycle n), the low-switching offset order
//            in the 64-point stage, the twiddle offset and shift handed to the
//            coefficient generator, write-back 3 cycles after each read to
//            the same addresses, N/4 cycles per stage with no gap between
//            stages and 3 drain cycles after the last;
//   output:  the N reads come in natural frequency order, i.e. from the
//            mixed-radix digit-reversed location, and out_data carries them.
module tb_fft_controller;
  import fft_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, busy;
  ctrl_code_t code = '0;
  logic [3:0] mem_we, mem_re;
  baddr_t mem_waddr [4], mem_raddr [4];
  logic mem_wsel_in;
  cplx_t mem_rdata [4];
  bank_t rot_rd, rot_wr;
  logic bf_valid, bf_radix2, cg_valid, cg_r2stage;
  logic [2:0] cg_stage;
  idx_t cg_m;
  logic [3:0] cg_sh;
  logic wb_valid = 0, out_valid;
  cplx_t out_data;
  int checks = 0, failures = 0;

  fft_controller dut (.*);
  always #5 clk = ~clk;

  // the datapath returns a result 3 cycles after each read
  logic bv1 = 0, bv2 = 0;
  always @(posedge clk) begin bv1 <= bf_valid; bv2 <= bv1; wb_valid <= bv1; end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dsum(int n);
    int s = 0;
    while (n > 0) begin s += n % 4; n /= 4; end
    return s % 4;
  endfunction
  function automatic int rebuild(int bank, int addr);
    return 4 * addr + ((bank - dsum(4 * addr)) % 4 + 4) % 4;
  endfunction

  // memory model: read data = index stored there
  always @(posedge clk)
    for (int b = 0; b < 4; b++)
      if (mem_re[b]) mem_rdata[b] <= cplx_t'(rebuild(b, int'(mem_raddr[b])));

  localparam int PERM [16] = '{0, 8, 5, 13, 10, 2, 1, 9, 12, 4, 7, 15, 14, 6, 3, 11};

  task automatic run(int l2n);
    int n = 1 << l2n, kq = l2n / 2;
    bit r2 = l2n[0];
    int nst = kq + int'(r2);
    int seen [];
    int cyc;
    int rd_hist_addr [$];
    seen = new[n];
    code = '{radix2: r2, stage0: 3'(kq + 1)};
    // load
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      #1;
      checks++;
      if (mem_wsel_in !== 1'b1 || mem_we != 4'(1 << dsum(i)) || int'(mem_waddr[dsum(i)]) != i / 4) begin
        failures++;
        $display("load %0d: we=%b addr=%0d", i, mem_we, mem_waddr[dsum(i)]);
      end
    end
    @(negedge clk) in_valid = 0;
    // compute stages
    for (int s = 0; s < nst; s++) begin
      bit is_r2 = r2 && s == 0;
      int p = is_r2 ? -1 : kq - 1 - (s - int'(r2));
      int span = is_r2 ? n / 2 : (1 << (2 * p));
      foreach (seen[i]) seen[i] = 0;
      for (int b = 0; b < n / 4; b++) begin
        int id [4];
        int base;
        #1;
        checks++;
        if (mem_re != 4'hf) begin failures++; $display("stage %0d b %0d: no read", s, b); end
        // operands in butterfly order: banks rot, rot+1, ...
        for (int bank = 0; bank < 4; bank++) begin
          int ix = rebuild(bank, int'(mem_raddr[bank]));
          seen[ix]++;
        end
        // reconstruct operand 0 as the smallest index
        base = n;
        for (int bank = 0; bank < 4; bank++) begin
          int ix = rebuild(bank, int'(mem_raddr[bank]));
          if (ix < base) base = ix;
        end
        for (int k = 0; k < 4; k++) id[k] = is_r2 ? base + (k % 2) * span + (k / 2) * (span / 2) : base + k * span;
        // radix-2 stage: cycle b takes n = b, n+N/2, n+N/4, n+3N/4
        if (is_r2) begin
          checks++;
          if (base != b) begin failures++; $display("radix-2 cycle %0d starts at %0d", b, base); end
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(mem_raddr[dsum(id[k])]) != id[k] / 4) begin
            failures++;
            $display("N=%0d stage %0d b=%0d operand %0d (%0d) missing", n, s, b, k, id[k]);
          end
        end
        if (!is_r2 && p == 2) begin
          int mm = base % 16;
          checks++;
          if (mm != PERM[b % 16]) begin failures++; $display("order: b=%0d m=%0d", b, mm); end
        end
        @(posedge clk); #1;
        // coefficient generator input, one cycle after the read
        checks++;
        if (cg_valid !== 1'b1 || cg_r2stage != is_r2 ||
            int'(cg_m) != (is_r2 ? base : base % span) ||
            int'(cg_sh) != (is_r2 ? 13 - l2n : 11 - 2 * p) ||
            (!is_r2 && int'(cg_stage) != p + 1) || bf_radix2 != is_r2) begin
          failures++;
          $display("cg: stage %0d b=%0d m=%0d sh=%0d", s, b, cg_m, cg_sh);
        end
        @(negedge clk);
      end
      foreach (seen[i]) begin
        checks++;
        if (seen[i] != 1) begin failures++; $display("stage %0d index %0d read %0d times", s, i, seen[i]); end
      end
      // no gap between stages; 3 drain cycles before the read-out
      if (s == nst - 1) for (int d = 0; d < 3; d++) begin
        #1;
        checks++;
        if (mem_re != '0) failures++;
        @(negedge clk);
      end
    end
    // output phase
    for (int f = 0; f < n; f++) begin
      int r = r2 ? f / 2 : f, d = 0, loc;
      for (int i = 0; i < kq; i++) begin d = d * 4 + r % 4; r /= 4; end
      loc = r2 ? d + (f % 2) * (n / 2) : d;
      #1;
      checks++;
      if (mem_re != 4'(1 << dsum(loc)) || int'(mem_raddr[dsum(loc)]) != loc / 4) begin
        failures++;
        if (failures < 20) $display("N=%0d out f=%0d: re=%b", n, f, mem_re);
      end
      @(negedge clk);
    end
    #1;
    checks++;
    if (busy) failures++;
  endtask

  // write-back: the addresses written are those read 3 cycles earlier
  baddr_t ra1 [4], ra2 [4], ra3 [4];
  logic rv1 = 0, rv2 = 0, rv3 = 0;
  always @(posedge clk) begin
    rv1 <= (mem_re == 4'hf); rv2 <= rv1; rv3 <= rv2;
    ra1 <= mem_raddr; ra2 <= ra1; ra3 <= ra2;
  end
  always @(negedge clk) if (!rst && rv3) begin
    checks++;
    if (mem_we != 4'hf || mem_wsel_in || mem_waddr != ra3) begin failures++; $display("write-back"); end
  end

  // results stream: out_data is the index read two cycles before
  int exp_q [$];
  always @(posedge clk) if (!rst && mem_re != '0 && mem_re != 4'hf)
    for (int b = 0; b < 4; b++) if (mem_re[b]) exp_q.push_back(rebuild(b, int'(mem_raddr[b])));
  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || int'(out_data) != exp_q.pop_front()) begin
      failures++; $display("out_data %0d", out_data);
    end
  end

  initial begin
    for (int b = 0; b < 4; b++) mem_rdata[b] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(6); run(7); run(8); run(9); run(10);
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
