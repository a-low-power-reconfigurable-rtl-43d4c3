// tb_fft_switching: coefficient switching-activity workload.
//
// For every size 64..8192 it runs one transform and counts the bits that
// toggle on the coefficient inputs of the three complex multipliers
// (Hamming distance between successive coefficient words, summed over the
// multipliers), stage by stage. As a baseline it computes, for the same
// transform, the toggles of a conventional memory-based radix-4 design:
// butterflies in natural order, output p always on multiplier p-1, and the
// unmodified twiddle W^e (not reduced to a quarter turn) loaded for every
// butterfly, W^0 included. Both use 16-bit parts with 14 fractional bits.
// It also counts the bits that toggle on the four memory read-address buses
// during the 64-point stage, against the same stage run in natural order.
// Checks: the design toggles less than the baseline at every size and in
// the 64-point stage; in the 16-point stage it reloads exactly two
// coefficients per group of four butterflies (plus the first three loads);
// the reordered 64-point stage costs at most 10% more address toggles than
// natural order, and the measured count matches a model of the order.
module tb_fft_switching;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- measured toggles, by stage code (7 = radix-2 stage) ----
  int meas [8];
  int loads16;
  logic [31:0] prev [3];
  logic [3:0]  st_d = '0;
  always @(posedge clk) begin
    if (dut.cg_valid) st_d <= dut.cg_r2stage ? 4'd7 : {1'b0, dut.cg_stage};
    for (int k = 0; k < 3; k++) begin
      // coefficient input of multiplier k (multiplier 2 may take ROM 1's word)
      logic [31:0] w;
      w = (k == 2 && dut.share) ? dut.coef[1] : dut.coef[k];
      meas[st_d[2:0]] += $countones(w ^ prev[k]);
      prev[k] = w;
      if (dut.cg_valid && !dut.cg_r2stage && dut.cg_stage == 3'd2 && dut.rom_en[k]) loads16++;
    end
  end

  // ---- read-address toggles in the 64-point stage (stage 011) ----
  int atog, abase, aperm;
  logic [10:0] aprev [4];
  bit a_on = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.state == 3'd2 && !dut.u_ctrl.r2stage && dut.u_ctrl.p == 3'd2 && dut.mem_re != 4'h0) begin
      for (int b = 0; b < 4; b++) begin
        if (a_on) atog += $countones(dut.mem_raddr[b] ^ aprev[b]);
        aprev[b] = dut.mem_raddr[b];
      end
      a_on = 1;
    end else a_on = 0;
  end

  localparam int PERM64 [16] = '{0, 8, 5, 13, 10, 2, 1, 9, 12, 4, 7, 15, 14, 6, 3, 11};
  function automatic int dsum(int v);
    int r = 0;
    for (int i = 0; i < 7; i++) r += (v >> (2 * i)) & 3;
    return r % 4;
  endfunction
  // address toggles of stage 011 with natural (perm = 0) or reordered offsets
  function automatic int addr_model(int n, bit perm);
    int tot = 0;
    int last [4];
    bit first = 1;
    for (int g = 0; g < n / 64; g++)
      for (int mi = 0; mi < 16; mi++) begin
        int m, cur [4];
        m = perm ? PERM64[mi] : mi;
        for (int k = 0; k < 4; k++) cur[dsum(g * 64 + m + 16 * k)] = (g * 64 + m + 16 * k) / 4;
        if (!first) for (int b = 0; b < 4; b++) tot += $countones(cur[b] ^ last[b]);
        for (int b = 0; b < 4; b++) last[b] = cur[b];
        first = 0;
      end
    return tot;
  endfunction

  // ---- baseline model ----
  function automatic logic [31:0] tw(int e);
    real a;
    logic [15:0] re, im;
    a  = 2.0 * 3.14159265358979323846 * e / 8192.0;
    re = 16'($rtoi($floor(16384.0 * $cos(a) + 0.5)));
    im = 16'($rtoi($floor(-16384.0 * $sin(a) + 0.5)));
    return {re, im};
  endfunction

  int base [8];
  task automatic baseline(int log2n);
    int n, kq;
    logic [31:0] last [3], cur [3];
    n = 1 << log2n;
    kq = log2n / 2;
    for (int s = 0; s < 8; s++) base[s] = 0;
    for (int k = 0; k < 3; k++) last[k] = tw(0);
    if (log2n % 2 == 1)
      for (int b = 0; b < n / 4; b++) begin
        int n0;
        n0 = ((b >> 1) << 2) | (b & 1);
        cur[0] = tw(n0 * (8192 / n)); cur[1] = tw(0); cur[2] = tw((n0 + 2) * (8192 / n));
        for (int k = 0; k < 3; k++) begin base[7] += $countones(cur[k] ^ last[k]); last[k] = cur[k]; end
      end
    for (int p = kq - 1; p >= 1; p--) begin
      int l;
      l = 4 << (2 * p);
      for (int g = 0; g < n / l; g++)
        for (int m = 0; m < l / 4; m++) begin
          for (int k = 0; k < 3; k++) begin
            cur[k] = tw((k + 1) * m * (8192 / l));
            base[p + 1] += $countones(cur[k] ^ last[k]);
            last[k] = cur[k];
          end
        end
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) prev[k] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int l = 6; l <= 13; l++) begin
      int n, tot_m, tot_b;
      n = 1 << l;
      for (int s = 0; s < 8; s++) meas[s] = 0;
      loads16 = 0;
      atog = 0;
      wait (!busy);
      @(negedge clk);
      sel = {l[0], 3'(l / 2 + 1)};
      for (int i = 0; i < n; i++) begin
        in_valid = 1'b1;
        in_data  = $urandom;
        @(negedge clk);
      end
      in_valid = 1'b0;
      while (!out_valid) @(negedge clk);
      baseline(l);
      tot_m = 0; tot_b = 0;
      for (int s = 2; s < 8; s++) begin tot_m += meas[s]; tot_b += base[s]; end
      $display("N=%5d  toggles: design %7d  baseline %7d  (-%4.1f%%)   64-pt stage %6d vs %6d   16-pt stage %5d vs %5d",
               n, tot_m, tot_b, 100.0 * (tot_b - tot_m) / tot_b, meas[3], base[3], meas[2], base[2]);
      checks++; if (tot_m >= tot_b) failures++;
      checks++; if (meas[3] >= base[3]) failures++;
      // address bus of the 64-point stage: the reordering costs almost nothing
      abase = addr_model(n, 0);
      aperm = addr_model(n, 1);
      $display("         read-address toggles in the 64-pt stage: %0d reordered vs %0d natural order", atog, abase);
      checks++; if (atog != aperm) begin failures++; $display("address toggles %0d, model %0d", atog, aperm); end
      checks++; if (atog * 10 > abase * 11) failures++;
      // 16-point stage: 2 reloads per group, plus the 3 initial loads of W16^1..3
      checks++; if (loads16 != 2 * (n / 16) + 3) begin failures++; $display("loads16=%0d", loads16); end
      while (out_valid || busy) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
