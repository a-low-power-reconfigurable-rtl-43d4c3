// tb_fft_top: end-to-end test of the FFT processor at its default size.
//
// Runs one transform of every size 64..8192 (with the matching control
// code), then a 64-point and a 128-point transform again to exercise size
// switching, with a 256-point transform aborted by reset in between. Each input is a random signal plus a sine in the imaginary part;
// each output is compared with a double-precision DFT divided by N. Also
// checks the cycle count from the last input sample to the first result
// (S*N/4+3 for S stages, plus 3 to the first result;
// 51 cycles for 64 points ... 14339 for 8192), that samples offered while busy are ignored,
// and counts how often each mechanism of the datapath fired: radix-2 stage,
// reordered 64-point stage, steered 16-point stage, each phase-compensator
// quadrant, trivial-coefficient bypass, coefficient held (no ROM read),
// coefficient reloads and ROM-word sharing in the radix-2 stage.
module tb_fft_top;
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
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_r2 = 0, n_r4 = 0, n_s64 = 0, n_s16 = 0, n_byp = 0, n_hold = 0, n_load = 0;
  int n_q [4] = '{0, 0, 0, 0};
  int n_ignored = 0, n_switch = 0, n_reset = 0, n_share = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.state == 3'd2) begin   // S_COMP
      if (dut.u_ctrl.r2stage) n_r2++; else n_r4++;
      if (!dut.u_ctrl.r2stage && dut.u_ctrl.p == 3'd2) n_s64++;
      if (!dut.u_ctrl.r2stage && dut.u_ctrl.p == 3'd1) n_s16++;
    end
    if (dut.mm_valid) for (int p = 1; p < 4; p++) begin
      n_q[dut.mm_q[p]]++;
      if (dut.u_mm.triv_q[p]) n_byp++;
    end
    if (dut.cgo_valid && dut.share) n_share++;
    if (dut.cg_valid) for (int p = 1; p < 4; p++)
      if (!dut.u_cg.tc[p]) begin
        if (dut.u_cg.rom_en[dut.u_cg.rr[p]]) n_load++; else n_hold++;
      end
  end

  function automatic logic signed [15:0] s16(int v);
    return 16'(v);
  endfunction

  // transform latency for 64..8192 points
  localparam int LAT [8] = '{51, 131, 259, 643, 1283, 3075, 6147, 14339};

  real xr [8192], xi [8192], cs [8192], sn [8192];
  real max_err_all = 0.0;

  task automatic run_fft(input int log2n, input int seed_amp);
    int n = 1 << log2n;
    int k4 = log2n / 2;
    logic r2 = log2n[0];
    logic [3:0] code = {r2, 3'(k4 + 1)};
    int stages = k4 + int'(r2);
    longint t_last, t_first;
    int got = 0;
    real err_max = 0.0, sig = 0.0, noise = 0.0;
    // stimulus
    for (int i = 0; i < n; i++) begin
      int a = seed_amp, rr, ri;
      rr = int'($urandom_range(2 * a)) - a;
      ri = int'($urandom_range(2 * a)) - a +
           int'($rtoi(8000.0 * $sin(2.0 * 3.14159265358979 * 3.0 * i / n)));
      xr[i] = rr; xi[i] = ri;
    end
    for (int i = 0; i < n; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979 * i / n);
      sn[i] = $sin(2.0 * 3.14159265358979 * i / n);
    end
    wait (!busy);
    @(negedge clk);
    sel = code;
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1;
      in_data  = {s16(int'(xr[i])), s16(int'(xi[i]))};
      @(posedge clk);
      t_last = cycle;
      @(negedge clk);
      // a random idle cycle now and then
      if ($urandom_range(15) == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    // offer a few samples while busy: they must be ignored
    repeat (3) begin
      @(negedge clk);
      if (busy) begin in_valid = 1'b1; in_data = 32'h7fff7fff; n_ignored++; end
    end
    @(negedge clk); in_valid = 1'b0;
    // collect
    while (got < n) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        real rr = 0.0, ri = 0.0, er, ei, e;
        int k = got;
        if (got == 0) t_first = cycle;
        for (int i = 0; i < n; i++) begin
          int w = (i * k) % n;
          rr += xr[i] * cs[w] + xi[i] * sn[w];
          ri += xi[i] * cs[w] - xr[i] * sn[w];
        end
        rr /= n; ri /= n;
        er = real'($signed(out_data[31:16])) - rr;
        ei = real'($signed(out_data[15:0])) - ri;
        e = (er < 0 ? -er : er) > (ei < 0 ? -ei : ei) ? (er < 0 ? -er : er) : (ei < 0 ? -ei : ei);
        sig += rr * rr + ri * ri;
        noise += er * er + ei * ei;
        if (e > err_max) err_max = e;
        checks++;
        if (e > 4.0) begin
          failures++;
          if (failures < 10)
            $display("N=%0d k=%0d got (%0d,%0d) want (%f,%f)", n, k,
                     $signed(out_data[31:16]), $signed(out_data[15:0]), rr, ri);
        end
        got++;
      end
    end
    checks++;
    // compute latency of the size table: S*N/4 + 3, plus 3 cycles to the
    // first result
    if (t_first - t_last != longint'(LAT[log2n - 6]) + longint'(3)) begin
      failures++;
      $display("N=%0d latency %0d, expected %0d", n, t_first - t_last, LAT[log2n - 6] + 3);
    end
    $display("N=%5d code=%b latency=%0d cycles  max|err|=%.2f LSB  SNQR=%.1f dB",
             n, code, t_first - t_last, err_max, 10.0 * $log10(sig / (noise + 1e-30)));
  endtask

  // start a 256-point transform and reset the processor while it computes;
  // it must come back idle with no output pending
  task automatic abort_with_reset();
    wait (!busy);
    @(negedge clk);
    sel = 4'b0101;
    for (int i = 0; i < 256; i++) begin
      in_valid = 1'b1;
      in_data  = {16'(i * 37), 16'(-i * 11)};
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (100) @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("not busy during compute"); end
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (busy || out_valid) begin failures++; $display("reset did not abort the transform"); end
    else n_reset++;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int l = 6; l <= 13; l++) begin
      run_fft(l, 6000);
      n_switch++;
    end
    abort_with_reset();
    run_fft(6, 12000);
    run_fft(7, 12000);
    n_switch += 2;
    $display("mechanisms: radix2=%0d radix4=%0d stage64=%0d stage16=%0d bypass=%0d hold=%0d load=%0d q0..3=%0d/%0d/%0d/%0d ignored=%0d switches=%0d resets=%0d shared=%0d",
             n_r2, n_r4, n_s64, n_s16, n_byp, n_hold, n_load, n_q[0], n_q[1], n_q[2], n_q[3], n_ignored, n_switch, n_reset, n_share);
    checks++; if (n_r2 == 0)   failures++;
    checks++; if (n_r4 == 0)   failures++;
    checks++; if (n_s64 == 0)  failures++;
    checks++; if (n_s16 == 0)  failures++;
    checks++; if (n_byp == 0)  failures++;
    checks++; if (n_hold == 0) failures++;
    checks++; if (n_load == 0) failures++;
    // a forward transform uses quadrants 0..2 only (exponents stay below 3N/4)
    for (int i = 0; i < 3; i++) begin checks++; if (n_q[i] == 0) failures++; end
    checks++; if (n_ignored == 0) failures++;
    checks++; if (n_reset == 0) failures++;
    checks++; if (n_share == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
