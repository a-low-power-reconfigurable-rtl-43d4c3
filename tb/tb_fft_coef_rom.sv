// tb_fft_coef_rom: reads every word of the full-size ROM and compares it with
// cos/sin computed here (within one LSB), checks some exact values
// (W^0 = 1, W^(N/8) = (1-j)/sqrt2) and that the output holds while en=0.
// A second, half-size instance (AW = ROM_AW-1, the size of the two outer
// ROMs) is read alongside at address k/2 for even k and must equal word k
// of the full-size table.
module tb_fft_coef_rom;
  import fft_pkg::*;
  logic clk = 0, en = 0;
  raddr_t addr = '0;
  cplx_t data, data_h;
  logic [ROM_AW-2:0] addr_h = '0;
  int checks = 0, failures = 0;

  fft_coef_rom dut (.*);
  fft_coef_rom #(.AW(ROM_AW - 1)) dut_h (.clk, .en, .addr(addr_h), .data(data_h));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int k = 0; k < (1 << ROM_AW); k++) begin
      real c, s;
      @(negedge clk) en = 1; addr = raddr_t'(k); addr_h = addr[ROM_AW-1:1];
      @(negedge clk) en = 0;
      c = 16384.0 * $cos(6.283185307179586 * k / 8192.0);
      s = -16384.0 * $sin(6.283185307179586 * k / 8192.0);
      checks++;
      if (rabs(real'(data.re) - c) > 0.51 || rabs(real'(data.im) - s) > 0.51) begin
        failures++;
        if (failures < 10) $display("k=%0d %0d,%0d want %f,%f", k, data.re, data.im, c, s);
      end
      if (k % 2 == 0) begin
        checks++;
        if (data_h != data) begin failures++; $display("half-size ROM word %0d differs", k / 2); end
      end
      if (k == 0) begin checks++; if (data.re != 16384 || data.im != 0) failures++; end
      if (k == 1024) begin checks++; if (data.re != 11585 || data.im != -11585) failures++; end
      addr = ~addr;
      @(negedge clk);
      checks++;
      if (rabs(real'(data.re) - c) > 0.51) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
