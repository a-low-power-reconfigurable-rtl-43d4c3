// tb_fft_memory: fills the four banks with different data through all four
// write ports at once, then reads all four banks at different addresses in
// the same cycle and checks every word against a model.
module tb_fft_memory;
  import fft_pkg::*;
  localparam int AW = 5;
  logic clk = 0;
  logic [3:0] we = '0, re = '0;
  logic [AW-1:0] waddr [4], raddr [4];
  cplx_t wdata [4], rdata [4];
  logic [31:0] model [4][1 << AW];
  int checks = 0, failures = 0;

  fft_memory #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) begin waddr[b] = '0; raddr[b] = '0; wdata[b] = '0; end
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      we = 4'hf;
      for (int b = 0; b < 4; b++) begin
        waddr[b] = AW'(i ^ b);
        wdata[b] = $urandom;
        model[b][i ^ b] = wdata[b];
      end
    end
    @(negedge clk) we = '0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      re = 4'hf;
      for (int b = 0; b < 4; b++) raddr[b] = AW'((i + 7 * b) % (1 << AW));
      @(negedge clk);
      re = '0;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rdata[b] !== model[b][(i + 7 * b) % (1 << AW)]) begin
          failures++;
          $display("bank %0d addr %0d: %h", b, raddr[b], rdata[b]);
        end
      end
    end
    // one bank enabled: the others hold their outputs
    @(negedge clk) re = 4'b0100; raddr[2] = 0;
    @(negedge clk) re = '0;
    checks++; if (rdata[2] !== model[2][0]) failures++;
    checks++; if (rdata[1] !== model[1][((1 << AW) - 1 + 7) % (1 << AW)]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
