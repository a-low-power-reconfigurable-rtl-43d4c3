// tb_fft_ram_bank: writes random words to a small bank, reads them back,
// checks that the output holds while re=0 and that a read of the address
// being written returns the old word.
module tb_fft_ram_bank;
  localparam int AW = 6;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [1 << AW];
  int checks = 0, failures = 0;

  fft_ram_bank #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] want);
    checks++;
    if (rdata !== want) begin
      failures++;
      $display("read %h want %h", rdata, want);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk) re = 1; raddr = AW'((i * 37) % (1 << AW));
      @(negedge clk) re = 0; chk(model[(i * 37) % (1 << AW)]);
      raddr = raddr + 1'b1;   // re=0: output must hold
      @(negedge clk) chk(model[(i * 37) % (1 << AW)]);
    end
    // read and write the same address in one cycle: old data is read
    @(negedge clk) re = 1; we = 1; raddr = 5; waddr = 5; wdata = ~model[5];
    @(negedge clk) re = 0; we = 0; chk(model[5]);
    model[5] = ~model[5];
    @(negedge clk) re = 1;
    @(negedge clk) re = 0; chk(model[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
