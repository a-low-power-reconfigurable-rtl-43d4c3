// tb_fft_commutator: both commutator directions for every rotation with
// random words, and checks that the two directions undo each other.
module tb_fft_commutator;
  logic [1:0]  rot;
  logic [31:0] din [4], mid [4], dout [4];
  int checks = 0, failures = 0;

  fft_commutator #(.W(32), .TO_BANKS(1'b0)) u_rd (.rot(rot), .din(din), .dout(mid));
  fft_commutator #(.W(32), .TO_BANKS(1'b1)) u_wr (.rot(rot), .din(mid), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      rot = 2'(t);
      for (int i = 0; i < 4; i++) din[i] = $urandom;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (mid[k] !== din[(k + t) % 4]) failures++;
        checks++;
        if (dout[k] !== din[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
