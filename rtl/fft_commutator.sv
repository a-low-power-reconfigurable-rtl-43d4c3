// fft_commutator: four-way rotation between bank order and butterfly order.
//
// With TO_BANKS=0 (the first commutator) word k of the output is word
// (k + rot) mod 4 of the input: the words read from banks 0..3 are put in
// butterfly operand order. With TO_BANKS=1 (the second commutator) word b of
// the output is word (b - rot) mod 4 of the input: the butterfly results go
// back to the banks they came from. Purely combinational, W bits per word.
module fft_commutator #(
  parameter int unsigned W        = 32,
  parameter bit          TO_BANKS = 1'b0
) (
  input  logic [1:0]   rot,
  input  logic [W-1:0] din  [4],
  output logic [W-1:0] dout [4]
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (TO_BANKS) dout[k] = din[2'(k - int'(rot))];
      else          dout[k] = din[2'(k + int'(rot))];
    end
  end
endmodule
