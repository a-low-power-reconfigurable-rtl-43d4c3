// fft_addr_map: maps the four sample indices of one butterfly to memory banks
// and in-bank addresses (conflict-free in-place addressing).
//
// For each operand k the bank is the sum of the 2-bit digits of its index
// modulo 4 and the in-bank address is the index without its two low bits.
// The operands of a butterfly differ in one digit (radix-4) or are arranged
// by the controller to differ by 0, 1, 2 and 3 in their digit sum (radix-2),
// so the banks of operands 0..3 are rot, rot+1, rot+2, rot+3 (mod 4). The
// module outputs rot, the bank of operand 0, which steers the commutators,
// and the addresses reordered by bank. Purely combinational.
module fft_addr_map
  import fft_pkg::*;
(
  input  idx_t   idx   [4],   // operand indices in butterfly order
  output bank_t  rot,         // bank of operand 0
  output bank_t  bank  [4],   // bank of each operand
  output baddr_t addr  [4]    // in-bank address, indexed by bank
);
  always_comb begin
    for (int k = 0; k < 4; k++) bank[k] = bank_sel(idx[k]);
    rot = bank[0];
    for (int b = 0; b < 4; b++) addr[b] = '0;
    for (int k = 0; k < 4; k++) addr[bank[k]] = bank_addr(idx[k]);
  end
endmodule
