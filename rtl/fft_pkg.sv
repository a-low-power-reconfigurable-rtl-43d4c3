// fft_pkg: types, sizes and helper functions shared by the reconfigurable
// memory-based FFT processor.
//
// A data word is a complex number of two 16-bit two's-complement halves,
// packed {re, im} into 32 bits, the width of one memory bank word. Twiddle
// factors use the same packing with 14 fractional bits (1.0 = 16384).
//
// The processor handles 64- to 8192-point transforms (LOG2_NMAX = 13). The
// data memory is split into four banks of NMAX/4 words. Sample index n is
// stored in bank SEL(n) = (sum of the 2-bit digits of n) mod 4 at in-bank
// address n >> 2; for the odd powers of two the top single bit counts as a
// digit of its own. With this map the four operands of every radix-4
// butterfly, and of every pair of radix-2 butterflies the controller issues,
// sit in four different banks.
//
// The 4-bit control code follows the size table of the design: bit 3 is the
// radix-2 flag, bits 2:0 are the number of radix-4 stages plus one
// (64 -> 0100, 128 -> 1100, ..., 8192 -> 1111).
package fft_pkg;

  localparam int unsigned LOG2_NMAX  = 13;              // 8192 points
  localparam int unsigned BANK_AW    = LOG2_NMAX - 2;   // 2048 words per bank
  localparam int unsigned DATA_W     = 16;              // bits per real/imag part
  localparam int unsigned COEF_FRAC  = 14;              // 1.0 = 2**14
  localparam int unsigned ROM_AW     = LOG2_NMAX - 2;   // W_NMAX^k, 0 <= k < NMAX/4

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef logic [LOG2_NMAX-1:0] idx_t;     // sample index inside the transform
  typedef logic [BANK_AW-1:0]   baddr_t;   // address inside one bank
  typedef logic [1:0]           bank_t;    // bank number 0..3
  typedef logic [ROM_AW-1:0]    raddr_t;   // coefficient ROM address

  // Control code of the size table: {radix2_flag, stages_plus_one[2:0]}
  typedef struct packed {
    logic       radix2;
    logic [2:0] stage0;
  } ctrl_code_t;

  // Bank of sample n: eq. "SEL = n[1:0] + n[3:2] + n[5:4] + ..." modulo 4
  function automatic bank_t bank_sel(idx_t n);
    bank_t s;
    s = '0;
    for (int i = 0; i < LOG2_NMAX; i += 2) begin
      if (i + 1 < LOG2_NMAX) s = s + bank_t'(n[i +: 2]);
      else                   s = s + bank_t'(n[i]);
    end
    return s;
  endfunction

  function automatic baddr_t bank_addr(idx_t n);
    return baddr_t'(n >> 2);
  endfunction

  // log2 of the transform length selected by a control code
  function automatic logic [3:0] code_log2n(ctrl_code_t c);
    return 4'(2 * (int'(c.stage0) - 1) + int'(c.radix2));
  endfunction

  // A code is legal when bits 2:0 are 100..111 (64..8192 points)
  function automatic logic code_valid(logic [2:0] stage0);
    return stage0[2];
  endfunction

endpackage
