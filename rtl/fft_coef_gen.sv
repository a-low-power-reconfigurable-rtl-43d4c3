// fft_coef_gen: coefficient generator of the multiplier module.
//
// For the butterfly issued by the controller it works out the twiddle factor
// of each butterfly output p (1..3), in units of W_NMAX:
//   radix-4 stage:  e_p = p*m * NMAX/L       (m = offset in the L-point group)
//   radix-2 stage:  e_1 = n * NMAX/N, e_3 = (n+N/4) * NMAX/N, e_2 = 0
// and splits it as in the coefficient-modification rule W^c = W^c' * (-j)^q:
// the ROM address is c' = e mod NMAX/4, the quadrant q = e div NMAX/4 goes
// to the phase compensator, and an output with c' = 0 needs no multiplier at
// all (trivial).
//
// ROMs: ROM 1 holds all NMAX/4 quarter-wave words, ROMs 0 and 2 only the
// even ones (NMAX/8 words). Every radix-4 exponent is even (L <= NMAX/2), so
// only the radix-2 stage of the largest size needs odd words. There the two
// products of a cycle, W^n and W^(n+N/4) = W^n * (-j), share one ROM word:
// output 1 uses multiplier 1, output 3 multiplier 2, and both take ROM 1's
// word (`share` tells the multiplier module to feed ROM 1's word to
// multiplier 2). rom_addr[k] is always the full exponent mod NMAX/4; the
// half-size ROMs drop its low bit.
//
// Steering: normally output p uses multiplier p-1. In the 16-point stage
// (stage code 010) a fixed table sends each output to the multiplier that
// already holds its coefficient (multiplier 0: W16^1, 1: W16^2, 2: W16^3);
// only the second W16^2 of offset m=2 forces one reload. A ROM is read only
// when its multiplier is used and needs a coefficient other than the one it
// holds, so coefficient inputs toggle only when they must.
//
// Timing: inputs in cycle t; rom_en/rom_addr are combinational in cycle t
// (the ROMs register them), triv/q/route/share/out_valid are registered and so
// line up with the ROM data in cycle t+1.
module fft_coef_gen
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       r2stage,     // radix-2 stage
  input  logic [2:0] stage,       // radix-4 stage code: L = 4**stage
  input  idx_t       m,           // butterfly offset (n for the radix-2 stage)
  input  logic [3:0] sh,          // log2(NMAX/L) (log2(NMAX/N) for radix-2)
  output logic       rom_en   [3],
  output raddr_t     rom_addr [3],
  output logic       out_valid,
  output logic [3:0] triv,        // output p bypasses the multipliers
  output logic [1:0] q     [4],   // quadrant of output p
  output logic [1:0] route [4],   // multiplier used by output p
  output logic       share        // multiplier 2 takes ROM 1's word
);
  localparam int unsigned QW = LOG2_NMAX - ROM_AW;   // 2 quadrant bits

  idx_t       e    [4];
  raddr_t     ca   [4];
  logic [1:0] qc   [4];
  logic [3:0] tc;
  logic [1:0] rc   [4];
  logic [1:0] rr   [4];           // ROM that supplies output p's word
  raddr_t     held [3];
  logic [2:0] held_ok;

  always_comb begin
    e[0] = '0;
    if (r2stage) begin
      e[1] = idx_t'(m << sh);
      e[2] = '0;
      e[3] = idx_t'(m << sh) + idx_t'(1 << (LOG2_NMAX - 2));
    end else begin
      e[1] = idx_t'(m << sh);
      e[2] = idx_t'((m << 1) << sh);
      e[3] = idx_t'(((m << 1) + m) << sh);
    end
    for (int p = 0; p < 4; p++) begin
      ca[p] = raddr_t'(e[p]);
      qc[p] = e[p][LOG2_NMAX-1 -: QW];
      tc[p] = (ca[p] == '0);
      rc[p] = 2'(p - 1);
    end
    rc[0] = 2'd0;
    if (r2stage) begin
      rc[1] = 2'd1;     // W^n        on multiplier 1
      rc[3] = 2'd2;     // W^n * (-j) on multiplier 2, word from ROM 1
    end
    // fixed steering for the 16-point stage, offsets m = 2 and m = 3
    if (!r2stage && stage == 3'd2) begin
      if (m[1:0] == 2'd2) begin
        rc[1] = 2'd1;   // W16^2
        rc[3] = 2'd2;   // W16^2 * (-j)
      end else if (m[1:0] == 2'd3) begin
        rc[1] = 2'd2;   // W16^3
        rc[2] = 2'd1;   // W16^2 * (-j)
        rc[3] = 2'd0;   // W16^1 * (-1)
      end
    end
    for (int p = 0; p < 4; p++) rr[p] = (r2stage && p == 3) ? 2'd1 : rc[p];
    for (int k = 0; k < 3; k++) begin
      rom_en[k]   = 1'b0;
      rom_addr[k] = held[k];
    end
    for (int p = 1; p < 4; p++) begin
      if (in_valid && !tc[p]) begin
        rom_addr[rr[p]] = ca[p];
        rom_en[rr[p]]   = !held_ok[rr[p]] || (held[rr[p]] != ca[p]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      held_ok   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      for (int k = 0; k < 3; k++) if (rom_en[k]) held_ok[k] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 3; k++) if (rom_en[k]) held[k] <= rom_addr[k];
    if (in_valid) begin
      triv  <= tc;
      q     <= qc;
      route <= rc;
      share <= r2stage;
    end
  end

  // Two outputs never share a multiplier in one cycle.
  property p_no_share;
    @(posedge clk) disable iff (rst)
      in_valid |-> ((tc[1] || tc[2] || rc[1] != rc[2]) &&
                    (tc[1] || tc[3] || rc[1] != rc[3]) &&
                    (tc[2] || tc[3] || rc[2] != rc[3]));
  endproperty
  a_no_share: assert property (p_no_share);

  // The half-size ROMs 0 and 2 are only asked for even words.
  a_even_words: assert property (@(posedge clk) disable iff (rst)
    (!rom_en[0] || !rom_addr[0][0]) && (!rom_en[2] || !rom_addr[2][0]));
endmodule
