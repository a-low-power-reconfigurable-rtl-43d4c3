// fft_controller: sequencing of the memory-based FFT.
//
// Phases:
//   IDLE  - waits for in_valid; the control code on `code` is taken with the
//           first sample and fixes the size for the whole transform.
//   LOAD  - one sample per in_valid, sample n goes to bank bank_sel(n) at
//           address n>>2.
//   COMP  - one butterfly issued per cycle, N/4 per stage. For the sizes
//           with the radix-2 flag set, a radix-2 stage comes first (two
//           radix-2 butterflies per cycle, on n, n+N/2 and n+N/4, n+3N/4
//           for n = 0 .. N/4-1: the four lie in four different banks, and
//           their twiddles W^n and W^(n+N/4) differ only by -j),
//           then the radix-4 stages with spans 4**(K-1) .. 1, K = code[2:0]-1.
//           In the 64-point stage (stage code 011) the 16 offsets of each
//           group are visited in the low-switching order
//           0,8,5,13,10,2,1,9,12,4,7,15,14,6,3,11; elsewhere in natural order.
//           Results are written in place 3 cycles after the read. Stages
//           follow each other without a gap: with this visiting order no
//           butterfly among the first three of a stage reads a sample that
//           one of the last three of the previous stage has still to write
//           (true for every size 64..8192), so a transform takes S*N/4 + 3
//           cycles for S stages. Only the read-out waits the 3 cycles.
//   OUT   - reads the results in natural frequency order (undoing the
//           mixed-radix digit reversal of the decimation-in-frequency flow),
//           one per cycle; out_valid/out_data follow the read by 2 cycles.
// The controller owns the address path: indices, bank map, read/write
// addresses and enables, the commutator rotations and the pipeline of
// control signals that travels with each butterfly:
//   cycle t   read issued (raddr/re)     cycle t+1 data -> commutator 1, butterfly
//   cycle t+1 coefficient generator      cycle t+2 multiplier module
//   cycle t+3 phase compensators, commutator 2, write (waddr/we)
// Samples offered on in_valid outside IDLE/LOAD are ignored; busy says so.
module fft_controller
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  ctrl_code_t code,
  output logic       busy,
  // memory
  output logic [3:0] mem_we,
  output baddr_t     mem_waddr [4],
  output logic       mem_wsel_in,   // 1: write data comes from the input port
  output logic [3:0] mem_re,
  output baddr_t     mem_raddr [4],
  input  cplx_t      mem_rdata [4],
  // datapath control
  output bank_t      rot_rd,        // commutator 1 (cycle t+1)
  output logic       bf_valid,      // butterfly operands valid (cycle t+1)
  output logic       bf_radix2,
  output logic       cg_valid,      // coefficient generator (cycle t+1)
  output logic       cg_r2stage,
  output logic [2:0] cg_stage,
  output idx_t       cg_m,
  output logic [3:0] cg_sh,
  output bank_t      rot_wr,        // commutator 2 (cycle t+3)
  input  logic       wb_valid,      // write-back data valid (cycle t+3)
  // result stream
  output logic       out_valid,
  output cplx_t      out_data
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMP, S_DRAIN, S_OUT} state_t;

  localparam logic [3:0] PERM64 [16] = '{4'd0, 4'd8, 4'd5, 4'd13, 4'd10, 4'd2, 4'd1, 4'd9,
                                         4'd12, 4'd4, 4'd7, 4'd15, 4'd14, 4'd6, 4'd3, 4'd11};
  localparam int unsigned PIPE = 3;   // read-to-write latency of the datapath

  state_t     state;
  ctrl_code_t cfg;
  idx_t       cnt;          // sample / butterfly counter
  logic       r2stage;      // current stage is the radix-2 one
  logic [2:0] p;            // digit of the current radix-4 stage (span 4**p)
  logic [1:0] drain;

  logic [2:0] kq;           // number of radix-4 stages K
  logic [3:0] log2n;
  idx_t       nlast;        // N-1
  idx_t       blast;        // N/4-1

  always_comb begin
    kq    = cfg.stage0 - 3'd1;
    log2n = code_log2n(cfg);
    nlast = idx_t'((1 << log2n) - 1);
    blast = idx_t'((1 << (log2n - 2)) - 1);
  end

  // ---------------- butterfly operand indices (cycle t) ----------------
  idx_t       bidx [4];
  idx_t       boff;          // twiddle offset m (or n)
  logic [3:0] bsh;
  always_comb begin
    idx_t n, mi, g, mm, base, span;
    n = '0; mi = '0; g = '0; mm = '0; base = '0; span = '0;
    if (r2stage) begin
      n       = cnt;                              // 0 .. N/4-1
      span    = idx_t'(1 << (2 * kq));            // N/2
      bidx[0] = n;
      bidx[1] = n + span;
      bidx[2] = n + (span >> 1);
      bidx[3] = n + (span >> 1) + span;
      boff    = n;
      bsh     = 4'(LOG2_NMAX) - log2n;
    end else begin
      span = idx_t'(1 << (2 * p));
      mi   = cnt & (span - idx_t'(1));
      g    = cnt >> (2 * p);
      mm   = (p == 3'd2) ? idx_t'(PERM64[mi[3:0]]) : mi;
      base = idx_t'((g << (2 * p + 2)) | mm);
      for (int k = 0; k < 4; k++) bidx[k] = base + idx_t'(k) * span;
      boff = mm;
      bsh  = 4'(LOG2_NMAX - 2) - 4'(2 * p);
    end
  end

  // ---------------- output order (natural frequency order) ----------------
  idx_t oidx;
  always_comb begin
    idx_t r, d;
    r = cfg.radix2 ? (cnt >> 1) : cnt;
    d = '0;
    for (int i = 0; i < 6; i++)
      if (i < int'(kq)) d[2*(int'(kq)-1-i) +: 2] = r[2*i +: 2];
    oidx = cfg.radix2 ? (d | idx_t'(cnt[0]) << (2 * kq)) : d;
  end

  bank_t  bf_rot;
  bank_t  bf_bank [4];
  baddr_t bf_addr [4];
  fft_addr_map u_map (.idx(bidx), .rot(bf_rot), .bank(bf_bank), .addr(bf_addr));

  wire issue = (state == S_COMP);

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      r2stage <= 1'b0;
      p       <= '0;
      drain   <= '0;
      cfg     <= '{radix2: 1'b0, stage0: 3'd4};
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && code_valid(code.stage0)) begin
          cfg   <= code;
          cnt   <= idx_t'(1);
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (cnt == nlast) begin
            cnt     <= '0;
            r2stage <= cfg.radix2;
            p       <= kq - 3'd1;
            state   <= S_COMP;
          end else cnt <= cnt + idx_t'(1);
        end
        S_COMP: begin
          if (cnt == blast) begin
            // next stage starts in the very next cycle; only the read-out
            // waits for the last results to be written
            cnt <= '0;
            if (r2stage) r2stage <= 1'b0;
            else if (p != '0) p <= p - 3'd1;
            else begin
              drain <= 2'(PIPE - 1);
              state <= S_DRAIN;
            end
          end else cnt <= cnt + idx_t'(1);
        end
        S_DRAIN: begin
          if (drain != '0) drain <= drain - 2'd1;
          else             state <= S_OUT;
        end
        S_OUT: begin
          if (cnt == nlast) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else cnt <= cnt + idx_t'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_LOAD);

  // ---------------- read port ----------------
  always_comb begin
    mem_re    = '0;
    mem_raddr = bf_addr;
    if (issue) mem_re = 4'hf;
    else if (state == S_OUT) begin
      for (int b = 0; b < 4; b++) mem_raddr[b] = bank_addr(oidx);
      mem_re[bank_sel(oidx)] = 1'b1;
    end
  end

  // ---------------- pipeline of control signals ----------------
  logic   v1, v2, v3;
  logic   r2_1;
  bank_t  rot1, rot2, rot3;
  baddr_t wa1 [4], wa2 [4], wa3 [4];
  logic   ov1;
  bank_t  ob1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; ov1 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1        <= issue;
      v2        <= v1;
      v3        <= v2;
      ov1       <= (state == S_OUT);
      out_valid <= ov1;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      rot1       <= bf_rot;
      wa1        <= bf_addr;
      r2_1       <= r2stage;
      cg_r2stage <= r2stage;
      cg_stage   <= p + 3'd1;
      cg_m       <= boff;
      cg_sh      <= bsh;
    end
    if (v1) begin rot2 <= rot1; wa2 <= wa1; end
    if (v2) begin rot3 <= rot2; wa3 <= wa2; end
    if (state == S_OUT) ob1 <= bank_sel(oidx);
    if (ov1) out_data <= mem_rdata[ob1];
  end

  assign rot_rd    = rot1;
  assign bf_valid  = v1;
  assign bf_radix2 = r2_1;
  assign cg_valid  = v1;
  assign rot_wr    = rot3;

  // ---------------- write port ----------------
  always_comb begin
    mem_we      = '0;
    mem_waddr   = wa3;
    mem_wsel_in = 1'b0;
    if ((state == S_IDLE && code_valid(code.stage0)) || state == S_LOAD) begin
      mem_wsel_in = 1'b1;
      for (int b = 0; b < 4; b++) mem_waddr[b] = bank_addr(state == S_IDLE ? '0 : cnt);
      if (in_valid) mem_we[bank_sel(state == S_IDLE ? '0 : cnt)] = 1'b1;
    end else if (v3) begin
      mem_we = 4'hf;
    end
  end

  // The datapath returns results exactly PIPE cycles after each read.
  a_wb_aligned: assert property (@(posedge clk) disable iff (rst) wb_valid == v3);
  // Operands of one butterfly always sit in four different banks.
  a_conflict_free: assert property (@(posedge clk) disable iff (rst)
    issue |-> (bf_bank[0] != bf_bank[1] && bf_bank[0] != bf_bank[2] && bf_bank[0] != bf_bank[3] &&
               bf_bank[1] != bf_bank[2] && bf_bank[1] != bf_bank[3] && bf_bank[2] != bf_bank[3]));
endmodule
