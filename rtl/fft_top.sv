// fft_top: low-power reconfigurable memory-based FFT processor, 64 to 8192
// points, 16-bit complex data.
//
// One radix-2/4 processing element works on a four-bank in-place data memory:
//
//   banks --> commutator 1 --> radix-2/4 butterfly --> multiplier module
//         <-- commutator 2 <-- phase compensators / buffers <--'
//
// The multiplier module has three complex multipliers fed from three
// coefficient ROMs (1024, 2048 and 1024 words). Coefficients are stored modulo a quarter turn and the
// phase compensators put back the missing factor of 1, -j, -1 or j; in the
// 64-point stage the butterflies are visited in an order that keeps
// successive coefficient sets alike, and in the 16-point stage each
// coefficient is steered to the multiplier that already holds it, both to
// cut switching in the multipliers.
//
// Interface (one transform at a time):
//   in_valid/in_data  N samples {re, im} in natural order; the 4-bit control
//                     code `sel` (64:0100 128:1100 256:0101 512:1101
//                     1024:0110 2048:1110 4096:0111 8192:1111) is taken with
//                     the first sample. Samples are accepted while busy=0.
//   out_valid/out_data N results X(k)/N in natural order k = 0..N-1.
// Timing: after the last sample the transform takes S*N/4 + 3 cycles until
// its last result is written (S stages: log4 N radix-4 stages plus one
// radix-2 stage for 128, 512, 2048 and 8192 points; 51 cycles for 64 points,
// 14339 for 8192), then the N results stream out one per cycle, the first
// 3 cycles later.
module fft_top
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic [3:0]  sel,
  output logic        busy,
  output logic        out_valid,
  output logic [31:0] out_data
);
  // memory
  logic [3:0] mem_we, mem_re;
  baddr_t     mem_waddr [4], mem_raddr [4];
  cplx_t      mem_wdata [4], mem_rdata [4];
  logic       mem_wsel_in;
  // control
  bank_t      rot_rd, rot_wr;
  logic       bf_valid, bf_radix2;
  logic       cg_valid, cg_r2stage;
  logic [2:0] cg_stage;
  idx_t       cg_m;
  logic [3:0] cg_sh;
  cplx_t      out_c;
  logic       mm_valid;     // multiplier-module results valid (write-back)

  fft_controller u_ctrl (
    .clk, .rst, .in_valid, .code(ctrl_code_t'(sel)), .busy,
    .mem_we, .mem_waddr, .mem_wsel_in, .mem_re, .mem_raddr, .mem_rdata,
    .rot_rd, .bf_valid, .bf_radix2,
    .cg_valid, .cg_r2stage, .cg_stage, .cg_m, .cg_sh,
    .rot_wr, .wb_valid(mm_valid),
    .out_valid, .out_data(out_c)
  );
  assign out_data = out_c;

  fft_memory u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // commutator 1: banks -> butterfly operands
  logic [31:0] c1_in [4], c1_out [4];
  cplx_t       bf_x [4];
  always_comb for (int i = 0; i < 4; i++) begin
    c1_in[i] = mem_rdata[i];
    bf_x[i]  = cplx_t'(c1_out[i]);
  end
  fft_commutator #(.W(32), .TO_BANKS(1'b0)) u_comm1 (.rot(rot_rd), .din(c1_in), .dout(c1_out));

  // butterfly
  logic  bfo_valid;
  cplx_t bf_y [4];
  fft_butterfly u_bf (
    .clk, .rst, .in_valid(bf_valid), .radix2(bf_radix2), .x(bf_x),
    .out_valid(bfo_valid), .y(bf_y)
  );

  // coefficient generation and ROMs
  logic       rom_en   [3];
  raddr_t     rom_addr [3];
  cplx_t      coef     [3];
  logic       cgo_valid;
  logic [3:0] triv;
  logic [1:0] quad [4], route [4];
  logic       share;
  fft_coef_gen u_cg (
    .clk, .rst, .in_valid(cg_valid), .r2stage(cg_r2stage), .stage(cg_stage),
    .m(cg_m), .sh(cg_sh), .rom_en, .rom_addr,
    .out_valid(cgo_valid), .triv, .q(quad), .route, .share
  );
  // ROM 1: all NMAX/4 words; ROMs 0 and 2: the even words only
  fft_coef_rom #(.AW(ROM_AW - 1)) u_rom0 (.clk, .en(rom_en[0]), .addr(rom_addr[0][ROM_AW-1:1]), .data(coef[0]));
  fft_coef_rom #(.AW(ROM_AW))     u_rom1 (.clk, .en(rom_en[1]), .addr(rom_addr[1]),             .data(coef[1]));
  fft_coef_rom #(.AW(ROM_AW - 1)) u_rom2 (.clk, .en(rom_en[2]), .addr(rom_addr[2][ROM_AW-1:1]), .data(coef[2]));

  // multiplier module
  cplx_t      mm_z [4];
  logic [1:0] mm_q [4];
  fft_mult_module u_mm (
    .clk, .rst, .in_valid(bfo_valid), .y(bf_y), .triv, .q(quad), .route, .coef, .share,
    .out_valid(mm_valid), .z(mm_z), .zq(mm_q)
  );

  // phase compensators
  cplx_t pc_out [4];
  for (genvar p = 0; p < 4; p++) begin : g_pc
    fft_phase_comp u_pc (.q(mm_q[p]), .din(mm_z[p]), .dout(pc_out[p]));
  end

  // commutator 2: results -> banks
  logic [31:0] c2_in [4], c2_out [4];
  always_comb for (int i = 0; i < 4; i++) c2_in[i] = pc_out[i];
  fft_commutator #(.W(32), .TO_BANKS(1'b1)) u_comm2 (.rot(rot_wr), .din(c2_in), .dout(c2_out));

  always_comb for (int b = 0; b < 4; b++)
    mem_wdata[b] = mem_wsel_in ? cplx_t'(in_data) : cplx_t'(c2_out[b]);

  a_cg_aligned: assert property (@(posedge clk) disable iff (rst) bfo_valid == cgo_valid);
endmodule
