// me_asip: application-specific instruction-set processor for block-matching
// motion estimation.
//
// A firmware program of 16-bit instructions (LD, J, MOVR, MOVC, SAD16, DIV2,
// ADD, SUB) runs a search algorithm (full search, three/four-step search,
// diamond search, MVFAST, ...) over one 16x16 macroblock and its search area.
// The datapath is:
//   pc_unit -> fw_rom -> control_unit (IR, decoder, Negative/Zero flags)
//   regfile (R0..R23 GPRs, R24..R31 SPRs) with read ports A (4-bit address)
//     and B (5-bit address) and one byte-enabled write port
//   alu (ADD/SUB/DIV2, and SAD16 pointer updates)
//   sadu (serial SAD, one pixel pair per cycle)
//   agu (LD loader + local memory + pixel supply to the SADU)
// A write-back multiplexer picks the ALU result, the SADU result, port B
// (MOVR) or the MOVC constant (placed in both bytes; the byte enables select
// the half that is written). The flags are taken from the written value.
//
// Host side: the firmware is loaded through prog_* while rst_n is low (or at
// any time the program does not run); the host writes the special-purpose
// registers through host_spr_* (R24/R25 macroblock x/y, R26/R27 search-area
// x/y for LD, the rest free for parameters) and reads all eight on spr.
// Frame memory side: one byte read per cycle, returned the next cycle.
//
// Parameters: PC_W (firmware address width, 10), FRAME_W/FRAME_H (frame size,
// QCIF 176x144), SA_DIM (search-area side, 31 = 16x16 candidate positions of a
// 16x16 block). There is no halt instruction: a program ends by jumping to
// itself.
module me_asip
  import asip_pkg::*;
#(
  parameter int unsigned PC_W      = 10,
  parameter int unsigned FRAME_W   = 176,
  parameter int unsigned FRAME_H   = 144,
  parameter int unsigned SA_DIM    = 31,
  parameter int unsigned EXT_AW    = $clog2(FRAME_W * FRAME_H),
  parameter int unsigned SA_STRIDE = 2 ** $clog2(SA_DIM)
) (
  input  logic              clk,
  input  logic              rst_n,
  // firmware load
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  logic [15:0]       prog_data,
  // host access to the special-purpose registers
  input  logic              host_spr_we,
  input  logic [2:0]        host_spr_idx,
  input  word_t             host_spr_wd,
  output word_t             spr [N_SPR],
  // frame memory
  output logic              ext_re,
  output logic              ext_frame,
  output logic [EXT_AW-1:0] ext_addr,
  input  pixel_t            ext_rdata,
  // status
  output logic [PC_W-1:0]   pc,
  output logic              agu_busy,
  output logic              flag_n,      // Negative flag
  output logic              flag_z,      // Zero flag
  output logic              stall_agu,   // an LD or SAD16 waits for the AGU
  output logic              stall_sad    // SAD16 in progress
);

  ctrl_t           ctrl;
  logic            stall, jump;
  logic [PC_W-1:0] target, fetch_addr;
  logic [15:0]     instr;
  word_t           rd_a, rd_b, alu_b, alu_y, sad, wd, ld_x, ld_y;
  pixel_t          mb_px, cand_px;
  logic [7:0]      imm;

  pc_unit #(.PC_W(PC_W)) u_pc (
    .clk, .rst_n, .stall, .jump, .target, .fetch_addr, .pc
  );

  fw_rom #(.PC_W(PC_W)) u_rom (
    .clk, .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_data),
    .addr(fetch_addr), .data(instr)
  );

  control_unit #(.PC_W(PC_W), .SA_STRIDE(SA_STRIDE)) u_ctrl (
    .clk, .rst_n, .instr,
    .res_neg(wd[DATA_W-1]), .res_zero(wd == '0),
    .agu_busy, .ctrl, .stall, .jump, .target, .imm, .flag_n, .flag_z,
    .stall_agu, .stall_sad
  );

  regfile u_rf (
    .clk, .rst_n,
    .ra_a(ctrl.ra_a), .rd_a, .ra_b(ctrl.ra_b), .rd_b,
    .wa(ctrl.wa), .wd, .we_hi(ctrl.we_hi), .we_lo(ctrl.we_lo),
    .host_we(host_spr_we), .host_idx(host_spr_idx), .host_wd(host_spr_wd),
    .spr
  );

  assign alu_b = ctrl.alu_b_k ? ctrl.alu_k : rd_b;

  alu u_alu (
    .en(ctrl.alu_en), .op(ctrl.alu_op), .a(rd_a), .b(alu_b),
    .y(alu_y), .neg(), .zero()
  );

  sadu u_sadu (
    .clk, .start(ctrl.sad_start), .en(ctrl.sad_en), .sad_init(rd_b),
    .mb_px, .cand_px, .sad
  );

  // LD coordinates come from the SPRs: macroblock (R24, R25) or search area (R26, R27).
  assign ld_x = ctrl.ld_sel ? spr[int'(SPR_SA_X) - SPR_BASE] : spr[int'(SPR_MB_X) - SPR_BASE];
  assign ld_y = ctrl.ld_sel ? spr[int'(SPR_SA_Y) - SPR_BASE] : spr[int'(SPR_MB_Y) - SPR_BASE];

  agu #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SA_DIM(SA_DIM), .EXT_AW(EXT_AW),
        .SA_STRIDE(SA_STRIDE)) u_agu (
    .clk, .rst_n,
    .ld_start(ctrl.ld_start), .ld_sel(ctrl.ld_sel), .ld_x, .ld_y, .busy(agu_busy),
    .ext_re, .ext_frame, .ext_addr, .ext_rdata,
    .sad_cap(ctrl.sad_cap), .ptr_mb(rd_a), .ptr_ca(rd_b), .sad_step(ctrl.sad_step),
    .mb_px, .cand_px
  );

  // write-back multiplexer; the MOVC constant sits in both bytes
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wd = alu_y;
      WB_SAD:  wd = sad;
      WB_MOVR: wd = rd_b;
      WB_MOVC: wd = {imm, imm};
    endcase
  end

endmodule
