// asip_pkg: types, constants and instruction encoders shared by the
// motion-estimation ASIP.
//
// Instruction word (16 bits, fixed format), opcode in bits [15:13]:
//   LD    000 t  -                     t: 0 = macroblock, 1 = search area
//   J     001 cc[12:11] - addr[9:0]    cc: 00 always, 01 negative, 10 positive, 11 zero
//   MOVR  010 Rd[12:8] - Rs[4:0]       5-bit register numbers (R0..R31)
//   MOVC  011 t Rd[11:8] const[7:0]    t: 0 = low byte, 1 = high byte
//   SAD16 100 - Rd[11:8] Rs1[7:4] Rs2[3:0]
//   DIV2  101 - Rd[11:8] Rs[7:4] -
//   ADD   110 - Rd[11:8] Rs1[7:4] Rs2[3:0]
//   SUB   111 - Rd[11:8] Rs1[7:4] Rs2[3:0]
// The opcodes and field order follow the published instruction table; the
// exact bit positions of the register fields, the condition-code values and
// the byte selected by t are this design's reading of that table.
//
// Register map: R0..R23 are general-purpose, R24..R31 are the special-purpose
// registers, which a host can also write and read. This design gives four of
// them a hardware meaning for LD: R24/R25 = x/y of the macroblock's top-left
// pixel in the current frame, R26/R27 = x/y of the search area's top-left
// pixel in the reference frame.
package asip_pkg;

  localparam int unsigned DATA_W   = 16;   // register and result width
  localparam int unsigned NREG     = 32;   // 24 GPRs + 8 SPRs
  localparam int unsigned N_GPR    = 24;
  localparam int unsigned N_SPR    = 8;
  localparam int unsigned SPR_BASE = 24;   // first SPR number
  localparam int unsigned MB_N     = 16;   // macroblock side, pixels
  localparam int unsigned PIX_W    = 8;    // luminance sample width

  localparam logic [4:0] SPR_MB_X = 5'd24;
  localparam logic [4:0] SPR_MB_Y = 5'd25;
  localparam logic [4:0] SPR_SA_X = 5'd26;
  localparam logic [4:0] SPR_SA_Y = 5'd27;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [PIX_W-1:0]  pixel_t;

  typedef enum logic [2:0] {
    OP_LD    = 3'b000,
    OP_J     = 3'b001,
    OP_MOVR  = 3'b010,
    OP_MOVC  = 3'b011,
    OP_SAD16 = 3'b100,
    OP_DIV2  = 3'b101,
    OP_ADD   = 3'b110,
    OP_SUB   = 3'b111
  } opcode_e;

  typedef enum logic [1:0] {
    CC_U = 2'b00,   // always
    CC_N = 2'b01,   // last result negative
    CC_P = 2'b10,   // last result positive (not negative, not zero)
    CC_Z = 2'b11    // last result zero
  } cond_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_ASR = 2'b10
  } alu_op_e;

  // Source of the register-file write data.
  typedef enum logic [1:0] {
    WB_ALU  = 2'b00,
    WB_SAD  = 2'b01,
    WB_MOVR = 2'b10,
    WB_MOVC = 2'b11
  } wb_sel_e;

  // Control word produced by the decoder for the datapath.
  typedef struct packed {
    logic [3:0] ra_a;        // read port A (R0..R15)
    logic [4:0] ra_b;        // read port B (R0..R31)
    logic [4:0] wa;          // write address
    logic       we_hi;       // write high byte
    logic       we_lo;       // write low byte
    wb_sel_e    wb_sel;      // write-data source
    logic       alu_en;      // ALU operands enabled
    alu_op_e    alu_op;
    logic       alu_b_k;     // ALU operand b = alu_k instead of port B
    word_t      alu_k;       // constant operand (SAD16 pointer strides)
    logic       flag_we;     // update Negative/Zero from the write data
    logic       sad_start;   // SADU: load initial value from port B
    logic       sad_en;      // SADU: accumulate one pixel pair
    logic       sad_cap;     // AGU: capture line pointers from ports A/B
    logic       sad_step;    // AGU: next pixel pair
    logic       ld_start;    // AGU: start an LD
    logic       ld_sel;      // LD area: 0 macroblock, 1 search area
  } ctrl_t;

  // ---- encoders, used to build firmware images ----
  function automatic logic [15:0] enc_ld(input logic t);
    return {OP_LD, t, 12'h000};
  endfunction

  function automatic logic [15:0] enc_j(input cond_e cc, input logic [9:0] addr);
    return {OP_J, cc, 1'b0, addr};
  endfunction

  function automatic logic [15:0] enc_movr(input logic [4:0] rd, input logic [4:0] rs);
    return {OP_MOVR, rd, 3'b000, rs};
  endfunction

  function automatic logic [15:0] enc_movc(input logic t, input logic [3:0] rd,
                                           input logic [7:0] c);
    return {OP_MOVC, t, rd, c};
  endfunction

  function automatic logic [15:0] enc_sad16(input logic [3:0] rd, input logic [3:0] rs1,
                                            input logic [3:0] rs2);
    return {OP_SAD16, 1'b0, rd, rs1, rs2};
  endfunction

  function automatic logic [15:0] enc_div2(input logic [3:0] rd, input logic [3:0] rs);
    return {OP_DIV2, 1'b0, rd, rs, 4'h0};
  endfunction

  function automatic logic [15:0] enc_add(input logic [3:0] rd, input logic [3:0] rs1,
                                          input logic [3:0] rs2);
    return {OP_ADD, 1'b0, rd, rs1, rs2};
  endfunction

  function automatic logic [15:0] enc_sub(input logic [3:0] rd, input logic [3:0] rs1,
                                          input logic [3:0] rs2);
    return {OP_SUB, 1'b0, rd, rs1, rs2};
  endfunction

endpackage
