// control_unit: instruction register, hardwired decoder, condition flags and
// the multi-cycle sequencing of SAD16.
//
// Fetch. Each cycle that the processor does not stall, the word read from the
// firmware memory is captured in the instruction register (IR) and executed in
// the following cycle. A jump is resolved while it sits in the IR: when taken,
// the program counter unit fetches the target at once, so every instruction
// except SAD16 (and a stalled one) completes in one cycle.
//
// Flags. ADD, SUB, DIV2 and SAD16 set Negative (bit 15 of the result) and Zero;
// MOVR, MOVC, LD and J leave them alone. J tests them: always, negative,
// positive (neither negative nor zero) or zero.
//
// SAD16 Rd, Rs1, Rs2 occupies the IR for SAD_CYCLES = 19 cycles:
//   step 0      ports A/B read Rs1/Rs2, the AGU captures them as line
//               pointers; the ALU writes Rs1 + 16 (next macroblock line)
//   step 1      port A reads Rs2, the ALU writes Rs2 + SA_STRIDE (next
//               candidate line); port B reads Rd and loads it into the SADU
//   steps 2-17  the SADU accumulates one pixel pair per cycle
//   step 18     the SADU result is written to Rd and sets the flags
// Interlocks: an LD or SAD16 that finds the AGU busy loading waits in the IR
// until the load has finished (stall_agu).
//
// The instruction set, the two flags and the use of the ALU by SAD16 follow
// the document; the step schedule, the cycle counts and the interlock rule
// are this design's choices.
module control_unit
  import asip_pkg::*;
#(
  parameter int unsigned PC_W      = 10,
  parameter int unsigned SA_STRIDE = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     instr,      // word at the current fetch address
  input  logic            res_neg,    // flags of the value being written back
  input  logic            res_zero,
  input  logic            agu_busy,
  output ctrl_t           ctrl,
  output logic            stall,      // hold PC and IR
  output logic            jump,
  output logic [PC_W-1:0] target,
  output logic [7:0]      imm,        // MOVC constant
  output logic            flag_n,
  output logic            flag_z,
  output logic            stall_agu,  // stalled waiting for the AGU
  output logic            stall_sad   // stalled inside SAD16
);

  localparam int unsigned SAD_LAST = 18;

  logic [15:0] ir;
  logic        ir_v;
  logic [4:0]  sstep;
  opcode_e     op;
  logic        taken;

  always_comb begin
    op        = opcode_e'(ir[15:13]);
    ctrl      = '0;
    ctrl.wb_sel = WB_ALU;
    ctrl.alu_op = ALU_ADD;
    stall_agu = 1'b0;
    stall_sad = 1'b0;
    taken     = 1'b0;
    unique case (cond_e'(ir[12:11]))
      CC_U: taken = 1'b1;
      CC_N: taken = flag_n;
      CC_P: taken = !flag_n && !flag_z;
      CC_Z: taken = flag_z;
    endcase
    jump   = 1'b0;
    target = ir[PC_W-1:0];
    imm    = ir[7:0];

    if (ir_v) begin
      unique case (op)
        OP_LD: begin
          if (agu_busy) stall_agu = 1'b1;
          else begin
            ctrl.ld_start = 1'b1;
            ctrl.ld_sel   = ir[12];
          end
        end
        OP_J: jump = taken;
        OP_MOVR: begin
          ctrl.ra_b   = ir[4:0];
          ctrl.wa     = ir[12:8];
          ctrl.wb_sel = WB_MOVR;
          ctrl.we_hi  = 1'b1;
          ctrl.we_lo  = 1'b1;
        end
        OP_MOVC: begin
          ctrl.wa     = {1'b0, ir[11:8]};
          ctrl.wb_sel = WB_MOVC;
          ctrl.we_hi  = ir[12];
          ctrl.we_lo  = !ir[12];
        end
        OP_ADD, OP_SUB, OP_DIV2: begin
          ctrl.ra_a    = ir[7:4];
          ctrl.ra_b    = {1'b0, ir[3:0]};
          ctrl.wa      = {1'b0, ir[11:8]};
          ctrl.wb_sel  = WB_ALU;
          ctrl.alu_en  = 1'b1;
          ctrl.alu_op  = (op == OP_ADD) ? ALU_ADD : (op == OP_SUB) ? ALU_SUB : ALU_ASR;
          ctrl.we_hi   = 1'b1;
          ctrl.we_lo   = 1'b1;
          ctrl.flag_we = 1'b1;
        end
        OP_SAD16: begin
          if (sstep == 0 && agu_busy) begin
            stall_agu = 1'b1;
          end else if (sstep == 0) begin
            stall_sad    = 1'b1;
            ctrl.ra_a    = ir[7:4];
            ctrl.ra_b    = {1'b0, ir[3:0]};
            ctrl.sad_cap = 1'b1;
            ctrl.alu_en  = 1'b1;
            ctrl.alu_b_k = 1'b1;
            ctrl.alu_k   = word_t'(MB_N);
            ctrl.wa      = {1'b0, ir[7:4]};
            ctrl.we_hi   = 1'b1;
            ctrl.we_lo   = 1'b1;
          end else if (sstep == 1) begin
            stall_sad      = 1'b1;
            ctrl.ra_a      = ir[3:0];
            ctrl.ra_b      = {1'b0, ir[11:8]};
            ctrl.sad_start = 1'b1;
            ctrl.alu_en    = 1'b1;
            ctrl.alu_b_k   = 1'b1;
            ctrl.alu_k     = word_t'(SA_STRIDE);
            ctrl.wa        = {1'b0, ir[3:0]};
            ctrl.we_hi     = 1'b1;
            ctrl.we_lo     = 1'b1;
          end else if (sstep < 5'(SAD_LAST)) begin
            stall_sad     = 1'b1;
            ctrl.sad_en   = 1'b1;
            ctrl.sad_step = 1'b1;
          end else begin
            ctrl.wa      = {1'b0, ir[11:8]};
            ctrl.wb_sel  = WB_SAD;
            ctrl.we_hi   = 1'b1;
            ctrl.we_lo   = 1'b1;
            ctrl.flag_we = 1'b1;
          end
        end
      endcase
    end
    stall = stall_agu | stall_sad;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir     <= '0;
      ir_v   <= 1'b0;
      sstep  <= '0;
      flag_n <= 1'b0;
      flag_z <= 1'b0;
    end else begin
      if (!stall) begin
        ir   <= instr;
        ir_v <= 1'b1;
      end
      if (ctrl.flag_we) begin
        flag_n <= res_neg;
        flag_z <= res_zero;
      end
      if (stall_sad)                             sstep <= sstep + 1'b1;
      else if (ir_v && op == OP_SAD16 && !stall) sstep <= '0;
    end
  end

endmodule
