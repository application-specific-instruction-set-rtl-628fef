// tb_control_unit: self-checking test of the instruction register, decoder,
// flags and SAD16 sequencer. The testbench plays the firmware memory: it
// offers one instruction word, lets the IR capture it, and checks the decoded
// control word. Covered: every opcode's fields, MOVC byte selection, flag
// update by ADD/SUB/DIV2 and not by MOVR/MOVC, all four jump conditions taken
// and not taken, the 19-cycle SAD16 schedule (pointer steps, SADU load,
// 16 accumulate cycles, write-back), and the LD / SAD16 interlock on a busy AGU.
module tb_control_unit;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, res_neg = 0, res_zero = 0, agu_busy = 0;
  logic [15:0] instr = 16'h4000;
  ctrl_t ctrl;
  logic stall, jump, flag_n, flag_z, stall_agu, stall_sad;
  logic [9:0] target;
  logic [7:0] imm;
  int checks = 0, failures = 0;
  // filler word offered while nothing else is: MOVR R0, R0 has no effect
  localparam logic [15:0] NOP = 16'h4000;

  control_unit #(.PC_W(10), .SA_STRIDE(32)) dut (
    .clk, .rst_n, .instr, .res_neg, .res_zero, .agu_busy, .ctrl, .stall, .jump, .target,
    .imm, .flag_n, .flag_z, .stall_agu, .stall_sad);

  always #5 clk = ~clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // present an instruction and let the IR take it
  task automatic issue(input logic [15:0] w);
    instr = w;
    @(posedge clk); #1;
    instr = NOP;
  endtask

  task automatic set_flags(input logic n, input logic z);
    res_neg = n; res_zero = z;
    issue(enc_add(4'd1, 4'd2, 4'd3));
    @(posedge clk); #1;           // ADD executes, flags are written
    expect_true(flag_n == n && flag_z == z, "flags set by ADD");
  endtask

  task automatic check_jump(input cond_e cc, input logic exp_taken);
    issue(enc_j(cc, 10'h2A5));
    expect_true(jump == exp_taken && target == 10'h2A5 && !stall, $sformatf("J cc=%0d", cc));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_true(!stall && !jump && ctrl == '0, "idle after reset");

    // ALU instructions
    issue(enc_add(4'd5, 4'd6, 4'd7));
    expect_true(ctrl.ra_a == 6 && ctrl.ra_b == 7 && ctrl.wa == 5 && ctrl.alu_en &&
                ctrl.alu_op == ALU_ADD && !ctrl.alu_b_k && ctrl.we_hi && ctrl.we_lo &&
                ctrl.flag_we && ctrl.wb_sel == WB_ALU && !stall, "ADD decode");
    issue(enc_sub(4'd11, 4'd2, 4'd1));
    expect_true(ctrl.ra_a == 2 && ctrl.ra_b == 1 && ctrl.wa == 11 && ctrl.alu_op == ALU_SUB &&
                ctrl.flag_we, "SUB decode");
    issue(enc_div2(4'd9, 4'd12));
    expect_true(ctrl.ra_a == 12 && ctrl.wa == 9 && ctrl.alu_op == ALU_ASR && ctrl.flag_we,
                "DIV2 decode");
    // register moves
    issue(enc_movr(5'd29, 5'd17));
    expect_true(ctrl.ra_b == 17 && ctrl.wa == 29 && ctrl.wb_sel == WB_MOVR && ctrl.we_hi &&
                ctrl.we_lo && !ctrl.flag_we, "MOVR decode");
    issue(enc_movc(1'b1, 4'd3, 8'hA7));
    expect_true(ctrl.wa == 3 && ctrl.wb_sel == WB_MOVC && ctrl.we_hi && !ctrl.we_lo &&
                imm == 8'hA7 && !ctrl.flag_we, "MOVC high decode");
    issue(enc_movc(1'b0, 4'd4, 8'h5C));
    expect_true(ctrl.wa == 4 && !ctrl.we_hi && ctrl.we_lo && imm == 8'h5C, "MOVC low decode");

    // flags and jumps
    set_flags(1'b1, 1'b0);
    check_jump(CC_U, 1); check_jump(CC_N, 1); check_jump(CC_P, 0); check_jump(CC_Z, 0);
    set_flags(1'b0, 1'b1);
    check_jump(CC_N, 0); check_jump(CC_P, 0); check_jump(CC_Z, 1);
    set_flags(1'b0, 1'b0);
    check_jump(CC_N, 0); check_jump(CC_P, 1); check_jump(CC_Z, 0); check_jump(CC_U, 1);
    // MOVR does not touch the flags
    res_neg = 1; res_zero = 1;
    issue(enc_movr(5'd1, 5'd2)); @(posedge clk); #1;
    expect_true(!flag_n && !flag_z, "MOVR leaves flags");

    // LD with the AGU busy waits, then starts
    agu_busy = 1;
    issue(enc_ld(1'b1));
    for (int i = 0; i < 5; i++) begin
      expect_true(stall && stall_agu && !ctrl.ld_start, "LD waits for AGU");
      @(posedge clk); #1;
    end
    agu_busy = 0; #1;
    expect_true(!stall && ctrl.ld_start && ctrl.ld_sel, "LD starts");
    issue(enc_ld(1'b0));
    expect_true(ctrl.ld_start && !ctrl.ld_sel, "LD macroblock");
    issue(NOP);

    // SAD16 R1, R14, R15 waiting for the AGU, then its schedule
    agu_busy = 1;
    issue(enc_sad16(4'd1, 4'd14, 4'd15));
    expect_true(stall_agu && !ctrl.sad_cap && ctrl.we_hi == 0, "SAD16 waits for AGU");
    @(posedge clk); #1;
    agu_busy = 0; #1;
    begin
      int cyc, en_cnt;
      cyc = 0; en_cnt = 0;
      expect_true(ctrl.sad_cap && ctrl.ra_a == 14 && ctrl.ra_b == 15 && ctrl.wa == 14 &&
                  ctrl.alu_b_k && ctrl.alu_k == 16 && ctrl.alu_en && stall, "SAD16 step 0");
      @(posedge clk); #1; cyc++;
      expect_true(ctrl.sad_start && ctrl.ra_a == 15 && ctrl.ra_b == 1 && ctrl.wa == 15 &&
                  ctrl.alu_k == 32 && stall, "SAD16 step 1");
      while (stall) begin
        if (ctrl.sad_en && ctrl.sad_step && !ctrl.we_hi) en_cnt++;
        @(posedge clk); #1; cyc++;
      end
      expect_true(ctrl.wb_sel == WB_SAD && ctrl.wa == 1 && ctrl.flag_we && ctrl.we_lo,
                  "SAD16 write-back");
      expect_true(en_cnt == 16, $sformatf("SAD16 accumulate cycles %0d", en_cnt));
      expect_true(cyc + 1 == 19, $sformatf("SAD16 length %0d cycles", cyc + 1));
    end
    issue(enc_add(4'd2, 4'd2, 4'd2));
    expect_true(!stall && ctrl.alu_en && !ctrl.sad_en, "next instruction after SAD16");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
