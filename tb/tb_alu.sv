// tb_alu: self-checking test of the ALU: random and corner operands for ADD,
// SUB and DIV2 against an integer model, the negative/zero outputs, and the
// operand isolation (result zero while disabled).
module tb_alu;
  import asip_pkg::*;
  logic    en;
  alu_op_e op;
  word_t   a, b, y;
  logic    neg, zero;
  int checks = 0, failures = 0;

  alu dut (.en, .op, .a, .b, .y, .neg, .zero);

  task automatic check(input word_t exp);
    checks++;
    if (y !== exp || neg !== exp[15] || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      en = 1'b1;
      a  = (i < 8) ? word_t'(16'h8000 >> i) : word_t'($urandom);
      b  = (i % 7 == 0) ? a : word_t'($urandom);
      op = alu_op_e'(i % 3);
      #1;
      unique case (op)
        ALU_ADD: check(word_t'(int'(a) + int'(b)));
        ALU_SUB: check(word_t'(int'(a) - int'(b)));
        ALU_ASR: check(word_t'($signed(a) >>> 1));
        default: ;
      endcase
    end
    // DIV2 of negative numbers rounds towards minus infinity
    en = 1'b1; op = ALU_ASR; a = 16'hFFFD; b = 0; #1; check(16'hFFFE);
    // operand isolation
    en = 1'b0; op = ALU_ADD; a = 16'h1234; b = 16'h1111; #1; check(16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
