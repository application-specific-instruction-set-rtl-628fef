// alu: 16-bit arithmetic unit of the ASIP.
//
// One adder serves ADD and SUB: for SUB the second operand passes through a
// row of XOR gates and a carry of one is injected (a - b = a + ~b + 1). An
// arithmetic shift right by one gives DIV2 (integer division by two, rounding
// towards minus infinity). A multiplexer selects the adder or the shifter.
// The same unit also advances the SAD16 line pointers (an ADD with a
// constant operand chosen by the control unit).
// Negative and zero outcomes are produced for the condition flags.
// Operand isolation: while en is low both operands are held at zero, so the
// unit does not toggle for instructions that do not use it (the power-saving
// policy of inhibiting functional-unit inputs).
// The adder/XOR/shift/multiplexer structure follows the published datapath;
// the operand-isolation style is this design's choice. Purely combinational.
module alu
  import asip_pkg::*;
(
  input  logic    en,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    neg,
  output logic    zero
);

  word_t a_i, b_i, sum, shr;
  logic  sub;

  always_comb begin
    a_i  = en ? a : '0;
    b_i  = en ? b : '0;
    sub  = (op == ALU_SUB);
    sum  = a_i + (b_i ^ {DATA_W{sub}}) + word_t'(sub);
    shr  = {a_i[DATA_W-1], a_i[DATA_W-1:1]};
    y    = (op == ALU_ASR) ? shr : sum;
    neg  = y[DATA_W-1];
    zero = (y == '0);
  end

endmodule
