// mr_alu: the MR arithmetic-logical unit (combinational).
//
// Three bits choose the operation: OPERATE from the control unit and the
// instruction's OP1-0 (IR1-0). With OPERATE = 0 the ALU passes operand B
// unchanged; this is how a LOAD carries the memory word to the register file
// and the flags. With OPERATE = 1:
//   OP1-0 = 00  A + B         (ADD, ADDI)
//   OP1-0 = 01  A - B         (SUB, SUBI)
//   OP1-0 = 10  B >>> 1       (ASR, arithmetic shift of operand B)
//   OP1-0 = 11  A & B         (AND)
// Addition and subtraction are 16-bit two's complement and wrap; no carry or
// overflow leaves the unit, since the machine keeps only N and Z, which are
// taken from the result outside this module.
// The operation set follows the machine's instruction list; the OP1-0
// numbering and ASR acting on operand B are this design's choices.
module mr_alu
  import mr_pkg::*;
(
  input  word_t         a,
  input  word_t         b,
  input  logic          operate,
  input  alu_fn_e       fn,
  output word_t         y
);

  always_comb begin
    if (!operate) begin
      y = b;
    end else begin
      unique case (fn)
        ALU_ADD: y = a + b;
        ALU_SUB: y = a - b;
        ALU_ASR: y = {b[WORD_W-1], b[WORD_W-1:1]};
        ALU_AND: y = a & b;
      endcase
    end
  end

endmodule
