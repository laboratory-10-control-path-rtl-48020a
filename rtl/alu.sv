// 16-bit ALU of the Mini-MIPS lab machine.
//
// Performs the five operations the instruction set needs, selected by the
// 4-bit ALUop: and (0), or (1), add (2), sub (6) and set-on-less-than (7).
// SLT compares the operands as two's-complement numbers and returns 1 or 0.
// Zero is high when the result is 0; BEQ uses it after a subtraction.
// The operation codes are the machine's; the signed compare and the result 0
// for the unused ALUop codes are this design's choices.
// Purely combinational.
module alu
  import mini_mips_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  aluop_t op,
  output word_t  result,
  output logic   zero
);

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = word_t'($signed(a) < $signed(b));
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
