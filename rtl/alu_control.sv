// ALU control unit of the Mini-MIPS lab machine.
//
// The ALU operation is not the opcode, so this block translates one into the
// other. Only opcode bits 2..0 matter: a 3-to-8 decoder produces one line per
// opcode 0..7 and each ALUop bit is the OR of the decoder lines whose row in
// the truth table has that bit set:
//   LW, SW, ADD -> add (2)   SUB, BEQ -> sub (6)   AND -> and (0)
//   OR -> or (1)             SLT -> slt (7)
// ALUop bit 3 is always 0 and JMP (opcode 8) is a don't-care that here gets
// the value of opcode 0 (add). The decoder-and-OR structure follows the
// lab's own implementation; the exact gates are this design's.
// Purely combinational, no clock.
module alu_control
  import mini_mips_pkg::*;
(
  input  logic [3:0] opcode,
  output aluop_t     aluop
);

  logic [7:0] dec;   // one-hot decode of opcode[2:0]
  logic [3:0] bits;

  always_comb begin
    dec = 8'b1 << opcode[2:0];
    bits[3] = 1'b0;
    bits[2] = dec[3] | dec[6] | dec[7];          // SUB, SLT, BEQ
    bits[1] = ~(dec[4] | dec[5]);                // all but AND, OR
    bits[0] = dec[5] | dec[6];                   // OR, SLT
    aluop   = aluop_t'(bits);
  end

endmodule
