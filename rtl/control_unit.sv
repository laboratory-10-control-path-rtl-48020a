// Main control unit of the Mini-MIPS lab machine.
//
// Decodes the 4-bit opcode into the datapath control lines. Two 3-to-8
// decoders share opcode bits 2..0; opcode bit 3 enables the upper one
// (opcodes 8..15) and, inverted, the lower one (opcodes 0..7). Each control
// line is then a small function of the decoder lines, following the control
// table:
//   RegDst = ALUSrc = LW | SW      RegWr    = ~(SW | BEQ | JMP)
//   MemRd  = ~LW (active low)      MemWr    = ~SW (active low)
//   MemtoReg = LW                  Branch   = BEQ
//   Jump   = opcode bit 15 of the instruction (opcode[3])
// Opcodes 9..15 are not defined by the instruction set; since opcode bit 3
// alone selects the jump, they behave as JMP here and write nothing.
// Purely combinational, no clock.
module control_unit
  import mini_mips_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  logic [7:0] lo;   // opcodes 0..7
  logic [7:0] hi;   // opcodes 8..15

  // lo[0] = LW, lo[1] = SW, lo[7] = BEQ, hi[0] = JMP
  always_comb begin
    lo = opcode[3] ? 8'b0 : (8'b1 << opcode[2:0]);
    hi = opcode[3] ? (8'b1 << opcode[2:0]) : 8'b0;

    ctrl.reg_dst    = lo[0] | lo[1];
    ctrl.alu_src    = lo[0] | lo[1];
    ctrl.reg_write  = ~(lo[1] | lo[7] | (|hi));
    ctrl.mem_rd_n   = ~lo[0];
    ctrl.mem_wr_n   = ~lo[1];
    ctrl.mem_to_reg = lo[0];
    ctrl.branch     = lo[7];
    ctrl.jump       = opcode[3];
  end

endmodule
