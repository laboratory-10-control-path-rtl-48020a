// Single-cycle Mini-MIPS CPU.
//
// Executes one instruction per clock. The instruction memory sits outside,
// as in the lab circuit: the CPU drives pc and receives the instruction
// word. Inside are the PC, the main control unit, the ALU control unit, the
// register file, the ALU and the data memory.
//
// Instruction fields: opcode [15:12], rs [11:8], rt [7:4], rd/offset [3:0].
//   R-type (ADD SUB AND OR SLT): rd <- rs op rt
//   LW  rs rt off : rt <- mem[rs + sext(off)]
//   SW  rs rt off : mem[rs + sext(off)] <- rt
//   BEQ rs rt off : if rs == rt, pc <- pc + 2 + 2*sext(off)
//   JMP target    : pc <- 2*target (target is bits [11:0])
// The PC is a byte address of 16-bit instructions and steps by 2. The offset
// of LW and SW is used unscaled (the lab's programs store to data words 2
// and 4 with offsets 2 and 4); only the branch offset is doubled.
//
// Timing: the PC, the register write and the data-memory write all happen
// at the rising clock edge; everything else settles within the cycle. The
// reset is asynchronous and active high and sets the PC to 0.
// The observation outputs rd1, rd2, alu_result and zero are the lab
// circuit's Read Data 1, Read Data 2, ALU result and Zero displays.
module sc_cpu
  import mini_mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  output addr_t pc,
  input  word_t instr,
  output word_t rd1,
  output word_t rd2,
  output word_t alu_result,
  output logic  zero
);

  instr_t i;
  ctrl_t  ctrl;
  aluop_t aluop;
  word_t  imm, alu_b, mem_rdata, wdata;
  ridx_t  wreg;
  addr_t  pc_plus2, pc_branch, pc_next;

  assign i = instr_t'(instr);

  control_unit u_ctrl (.opcode(i.op), .ctrl(ctrl));
  alu_control  u_aluc (.opcode(i.op), .aluop(aluop));

  assign wreg  = ctrl.reg_dst    ? i.rt      : i.rd;
  assign imm   = sext4(i.rd);
  assign alu_b = ctrl.alu_src    ? imm       : rd2;
  assign wdata = ctrl.mem_to_reg ? mem_rdata : alu_result;

  reg_file #(.WRITE_THROUGH(1'b0)) u_rf (
    .clk, .rst,
    .raddr1(i.rs), .raddr2(i.rt), .rdata1(rd1), .rdata2(rd2),
    .we(ctrl.reg_write), .waddr(wreg), .wdata(wdata)
  );

  alu u_alu (.a(rd1), .b(alu_b), .op(aluop), .result(alu_result), .zero(zero));

  data_mem u_dmem (
    .clk, .addr(addr_t'(alu_result)), .wdata(rd2),
    .rd_n(ctrl.mem_rd_n), .wr_n(ctrl.mem_wr_n), .rdata(mem_rdata)
  );

  // Next PC: PC + 2, the branch target when BEQ finds its operands equal,
  // or the jump target.
  always_comb begin
    pc_plus2  = pc + addr_t'(2);
    pc_branch = (ctrl.branch && zero) ? pc_plus2 + addr_t'(imm << 1) : pc_plus2;
    pc_next   = ctrl.jump ? addr_t'({instr[11:0], 1'b0}) : pc_branch;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

endmodule
