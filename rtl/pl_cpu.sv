// Five-stage pipelined Mini-MIPS CPU, without hazard handling.
//
// The single-cycle datapath is cut into five stages separated by the
// pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB:
//   IF  : the instruction is read at the PC and decoded by the control unit
//         right away; its control bits travel with it through IF/ID. A JMP
//         (opcode bit 15 set) redirects the PC from this stage, so no
//         instruction after a jump enters the pipeline.
//   ID  : registers rs and rt are read and the 4-bit offset sign-extended.
//   EX  : the ALU control unit turns the opcode into the ALU operation, the
//         ALU computes, the branch target PC + 2 + 2*offset is added and the
//         destination register (rt or rd) is chosen.
//   MEM : the data memory is accessed; a BEQ whose ALU subtraction gave zero
//         loads the branch target into the PC at the end of this stage.
//   WB  : the loaded word or the ALU result is written to the register file.
// One instruction enters per clock. Nothing stops or repairs hazards:
//   * an instruction reading a register written by one of the two
//     instructions before it gets the old value (the register file writes
//     through, so the third instruction after the writer already sees the
//     new value);
//   * the three instructions fetched after a taken BEQ are executed.
// A cleared pipeline register holds a no-op, so after reset the stages
// behind IF do nothing until the first instruction reaches them.
//
// With HAZARD_UNITS = 1 (not the lab machine's configuration, which is the
// default 0) a forwarding unit feeds the ALU with results still in MEM or
// WB, and a hazard detection unit holds the PC and IF/ID for one clock and
// sends a bubble into ID/EX when an instruction needs the register a load
// directly ahead of it is loading. The branch still resolves in MEM and the
// wrong-path instructions still execute. A taken branch overrides a stall.
//
// The stage split, the place of the control unit and of the branch and jump
// decisions, and the 2/3/2-bit control fields follow the lab's pipeline
// diagram. Giving a taken branch priority over a jump fetched in the same
// cycle is this design's choice.
//
// The outputs are the lab circuit's per-stage displays: PC and instruction
// (IF), read data 1 and 2 (ID), ALU result (EX), memory address, data in,
// data out, the write enable WE (high = writing) and the output enable OE
// (low = reading) (MEM), and RegWrite,
// write register and write data (WB). Reset is asynchronous, active high.
module pl_cpu
  import mini_mips_pkg::*;
#(
  parameter bit HAZARD_UNITS = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  output addr_t pc,
  input  word_t instr,
  output word_t id_rdata1,
  output word_t id_rdata2,
  output word_t ex_alu,
  output addr_t mem_addr,
  output word_t mem_din,
  output word_t mem_dout,
  output logic  mem_we,
  output logic  mem_oe_n,
  output logic  wb_reg_write,
  output ridx_t wb_wreg,
  output word_t wb_wdata
);

  if_id_t  if_d,  id_q;
  id_ex_t  id_d,  ex_q;
  ex_mem_t ex_d,  mem_q;
  mem_wb_t mem_d, wb_q;

  logic   stall;

  // ---------------- IF ----------------
  ctrl_t  ctrl;
  addr_t  pc_plus2, pc_next;
  logic   take_branch;
  control_unit u_ctrl (.opcode(instr[15:12]), .ctrl(ctrl));

  always_comb begin
    pc_plus2       = pc + addr_t'(2);
    if_d.ex        = '{reg_dst: ctrl.reg_dst, alu_src: ctrl.alu_src};
    if_d.m         = '{branch: ctrl.branch, mem_read: ~ctrl.mem_rd_n,
                       mem_write: ~ctrl.mem_wr_n};
    if_d.wb        = '{reg_write: ctrl.reg_write, mem_to_reg: ctrl.mem_to_reg};
    if_d.pc_plus2  = pc_plus2;
    if_d.instr     = instr;
  end

  assign take_branch = mem_q.m.branch & mem_q.zero;

  always_comb begin
    if (take_branch)    pc_next = mem_q.branch_target;
    else if (stall)     pc_next = pc;
    else if (ctrl.jump) pc_next = addr_t'({instr[11:0], 1'b0});
    else                pc_next = pc_plus2;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  pipe_reg #(.T(if_id_t)) u_if_id (.clk, .rst, .en(~stall), .d(if_d), .q(id_q));

  // ---------------- ID ----------------
  instr_t di;
  assign di = instr_t'(id_q.instr);

  reg_file #(.WRITE_THROUGH(1'b1)) u_rf (
    .clk, .rst,
    .raddr1(di.rs), .raddr2(di.rt), .rdata1(id_rdata1), .rdata2(id_rdata2),
    .we(wb_q.wb.reg_write), .waddr(wb_q.wreg), .wdata(wb_wdata)
  );

  logic stall_detected;

  hazard_detection_unit u_hdu (
    .ex_mem_read(ex_q.m.mem_read), .ex_rt(ex_q.rt),
    .id_rs(di.rs), .id_rt(di.rt), .stall(stall_detected)
  );

  assign stall = HAZARD_UNITS && stall_detected;

  always_comb begin
    // a stall turns the instruction entering EX into a bubble
    id_d.ex       = stall ? '0 : id_q.ex;
    id_d.m        = stall ? '0 : id_q.m;
    id_d.wb       = stall ? '0 : id_q.wb;
    id_d.pc_plus2 = id_q.pc_plus2;
    id_d.rdata1   = id_rdata1;
    id_d.rdata2   = id_rdata2;
    id_d.imm      = sext4(di.rd);
    id_d.rs       = di.rs;
    id_d.rt       = di.rt;
    id_d.rd       = di.rd;
    id_d.op       = di.op;
  end

  pipe_reg #(.T(id_ex_t)) u_id_ex (.clk, .rst, .en(1'b1), .d(id_d), .q(ex_q));

  // ---------------- EX ----------------
  aluop_t   aluop;
  word_t    alu_a, opnd_b, alu_b;
  logic     alu_zero;
  fwd_sel_t fwd_a, fwd_b;

  alu_control u_aluc (.opcode(ex_q.op), .aluop(aluop));

  forwarding_unit u_fwd (
    .ex_rs(ex_q.rs), .ex_rt(ex_q.rt),
    .mem_reg_write(mem_q.wb.reg_write), .mem_wreg(mem_q.wreg),
    .wb_reg_write(wb_q.wb.reg_write), .wb_wreg(wb_q.wreg),
    .fwd_a, .fwd_b
  );

  function automatic word_t operand(input fwd_sel_t sel, input word_t from_id,
                                    input word_t from_mem, input word_t from_wb);
    if (!HAZARD_UNITS) return from_id;
    case (sel)
      FWD_MEM: return from_mem;
      FWD_WB:  return from_wb;
      default: return from_id;
    endcase
  endfunction

  assign alu_a  = operand(fwd_a, ex_q.rdata1, mem_q.alu_result, wb_wdata);
  assign opnd_b = operand(fwd_b, ex_q.rdata2, mem_q.alu_result, wb_wdata);
  assign alu_b  = ex_q.ex.alu_src ? ex_q.imm : opnd_b;

  alu u_alu (.a(alu_a), .b(alu_b), .op(aluop), .result(ex_alu), .zero(alu_zero));

  always_comb begin
    ex_d.m             = ex_q.m;
    ex_d.wb            = ex_q.wb;
    ex_d.branch_target = ex_q.pc_plus2 + addr_t'(ex_q.imm << 1);
    ex_d.zero          = alu_zero;
    ex_d.alu_result    = ex_alu;
    ex_d.rdata2        = opnd_b;
    ex_d.wreg          = ex_q.ex.reg_dst ? ex_q.rt : ex_q.rd;
  end

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (.clk, .rst, .en(1'b1), .d(ex_d), .q(mem_q));

  // ---------------- MEM ----------------
  assign mem_addr = addr_t'(mem_q.alu_result);
  assign mem_din  = mem_q.rdata2;
  assign mem_we   = mem_q.m.mem_write;
  assign mem_oe_n = ~mem_q.m.mem_read;

  data_mem u_dmem (
    .clk, .addr(mem_addr), .wdata(mem_din),
    .rd_n(mem_oe_n), .wr_n(~mem_we), .rdata(mem_dout)
  );

  always_comb begin
    mem_d.wb         = mem_q.wb;
    mem_d.mem_rdata  = mem_dout;
    mem_d.alu_result = mem_q.alu_result;
    mem_d.wreg       = mem_q.wreg;
  end

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (.clk, .rst, .en(1'b1), .d(mem_d), .q(wb_q));

  // ---------------- WB ----------------
  assign wb_reg_write = wb_q.wb.reg_write;
  assign wb_wreg      = wb_q.wreg;
  assign wb_wdata     = wb_q.wb.mem_to_reg ? wb_q.mem_rdata : wb_q.alu_result;

endmodule
