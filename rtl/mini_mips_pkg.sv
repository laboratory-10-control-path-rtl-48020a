// Shared definitions of the Mini-MIPS lab machine.
//
// The machine has 16-bit instructions and 16-bit data. Every instruction has
// the same four 4-bit fields: opcode [15:12], rs [11:8], rt [7:4] and
// rd/offset [3:0]; a jump uses [11:0] as its target in instructions. The
// opcode numbers, the ALU operation codes and the control-line meanings come
// from the machine's truth tables. The 8-bit address width of both memories
// and of the PC follows the A7..A0 buses of the lab circuit; the reset
// contents of the register file (R1 = 1, all others 0) is this design's
// choice, made so that the lab's example programs produce their listed
// results.
package mini_mips_pkg;

  localparam int unsigned XLEN    = 16;  // data and instruction width
  localparam int unsigned NREGS   = 16;  // R0..R15
  localparam int unsigned RIDX_W  = 4;   // register index width
  localparam int unsigned ADDR_W  = 8;   // PC and memory address width

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [3:0] {
    OP_LW  = 4'd0,
    OP_SW  = 4'd1,
    OP_ADD = 4'd2,
    OP_SUB = 4'd3,
    OP_AND = 4'd4,
    OP_OR  = 4'd5,
    OP_SLT = 4'd6,
    OP_BEQ = 4'd7,
    OP_JMP = 4'd8
  } opcode_t;

  // ALUop codes as seen by the ALU.
  typedef enum logic [3:0] {
    ALU_AND = 4'd0,
    ALU_OR  = 4'd1,
    ALU_ADD = 4'd2,
    ALU_SUB = 4'd6,
    ALU_SLT = 4'd7
  } aluop_t;

  typedef struct packed {
    logic [3:0] op;
    ridx_t      rs;
    ridx_t      rt;
    ridx_t      rd;   // rd, or the 4-bit signed offset of LW/SW/BEQ
  } instr_t;

  // Control lines as listed in the control table. mem_rd_n and mem_wr_n are
  // active low, as the table gives them (a load has MemRd = 0, a store
  // MemWr = 0). reg_dst = 1 selects rt as the destination, 0 selects rd.
  typedef struct packed {
    logic reg_dst;
    logic reg_write;
    logic alu_src;
    logic mem_rd_n;
    logic mem_wr_n;
    logic mem_to_reg;
    logic branch;
    logic jump;
  } ctrl_t;

  // Control fields carried by the pipeline registers, grouped by the stage
  // that uses them (2, 3 and 2 bits wide). Unlike the control table, the
  // memory enables are active high here, so that an all-zero field is a
  // no-op that neither reads nor writes memory nor writes a register.
  typedef struct packed {
    logic reg_dst;
    logic alu_src;
  } ex_ctrl_t;

  typedef struct packed {
    logic branch;
    logic mem_read;
    logic mem_write;
  } m_ctrl_t;

  typedef struct packed {
    logic reg_write;
    logic mem_to_reg;
  } wb_ctrl_t;

  typedef struct packed {
    ex_ctrl_t ex;
    m_ctrl_t  m;
    wb_ctrl_t wb;
    addr_t    pc_plus2;
    word_t    instr;
  } if_id_t;

  typedef struct packed {
    ex_ctrl_t   ex;
    m_ctrl_t    m;
    wb_ctrl_t   wb;
    addr_t      pc_plus2;
    word_t      rdata1;
    word_t      rdata2;
    word_t      imm;
    ridx_t      rs;
    ridx_t      rt;
    ridx_t      rd;
    logic [3:0] op;
  } id_ex_t;

  typedef struct packed {
    m_ctrl_t  m;
    wb_ctrl_t wb;
    addr_t    branch_target;
    logic     zero;
    word_t    alu_result;
    word_t    rdata2;
    ridx_t    wreg;
  } ex_mem_t;

  typedef struct packed {
    wb_ctrl_t wb;
    word_t    mem_rdata;
    word_t    alu_result;
    ridx_t    wreg;
  } mem_wb_t;

  // Source of an ALU operand when forwarding is enabled.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,   // value read from the register file in ID
    FWD_MEM  = 2'd1,   // ALU result of the instruction in MEM
    FWD_WB   = 2'd2    // value being written back by the instruction in WB
  } fwd_sel_t;

  // Sign-extend the 4-bit offset field to a data word.
  function automatic word_t sext4(input ridx_t off);
    return word_t'({{(XLEN-RIDX_W){off[RIDX_W-1]}}, off});
  endfunction

  // Build an instruction word (used by testbenches and for readability).
  function automatic word_t mk_instr(input logic [3:0] op, input ridx_t rs,
                                     input ridx_t rt, input ridx_t rd);
    return {op, rs, rt, rd};
  endfunction

endpackage
