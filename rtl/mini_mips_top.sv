// Mini-MIPS lab machines, single-cycle and pipelined, side by side.
//
// Each machine is a CPU plus its own instruction memory, as in the two lab
// circuits. They share the clock and the reset but nothing else. A program
// is loaded into a machine's instruction memory through its *_load_*
// port (one word per clock while *_load_we is high); the machine is then
// reset and clocked. While loading, the CPU keeps fetching from whatever
// address its PC holds, so hold the reset high during loading if the
// instructions fetched in the meantime must not run.
//
// Single-cycle outputs: sc_pc and sc_instr (PC and Instruction displays),
// sc_rd1, sc_rd2, sc_alu and sc_zero (Read Data 1/2, ALU result, Zero).
// Pipelined outputs: the per-stage displays of the pipeline circuit, see
// pl_cpu. Reset is asynchronous and active high. PL_HAZARD_UNITS selects
// the pipelined machine's optional forwarding and stall logic.
module mini_mips_top
  import mini_mips_pkg::*;
#(
  // 1 adds forwarding and load-use stalls to the pipelined machine; the lab
  // machine (default 0) has neither.
  parameter bit PL_HAZARD_UNITS = 1'b0
) (
  input  logic  clk,
  input  logic  rst,

  // single-cycle machine
  input  logic  sc_load_we,
  input  addr_t sc_load_addr,
  input  word_t sc_load_data,
  output addr_t sc_pc,
  output word_t sc_instr,
  output word_t sc_rd1,
  output word_t sc_rd2,
  output word_t sc_alu,
  output logic  sc_zero,

  // pipelined machine
  input  logic  pl_load_we,
  input  addr_t pl_load_addr,
  input  word_t pl_load_data,
  output addr_t pl_pc,
  output word_t pl_instr,
  output word_t pl_id_rdata1,
  output word_t pl_id_rdata2,
  output word_t pl_ex_alu,
  output addr_t pl_mem_addr,
  output word_t pl_mem_din,
  output word_t pl_mem_dout,
  output logic  pl_mem_we,
  output logic  pl_mem_oe_n,
  output logic  pl_wb_reg_write,
  output ridx_t pl_wb_wreg,
  output word_t pl_wb_wdata
);

  instr_mem u_sc_imem (
    .clk, .addr(sc_pc), .instr(sc_instr),
    .load_we(sc_load_we), .load_addr(sc_load_addr), .load_data(sc_load_data)
  );

  sc_cpu u_sc_cpu (
    .clk, .rst, .pc(sc_pc), .instr(sc_instr),
    .rd1(sc_rd1), .rd2(sc_rd2), .alu_result(sc_alu), .zero(sc_zero)
  );

  instr_mem u_pl_imem (
    .clk, .addr(pl_pc), .instr(pl_instr),
    .load_we(pl_load_we), .load_addr(pl_load_addr), .load_data(pl_load_data)
  );

  pl_cpu #(.HAZARD_UNITS(PL_HAZARD_UNITS)) u_pl_cpu (
    .clk, .rst, .pc(pl_pc), .instr(pl_instr),
    .id_rdata1(pl_id_rdata1), .id_rdata2(pl_id_rdata2), .ex_alu(pl_ex_alu),
    .mem_addr(pl_mem_addr), .mem_din(pl_mem_din), .mem_dout(pl_mem_dout),
    .mem_we(pl_mem_we), .mem_oe_n(pl_mem_oe_n),
    .wb_reg_write(pl_wb_reg_write), .wb_wreg(pl_wb_wreg), .wb_wdata(pl_wb_wdata)
  );

endmodule
