// Forwarding unit for the pipelined Mini-MIPS CPU.
//
// Hands a result to the ALU as soon as it exists instead of waiting for the
// register file: for each ALU source register (rs and rt of the instruction
// in EX) it compares the destination of the instruction one ahead (in MEM,
// EX/MEM register) and two ahead (in WB, MEM/WB register). The nearer
// writer wins, since it holds the newer value. R0 is never forwarded, and
// only instructions that write a register count.
// Select codes: FWD_NONE = value read in ID, FWD_MEM = the EX/MEM ALU
// result, FWD_WB = the value being written back.
// The block follows the usual textbook forwarding unit that the lab
// machine's notes point to; the lab machine itself leaves it out.
// Purely combinational.
module forwarding_unit
  import mini_mips_pkg::*;
(
  input  ridx_t ex_rs,
  input  ridx_t ex_rt,
  input  logic  mem_reg_write,
  input  ridx_t mem_wreg,
  input  logic  wb_reg_write,
  input  ridx_t wb_wreg,
  output fwd_sel_t fwd_a,
  output fwd_sel_t fwd_b
);

  function automatic fwd_sel_t pick(input ridx_t src);
    if (mem_reg_write && mem_wreg != '0 && mem_wreg == src) return FWD_MEM;
    else if (wb_reg_write && wb_wreg != '0 && wb_wreg == src) return FWD_WB;
    else return FWD_NONE;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);

endmodule
