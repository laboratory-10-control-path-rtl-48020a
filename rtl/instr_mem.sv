// Instruction memory of the Mini-MIPS lab machine: 2**ADDR_W 16-bit words,
// one per byte address.
//
// The CPU reads it combinationally at the PC. The PC steps by 2, so programs
// occupy the even addresses, and the full 8-bit address selects the word,
// as the memory's A7..A0 inputs in the lab circuit do. A program is loaded
// through a separate write port: when load_we is high the word load_data is
// written at load_addr on the rising clock edge. In the lab the same job is
// done by the LOAD, WR, address and data switches with the CPU's address
// bus unplugged; the separate synchronous port is this design's version of
// that. The memory is not cleared by reset.
module instr_mem
  import mini_mips_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** ADDR_W
) (
  input  logic  clk,
  input  addr_t addr,
  output word_t instr,
  input  logic  load_we,
  input  addr_t load_addr,
  input  word_t load_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr];

endmodule
