// Data memory of the Mini-MIPS lab machine: 2**ADDR_W 16-bit words.
//
// The address is the low 8 bits of the ALU result and selects a whole
// 16-bit word (a store to address 1 and one to address 2 hit different
// words, as in the lab's counting loop). Both enables are active low, as the
// control table gives MemRd and MemWr. With rd_n low the addressed word
// appears combinationally on rdata, otherwise rdata is 0 (in the lab circuit
// the output is simply not driven). With wr_n low, wdata is written on the
// rising clock edge. The memory is not cleared by reset.
module data_mem
  import mini_mips_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** ADDR_W
) (
  input  logic  clk,
  input  addr_t addr,
  input  word_t wdata,
  input  logic  rd_n,
  input  logic  wr_n,
  output word_t rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!wr_n) mem[addr] <= wdata;
  end

  assign rdata = rd_n ? '0 : mem[addr];

endmodule
