// Register file of the Mini-MIPS lab machine: sixteen 16-bit registers
// R0..R15 with two combinational read ports and one write port.
//
// A write happens at the rising clock edge when we is high. R0 always reads
// as 0 and ignores writes. An asynchronous active-high reset loads R1 with
// R1_RESET (1 by default) and clears every other register; the lab's example
// programs rely on R1 = 1 and on cleared registers, while the reset values
// themselves are this design's choice.
//
// With WRITE_THROUGH = 1 a read of the register being written in the same
// cycle returns the new value. The pipelined machine needs this: an
// instruction three places after the one that writes a register reads the
// new value, as in the lab's hazard examples. The single-cycle machine uses
// WRITE_THROUGH = 0, since there the write data depends on the read data in
// the same cycle.
module reg_file
  import mini_mips_pkg::*;
#(
  parameter bit    WRITE_THROUGH = 1'b0,
  parameter word_t R1_RESET      = word_t'(1)
) (
  input  logic  clk,
  input  logic  rst,
  input  ridx_t raddr1,
  input  ridx_t raddr2,
  output word_t rdata1,
  output word_t rdata2,
  input  logic  we,
  input  ridx_t waddr,
  input  word_t wdata
);

  word_t regs [NREGS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= (i == 1) ? R1_RESET : '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic word_t read_port(input ridx_t a, input word_t stored,
                                      input logic w, input ridx_t wa,
                                      input word_t wd);
    if (a == '0)                               return '0;
    else if (WRITE_THROUGH && w && wa == a)    return wd;
    else                                       return stored;
  endfunction

  assign rdata1 = read_port(raddr1, regs[raddr1], we, waddr, wdata);
  assign rdata2 = read_port(raddr2, regs[raddr2], we, waddr, wdata);

endmodule
