// Load-use hazard detection unit for the pipelined Mini-MIPS CPU.
//
// A loaded word exists only at the end of the MEM stage, too late to be
// forwarded to an ALU operation that directly follows the load. When the
// instruction in EX is a load (its MemRead bit is set) and its destination
// (rt) is one of the registers the instruction in ID reads (rs or rt), this
// unit raises stall for that cycle. The pipeline then holds the PC and the
// IF/ID register and puts a bubble (all control bits 0) into ID/EX; one
// cycle later the load is in WB and the forwarding unit supplies its value.
// Loads into R0 never stall. The block follows the usual textbook hazard
// detection unit that the lab machine's notes point to; the lab machine
// itself leaves it out. Purely combinational.
module hazard_detection_unit
  import mini_mips_pkg::*;
(
  input  logic  ex_mem_read,
  input  ridx_t ex_rt,
  input  ridx_t id_rs,
  input  ridx_t id_rt,
  output logic  stall
);

  assign stall = ex_mem_read && ex_rt != '0 && (ex_rt == id_rs || ex_rt == id_rt);

endmodule
