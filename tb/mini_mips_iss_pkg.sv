// Instruction-level reference model of the Mini-MIPS machine, for the
// testbenches. It executes one instruction per call from the architectural
// state (PC, sixteen registers, data memory) following the instruction-set
// rules, without any of the RTL's structure:
//   R-type  rd <- rs op rt        LW  rt <- mem[rs + sext(off)]
//   SW  mem[rs + sext(off)] <- rt BEQ pc <- pc + 2 + 2*sext(off) if rs == rt
//   JMP pc <- 2*target
// R0 reads as 0 and the reset state has R1 = 1. It also holds the example
// programs of the lab exercises as word lists.
package mini_mips_iss_pkg;

  typedef struct {
    int unsigned       pc;
    logic [15:0]       r   [16];
    logic [15:0]       mem [256];
  } arch_t;

  function automatic void iss_reset(ref arch_t s);
    s.pc = 0;
    foreach (s.r[i]) s.r[i] = (i == 1) ? 16'd1 : 16'd0;
  endfunction

  function automatic logic [15:0] sx(input logic [3:0] v);
    return v[3] ? (16'hFFF0 | 16'(v)) : 16'(v);
  endfunction

  function automatic void iss_step(ref arch_t s, input logic [15:0] ins);
    logic [3:0]  op, rs, rt, rd;
    logic [15:0] a, b, res;
    int unsigned next;
    {op, rs, rt, rd} = ins;
    a = s.r[rs];
    b = s.r[rt];
    next = (s.pc + 2) & 32'hFF;
    case (op)
      4'd0: if (rt != 0) s.r[rt] = s.mem[8'(a + sx(rd))];
      4'd1: s.mem[8'(a + sx(rd))] = b;
      4'd2: res = a + b;
      4'd3: res = a - b;
      4'd4: res = a & b;
      4'd5: res = a | b;
      4'd6: res = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      4'd7: if (a == b) next = (next + 2 * int'(sx(rd))) & 32'hFF;
      default: next = (2 * int'(ins[11:0])) & 32'hFF;
    endcase
    if (op >= 2 && op <= 6 && rd != 0) s.r[rd] = res;
    s.pc = next;
  endfunction

  // Exercise 3: counting loop, mem[n] <- n forever.
  localparam logic [15:0] PROG_LOOP [6] = '{
    16'h5002, 16'h5003, 16'h1220, 16'h0230, 16'h2122, 16'h8002};

  // Exercise 4: mem[4] <- mem[0] - mem[2], result shown at PC 0x14.
  // The BEQ at 0x16 is never taken (R2 = 2, R15 = 6); its 4-bit offset
  // field cannot hold the distance back to the loop label and is set to 7.
  // The final J END is a jump to itself at 0x18.
  localparam logic [15:0] PROG_SUB [13] = '{
    16'h2112, 16'h2223, 16'h2333, 16'h1030, 16'h1022, 16'h0050, 16'h0042,
    16'h3545, 16'h1054, 16'h00F4, 16'h5FFF, 16'h72F7, 16'h800C};

  // Exercise 5: the hazard-free pipeline test program, 0x00..0x1E, and a
  // JMP 0 at 0x26 (words 0x20..0x24 are left as 0).
  localparam logic [15:0] PROG_PIPE [20] = '{
    16'h1010, 16'h2112, 16'h6013, 16'h3104, 16'h2115, 16'h0060, 16'h2117,
    16'h6018, 16'h3109, 16'h211A, 16'h266B, 16'h7007, 16'h5333, 16'h5444,
    16'h5555, 16'h5666, 16'h0000, 16'h0000, 16'h0000, 16'h8000};

endpackage
