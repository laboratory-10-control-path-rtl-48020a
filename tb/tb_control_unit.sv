// Test of the main control unit against the machine's control table
// (RegDst, RegWr, ALUSrc, MemRd, MemWr, MemtoReg for LW..JMP, memory enables
// active low), plus Branch for BEQ only and Jump for opcode bit 3.
module tb_control_unit;
  import mini_mips_pkg::*;

  logic [3:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  // RegDst RegWr ALUSrc MemRd MemWr MemtoReg, one row per opcode 0..8
  localparam logic [5:0] TABLE [9] = '{
    6'b111_011,   // LW
    6'b101_100,   // SW
    6'b010_110,   // ADD
    6'b010_110,   // SUB
    6'b010_110,   // AND
    6'b010_110,   // OR
    6'b010_110,   // SLT
    6'b000_110,   // BEQ
    6'b000_110    // JMP
  };

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 9; op++) begin
      logic [5:0] got;
      opcode = 4'(op);
      #1;
      got = {ctrl.reg_dst, ctrl.reg_write, ctrl.alu_src,
             ctrl.mem_rd_n, ctrl.mem_wr_n, ctrl.mem_to_reg};
      checks++;
      if (got !== TABLE[op]) begin
        failures++;
        $display("opcode %0d: lines %b, expected %b", op, got, TABLE[op]);
      end
      checks++;
      if (ctrl.branch !== (op == 7) || ctrl.jump !== (op == 8)) begin
        failures++;
        $display("opcode %0d: branch %b jump %b", op, ctrl.branch, ctrl.jump);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
