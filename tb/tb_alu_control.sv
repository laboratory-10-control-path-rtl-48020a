// Exhaustive test of the ALU control unit against the machine's truth
// table: opcodes 0..7 must give ALUop 2,2,2,6,0,1,7,6. Purely combinational,
// so each opcode is applied and checked after a short delay.
module tb_alu_control;
  import mini_mips_pkg::*;

  logic [3:0] opcode;
  aluop_t     aluop;
  int checks = 0, failures = 0;

  alu_control dut (.opcode, .aluop);

  localparam logic [3:0] EXPECTED [8] = '{4'd2, 4'd2, 4'd2, 4'd6, 4'd0, 4'd1, 4'd7, 4'd6};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 8; op++) begin
      opcode = 4'(op);
      #1;
      checks++;
      if (4'(aluop) !== EXPECTED[op]) begin
        failures++;
        $display("opcode %0d: ALUop %0d, expected %0d", op, aluop, EXPECTED[op]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
