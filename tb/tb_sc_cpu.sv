// Test of the single-cycle CPU with the lab's three example programs.
//
// Each program is loaded into an instruction memory while reset is held,
// then run. Before every clock edge the CPU's PC, Read Data 1, Read Data 2
// and ALU result are compared with the instruction-level reference model;
// since every instruction reads two registers this also checks the
// register contents as the program goes. On top of that the values the lab
// text gives are checked directly: the displays just after reset, the
// counting loop's register values, the 6 shown at PC 0x14 by the
// subtraction program, and the ALU column of the pipeline test program,
// whose BEQ is taken and must land on the JMP at 0x26.
// One instruction completes per clock, which the PC sequence checks.
module tb_sc_cpu;
  import mini_mips_pkg::*;
  import mini_mips_iss_pkg::*;

  logic  clk = 0, rst = 1;
  logic  load_we = 0;
  addr_t load_addr = 0;
  word_t load_data = 0;
  addr_t pc;
  word_t instr, rd1, rd2, alu_result;
  logic  zero;
  arch_t s;
  int checks = 0, failures = 0;
  int branches_taken = 0;

  always #5 clk = ~clk;

  instr_mem u_imem (.clk, .addr(pc), .instr, .load_we, .load_addr, .load_data);
  sc_cpu dut (.clk, .rst, .pc, .instr, .rd1, .rd2, .alu_result, .zero);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %h, expected %h", $time, what, got, exp);
    end
  endtask

  task automatic load(input logic [15:0] prog [], input int n);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = addr_t'(a);
      load_data = (a % 2 == 0 && a / 2 < n) ? prog[a / 2] : 16'h0000;
    end
    @(negedge clk);
    load_we = 0;
    rst = 0;
    iss_reset(s);
  endtask

  function automatic logic [15:0] ref_alu(logic [15:0] ins);
    logic [15:0] a, b;
    a = s.r[ins[11:8]];
    b = s.r[ins[7:4]];
    case (ins[15:12])
      4'd0, 4'd1: return a + sx(ins[3:0]);
      4'd2: return a + b;
      4'd3, 4'd7: return a - b;
      4'd4: return a & b;
      4'd5: return a | b;
      4'd6: return ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      default: return alu_result;   // JMP: don't care
    endcase
  endfunction

  // Compare the outputs with the reference model, then clock once.
  task automatic step();
    logic [15:0] ins;
    int unsigned pc_before;
    ins = instr;
    expect_eq("PC", int'(pc), int'(s.pc));
    expect_eq("Read Data 1", int'(rd1), int'(s.r[instr[11:8]]));
    expect_eq("Read Data 2", int'(rd2), int'(s.r[instr[7:4]]));
    expect_eq("ALU result", int'(alu_result), int'(ref_alu(instr)));
    pc_before = s.pc;
    iss_step(s, ins);
    if (instr[15:12] == 4'd7 && s.pc != ((pc_before + 2) & 32'hFF)) branches_taken++;
    @(posedge clk);
    @(negedge clk);
  endtask

  localparam logic [15:0] PIPE_ALU [12] = '{
    16'd0, 16'd2, 16'd1, 16'd1, 16'd2, 16'd0, 16'd2, 16'd1, 16'd1, 16'd2, 16'd2, 16'd0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- Exercise 3: counting loop
    load(PROG_LOOP, 6);
    #1;
    expect_eq("reset PC", int'(pc), 0);
    expect_eq("first instruction", int'(instr), 16'h5002);
    expect_eq("reset Read Data 1", int'(rd1), 0);
    expect_eq("reset Read Data 2", int'(rd2), 0);
    expect_eq("reset ALU result", int'(alu_result), 0);
    step();
    expect_eq("PC after first clock", int'(pc), 2);
    expect_eq("second instruction", int'(instr), 16'h5003);
    step();
    expect_eq("PC after second clock", int'(pc), 4);
    for (int n = 0; n < 6; n++) begin
      expect_eq("loop start PC", int'(pc), 4);
      expect_eq("R2 at loop start", int'(rd1), n);          // SW R2 R2 0 reads R2
      step();                                                // SW
      step();                                                // LW R2 R3 0
      step();                                                // ADD R1 R2 R2
      expect_eq("JUMP at 0xA", int'(pc), 16'hA);
      step();                                                // JUMP 002
    end
    expect_eq("R3 after six passes", int'(s.r[3]), 5);

    // ---- Exercise 4: subtraction through memory
    load(PROG_SUB, 13);
    for (int k = 0; k < 40 && pc != 8'h14; k++) step();
    expect_eq("ALU result at PC 0x14", int'(alu_result), 6);
    expect_eq("R15 at PC 0x14", int'(rd1), 6);
    for (int k = 0; k < 5; k++) step();
    expect_eq("program parked on J END", int'(pc), 16'h18);

    // ---- Exercise 5 program on the single-cycle machine
    load(PROG_PIPE, 20);
    for (int k = 0; k < 12; k++) begin
      expect_eq($sformatf("ALU column at %h", pc), int'(alu_result), int'(PIPE_ALU[k]));
      step();
    end
    expect_eq("BEQ R0 R0 7 lands on JMP", int'(pc), 16'h26);
    step();
    expect_eq("JMP 0", int'(pc), 0);
    for (int k = 0; k < 30; k++) step();
    checks++;
    if (branches_taken == 0) begin failures++; $display("no branch was taken"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
