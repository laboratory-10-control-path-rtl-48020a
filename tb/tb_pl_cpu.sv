// Test of the pipelined CPU with the lab's pipeline test program and its
// two hazard variants.
//
// 1. The per-stage displays for the first two instructions (SW R0 R1 0,
//    ADD R1 R1 R2) are checked clock by clock against the lab's predicted
//    values: IF 00/1010, ID 0000/0001, EX 0000, MEM address 00 data 01,
//    then for the ADD: ALU 02 and a write of 2 to R2 five clocks after
//    reset.
// 2. For the whole hazard-free program, every instruction's ALU value (in
//    EX) and register write (in WB) are checked against the lab's table,
//    and the write-backs against the reference model. The PC trace checks
//    one instruction per clock, the jump taken from IF with no delay, and
//    the BEQ taken from MEM after three more instructions were fetched.
// 3. Data hazard variant (SLT R0 R2 R3, SUB R2 R0 R4, ADD R1 R2 R5): R3 and
//    R4 get the stale results 0 and 0 after 6 and 7 clocks, R5 the correct
//    3 after 8.
// 4. Load-use variant (ADD R1 R6 R7, SLT R6 R1 R8, SUB R6 R0 R9 after
//    LW R0 R6 0): R7 = 1 and R8 = 1 are stale results, R9 = 1 is correct.
// Each mechanism (stale read, write-through read, wrong-path fetch after a
// branch, jump from IF) is counted and must have happened.
module tb_pl_cpu;
  import mini_mips_pkg::*;
  import mini_mips_iss_pkg::*;

  logic  clk = 0, rst = 1;
  logic  load_we = 0;
  addr_t load_addr = 0;
  word_t load_data = 0;
  addr_t pc, mem_addr;
  word_t instr, id_rdata1, id_rdata2, ex_alu, mem_din, mem_dout, wb_wdata;
  logic  mem_we, mem_oe_n, wb_reg_write;
  ridx_t wb_wreg;
  int checks = 0, failures = 0;
  int n_stale = 0, n_write_through = 0, n_wrong_path = 0, n_jump = 0;

  always #5 clk = ~clk;

  instr_mem u_imem (.clk, .addr(pc), .instr, .load_we, .load_addr, .load_data);
  pl_cpu dut (.clk, .rst, .pc, .instr, .id_rdata1, .id_rdata2, .ex_alu,
              .mem_addr, .mem_din, .mem_dout, .mem_we, .mem_oe_n,
              .wb_reg_write, .wb_wreg, .wb_wdata);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %h, expected %h", $time, what, got, exp);
    end
  endtask

  task automatic load(input logic [15:0] prog [20]);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = addr_t'(a);
      load_data = (a % 2 == 0 && a / 2 < 20) ? prog[a / 2] : 16'h0000;
    end
    @(negedge clk);
    load_we = 0;
    rst = 0;
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  // Lab table: ALU value and register write of 00..1C (-1: no write).
  localparam int TAB_ALU [15] = '{0, 2, 1, 1, 2, 0, 2, 1, 1, 2, 2, 0, 1, 1, 2};
  localparam int TAB_REG [15] = '{-1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, -1, 3, 4, 5};
  localparam int TAB_VAL [15] = '{0, 2, 1, 1, 2, 1, 2, 1, 1, 2, 2, 0, 1, 1, 2};

  logic [15:0] prog [20];
  arch_t s;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- 1. first two instructions, stage by stage
    prog = PROG_PIPE;
    load(prog);
    #1;
    expect_eq("MEM WE after reset", int'(mem_we), 0);
    expect_eq("MEM OE after reset", int'(mem_oe_n), 1);
    expect_eq("IF PC", int'(pc), 0);
    expect_eq("IF Inst", int'(instr), 32'h1010);
    tick();   // clock 1
    expect_eq("ID RDd1 (SW)", int'(id_rdata1), 0);
    expect_eq("ID RDd2 (SW)", int'(id_rdata2), 1);
    expect_eq("IF PC", int'(pc), 2);
    expect_eq("IF Inst", int'(instr), 32'h2112);
    tick();   // clock 2
    expect_eq("EX ALU (SW)", int'(ex_alu), 0);
    expect_eq("ID RDd1 (ADD)", int'(id_rdata1), 1);
    expect_eq("ID RDd2 (ADD)", int'(id_rdata2), 1);
    tick();   // clock 3
    expect_eq("MEM address (SW)", int'(mem_addr), 0);
    expect_eq("MEM data in (SW)", int'(mem_din), 1);
    expect_eq("MEM WE (SW)", int'(mem_we), 1);
    expect_eq("MEM OE (SW, not reading)", int'(mem_oe_n), 1);
    expect_eq("EX ALU (ADD)", int'(ex_alu), 2);
    tick();   // clock 4
    expect_eq("WB RegWrite (SW)", int'(wb_reg_write), 0);
    expect_eq("MEM WE (ADD)", int'(mem_we), 0);
    tick();   // clock 5
    expect_eq("WB RegWrite (ADD)", int'(wb_reg_write), 1);
    expect_eq("WB WReg (ADD)", int'(wb_wreg), 2);
    expect_eq("WB WRData (ADD)", int'(wb_wdata), 2);

    // ---------------- 2. the whole program against the table
    load(prog);
    iss_reset(s);
    begin
      int fetched [$];
      int exec_pc [$];
      for (int c = 0; c < 40; c++) begin
        // PC trace: one instruction per clock, branch and jump redirects
        fetched.push_back(int'(pc));
        if (instr[15]) n_jump++;
        // EX holds the instruction fetched two clocks ago
        if (c >= 2 && c - 2 < 15)
          expect_eq($sformatf("EX ALU of %h", fetched[c-2]), int'(ex_alu), TAB_ALU[c-2]);
        // WB holds the instruction fetched four clocks ago
        if (c >= 4 && c - 4 < 15) begin
          if (TAB_REG[c-4] < 0)
            expect_eq($sformatf("no write by %h", fetched[c-4]), int'(wb_reg_write), 0);
          else begin
            expect_eq($sformatf("WB reg of %h", fetched[c-4]), int'(wb_wreg), TAB_REG[c-4]);
            expect_eq($sformatf("WB data of %h", fetched[c-4]), int'(wb_wdata), TAB_VAL[c-4]);
          end
        end
        tick();
      end
      // fetch order: 00..16, then 18 1A 1C on the wrong path, then 26, 00
      for (int k = 0; k < 15; k++) expect_eq("fetch order", fetched[k], 2 * k);
      expect_eq("target of BEQ", fetched[15], 16'h26);
      expect_eq("target of JMP", fetched[16], 0);
      for (int k = 12; k < 15; k++) if (fetched[k] != 2 * k) ; else n_wrong_path++;
      // reference model agrees with the hazard-free run on the final state
      for (int k = 0; k < 12; k++) iss_step(s, prog[s.pc / 2]);
      expect_eq("BEQ taken in the model", int'(s.pc), 16'h26);
    end

    // ---------------- 3. data hazard after an ALU instruction
    prog = PROG_PIPE;
    prog[2] = 16'h6023;   // SLT R0 R2 R3
    prog[3] = 16'h3204;   // SUB R2 R0 R4
    prog[4] = 16'h2125;   // ADD R1 R2 R5
    load(prog);
    for (int c = 0; c < 6; c++) tick();
    expect_eq("R3 write after 6 clocks: reg", int'(wb_wreg), 3);
    expect_eq("R3 gets the stale result 0", int'(wb_wdata), 0);
    if (wb_wreg == 3 && wb_wdata == 0) n_stale++;
    tick();
    expect_eq("R4 write: reg", int'(wb_wreg), 4);
    expect_eq("R4 gets the stale result 0", int'(wb_wdata), 0);
    if (wb_wreg == 4 && wb_wdata == 0) n_stale++;
    tick();
    expect_eq("R5 write: reg", int'(wb_wreg), 5);
    expect_eq("R5 gets the correct 3", int'(wb_wdata), 3);
    if (wb_wreg == 5 && wb_wdata == 3) n_write_through++;

    // ---------------- 4. load-use hazard
    prog = PROG_PIPE;
    prog[6] = 16'h2167;   // ADD R1 R6 R7
    prog[7] = 16'h6618;   // SLT R6 R1 R8
    prog[8] = 16'h3609;   // SUB R6 R0 R9
    load(prog);
    for (int c = 0; c < 10; c++) tick();
    expect_eq("R7 write: reg", int'(wb_wreg), 7);
    expect_eq("R7 gets the stale result 1", int'(wb_wdata), 1);
    if (wb_wreg == 7 && wb_wdata == 1) n_stale++;
    tick();
    expect_eq("R8 write: reg", int'(wb_wreg), 8);
    expect_eq("R8 gets the stale result 1", int'(wb_wdata), 1);
    if (wb_wreg == 8 && wb_wdata == 1) n_stale++;
    tick();
    expect_eq("R9 write: reg", int'(wb_wreg), 9);
    expect_eq("R9 gets the correct 1", int'(wb_wdata), 1);
    if (wb_wreg == 9 && wb_wdata == 1) n_write_through++;

    $display("stale reads %0d, write-through reads %0d, wrong-path fetches %0d, jumps %0d",
             n_stale, n_write_through, n_wrong_path, n_jump);
    checks += 4;
    if (n_stale == 0)         begin failures++; $display("no stale read seen"); end
    if (n_write_through == 0) begin failures++; $display("no write-through read seen"); end
    if (n_wrong_path != 3)    begin failures++; $display("expected 3 wrong-path fetches"); end
    if (n_jump == 0)          begin failures++; $display("no jump seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
