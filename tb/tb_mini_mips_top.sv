// End-to-end test of both Mini-MIPS machines in the top level, at the
// default sizes (256-word memories, sixteen 16-bit registers).
//
// Programs go in through the two load ports while reset is held, then both
// machines run at the same time:
//   phase A: single-cycle runs the subtraction program (ALU shows 6 at PC
//            0x14), pipelined runs its hazard-free test program for five
//            passes through its JMP 0 loop;
//   phase B: single-cycle runs the pipeline test program (BEQ taken),
//            pipelined runs the data-hazard variant;
//   phase C: single-cycle runs the counting loop for 300 clocks.
// The single-cycle machine is compared every clock with the reference
// model (PC, read data, ALU result). The pipelined machine's register
// writes are compared with the lab's table, pass after pass, and its PC
// with the expected 16-clock pass (12 instructions, 3 wrong-path fetches
// after the taken BEQ, the JMP). Mechanisms counted, each must occur:
// program load, single-cycle branch taken, single-cycle jump, pipelined
// jump, pipelined branch with wrong-path fetches, pipelined stale read.
module tb_mini_mips_top;
  import mini_mips_pkg::*;
  import mini_mips_iss_pkg::*;

  logic  clk = 0, rst = 1;
  logic  sc_load_we = 0, pl_load_we = 0;
  addr_t sc_load_addr = 0, pl_load_addr = 0;
  word_t sc_load_data = 0, pl_load_data = 0;
  addr_t sc_pc, pl_pc, pl_mem_addr;
  word_t sc_instr, sc_rd1, sc_rd2, sc_alu;
  logic  sc_zero;
  word_t pl_instr, pl_id_rdata1, pl_id_rdata2, pl_ex_alu, pl_mem_din, pl_mem_dout, pl_wb_wdata;
  logic  pl_mem_we, pl_mem_oe_n, pl_wb_reg_write;
  ridx_t pl_wb_wreg;

  int checks = 0, failures = 0;
  int n_load = 0, n_sc_branch = 0, n_sc_jump = 0, n_pl_jump = 0, n_pl_wrong_path = 0,
      n_pl_stale = 0;
  arch_t s;

  always #5 clk = ~clk;

  mini_mips_top dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %h, expected %h", $time, what, got, exp);
    end
  endtask

  // Load both instruction memories (all 256 words) with reset held.
  task automatic load(input logic [15:0] sc_prog [], input int sc_n,
                      input logic [15:0] pl_prog [20]);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      sc_load_we = 1; sc_load_addr = addr_t'(a);
      pl_load_we = 1; pl_load_addr = addr_t'(a);
      sc_load_data = (a % 2 == 0 && a / 2 < sc_n) ? sc_prog[a / 2] : 16'h0000;
      pl_load_data = (a % 2 == 0 && a / 2 < 20) ? pl_prog[a / 2] : 16'h0000;
    end
    @(negedge clk);
    sc_load_we = 0; pl_load_we = 0;
    rst = 0;
    n_load++;
    iss_reset(s);
    #1;
    expect_eq("loaded first word, single-cycle", int'(sc_instr), int'(sc_prog[0]));
    expect_eq("loaded first word, pipelined", int'(pl_instr), int'(pl_prog[0]));
  endtask

  function automatic int ref_alu(logic [15:0] ins);
    logic [15:0] a, b;
    a = s.r[ins[11:8]];
    b = s.r[ins[7:4]];
    case (ins[15:12])
      4'd0, 4'd1: return int'(16'(a + sx(ins[3:0])));
      4'd2: return int'(16'(a + b));
      4'd3, 4'd7: return int'(16'(a - b));
      4'd4: return int'(a & b);
      4'd5: return int'(a | b);
      4'd6: return ($signed(a) < $signed(b)) ? 1 : 0;
      default: return int'(sc_alu);
    endcase
  endfunction

  // Check the single-cycle machine against the model, then clock both.
  task automatic tick();
    int unsigned pc_before;
    expect_eq("SC PC", int'(sc_pc), int'(s.pc));
    expect_eq("SC Read Data 1", int'(sc_rd1), int'(s.r[sc_instr[11:8]]));
    expect_eq("SC Read Data 2", int'(sc_rd2), int'(s.r[sc_instr[7:4]]));
    expect_eq("SC ALU result", int'(sc_alu), ref_alu(sc_instr));
    if (pl_instr[15]) n_pl_jump++;
    pc_before = s.pc;
    iss_step(s, sc_instr);
    if (sc_instr[15]) n_sc_jump++;
    if (sc_instr[15:12] == 4'd7 && s.pc != ((pc_before + 2) & 32'hFF)) n_sc_branch++;
    @(posedge clk);
    @(negedge clk);
  endtask

  // Register writes of one pass of the pipeline test program, in WB order.
  localparam int PASS_REG [16] = '{-1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, -1, 3, 4, 5, -1};
  localparam int PASS_VAL [16] = '{0, 2, 1, 1, 2, 1, 2, 1, 1, 2, 2, 0, 1, 1, 2, 0};
  localparam int PASS_PC  [16] = '{0, 2, 4, 6, 8, 10, 12, 14, 16, 18, 20, 22, 24, 26, 28, 38};

  logic [15:0] pl_prog [20];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- phase A
    load(PROG_SUB, 13, PROG_PIPE);
    for (int c = 0; c < 16 * 5; c++) begin
      int k;
      k = c % 16;
      expect_eq("PL PC", int'(pl_pc), PASS_PC[k]);
      if (k >= 12 && k <= 14) n_pl_wrong_path++;
      if (c >= 4) begin
        int w;
        w = (c - 4) % 16;
        if (PASS_REG[w] < 0)
          expect_eq("PL no write", int'(pl_wb_reg_write), 0);
        else begin
          expect_eq("PL RegWrite", int'(pl_wb_reg_write), 1);
          expect_eq("PL write register", int'(pl_wb_wreg), PASS_REG[w]);
          expect_eq("PL write data", int'(pl_wb_wdata), PASS_VAL[w]);
        end
      end
      if (sc_pc == 8'h14) expect_eq("SC ALU shows 6 at PC 0x14", int'(sc_alu), 6);
      tick();
    end
    expect_eq("SC parked on J END", int'(sc_pc), 16'h18);

    // ---------------- phase B
    pl_prog = PROG_PIPE;
    pl_prog[2] = 16'h6023;   // SLT R0 R2 R3
    pl_prog[3] = 16'h3204;   // SUB R2 R0 R4
    pl_prog[4] = 16'h2125;   // ADD R1 R2 R5
    load(PROG_PIPE, 20, pl_prog);
    for (int c = 0; c < 64; c++) begin
      if (c == 6 || c == 7) begin
        expect_eq("PL stale write register", int'(pl_wb_wreg), c - 3);
        expect_eq("PL stale write data", int'(pl_wb_wdata), 0);
        if (pl_wb_wdata == 0) n_pl_stale++;
      end
      if (c == 8) expect_eq("PL R5 correct", int'(pl_wb_wdata), 3);
      tick();
    end

    // ---------------- phase C
    load(PROG_LOOP, 6, PROG_PIPE);
    for (int c = 0; c < 300; c++) tick();
    expect_eq("SC counting loop reached", int'(s.r[2]), 74);   // 2 + 4*74 clocks

    $display("loads %0d, SC branches %0d, SC jumps %0d, PL jumps %0d, PL wrong-path %0d, PL stale %0d",
             n_load, n_sc_branch, n_sc_jump, n_pl_jump, n_pl_wrong_path, n_pl_stale);
    checks += 6;
    if (n_load == 0)          begin failures++; $display("no program load"); end
    if (n_sc_branch == 0)     begin failures++; $display("no single-cycle branch taken"); end
    if (n_sc_jump == 0)       begin failures++; $display("no single-cycle jump"); end
    if (n_pl_jump == 0)       begin failures++; $display("no pipelined jump"); end
    if (n_pl_wrong_path == 0) begin failures++; $display("no wrong-path fetch"); end
    if (n_pl_stale == 0)      begin failures++; $display("no stale read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
