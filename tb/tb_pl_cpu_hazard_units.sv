// Test of the pipelined CPU with its optional forwarding and load-use stall
// logic (HAZARD_UNITS = 1).
//
// 1. The lab's two hazard variants now give the correct results: R3 = 1,
//    R4 = 2, R5 = 3 for the ALU hazard, R7 = 2, R8 = 0, R9 = 1 for the
//    load-use hazard, and the load-use case costs exactly one extra clock.
// 2. Random programs full of back-to-back dependences (ALU operations on
//    R1..R5, loads and stores at data words 0..7) run to a final JMP to
//    itself; the sequence of register writes leaving WB must equal the one
//    the reference model produces.
// Forwarding from MEM, forwarding from WB and stalls are counted and must
// all have happened.
module tb_pl_cpu_hazard_units;
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
  int n_stall = 0, n_fwd_mem = 0, n_fwd_wb = 0;

  always #5 clk = ~clk;

  instr_mem u_imem (.clk, .addr(pc), .instr, .load_we, .load_addr, .load_data);
  pl_cpu #(.HAZARD_UNITS(1'b1)) dut (
    .clk, .rst, .pc, .instr, .id_rdata1, .id_rdata2, .ex_alu,
    .mem_addr, .mem_din, .mem_dout, .mem_we, .mem_oe_n,
    .wb_reg_write, .wb_wreg, .wb_wdata);

  // mechanism counters, read from the pipeline's hazard logic
  always @(posedge clk) if (!rst) begin
    if (dut.stall) n_stall++;
    if (dut.fwd_a == FWD_MEM || dut.fwd_b == FWD_MEM) n_fwd_mem++;
    if (dut.fwd_a == FWD_WB  || dut.fwd_b == FWD_WB)  n_fwd_wb++;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %h, expected %h", $time, what, got, exp);
    end
  endtask

  logic [15:0] prog [128];

  task automatic load(input int n);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = addr_t'(a);
      load_data = (a % 2 == 0 && a / 2 < n) ? prog[a / 2] : 16'h0000;
    end
    @(negedge clk);
    load_we = 0;
    rst = 0;
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  // Run until WB has produced `count` register writes to R1..R15 and
  // collect them.
  task automatic collect(input int count, input int max_clocks,
                         output int regs [$], output int vals [$]);
    regs = {}; vals = {};
    for (int c = 0; c < max_clocks && regs.size() < count; c++) begin
      if (wb_reg_write && wb_wreg != 0) begin
        regs.push_back(int'(wb_wreg));
        vals.push_back(int'(wb_wdata));
      end
      tick();
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int regs [$], vals [$];
    arch_t s;

    // ---------------- 1a. ALU data hazard, now forwarded
    foreach (prog[i]) prog[i] = 16'h0000;
    for (int i = 0; i < 20; i++) prog[i] = PROG_PIPE[i];
    prog[2] = 16'h6023; prog[3] = 16'h3204; prog[4] = 16'h2125;
    load(20);
    collect(4, 40, regs, vals);
    expect_eq("R2", regs[0], 2);  expect_eq("R2 value", vals[0], 2);
    expect_eq("R3", regs[1], 3);  expect_eq("R3 value, forwarded", vals[1], 1);
    expect_eq("R4", regs[2], 4);  expect_eq("R4 value, forwarded", vals[2], 2);
    expect_eq("R5", regs[3], 5);  expect_eq("R5 value", vals[3], 3);

    // ---------------- 1b. load-use hazard, now stalled and forwarded
    for (int i = 0; i < 20; i++) prog[i] = PROG_PIPE[i];
    prog[6] = 16'h2167; prog[7] = 16'h6618; prog[8] = 16'h3609;
    load(20);
    begin
      int clocks;
      clocks = 0;
      while (!(wb_reg_write && wb_wreg == 7) && clocks < 40) begin tick(); clocks++; end
      // without the stall R7 would be written 10 clocks after reset
      expect_eq("R7 written one clock late", clocks, 11);
    end
    collect(3, 40, regs, vals);
    expect_eq("R7", regs[0], 7);  expect_eq("R7 value", vals[0], 2);
    expect_eq("R8", regs[1], 8);  expect_eq("R8 value", vals[1], 0);
    expect_eq("R9", regs[2], 9);  expect_eq("R9 value", vals[2], 1);

    // ---------------- 2. random dependent programs
    for (int t = 0; t < 20; t++) begin
      int n, nwrites;
      int exp_regs [$], exp_vals [$];
      n = 0;
      exp_regs = {}; exp_vals = {};
      // fill data words 0..7 from R1 so that no load reads an unset word
      for (int k = 0; k < 8; k++) prog[n++] = mk_instr(4'd1, 4'd0, 4'd1, ridx_t'(k));
      for (int k = 0; k < 60; k++) begin
        int kind;
        ridx_t a, b, d;
        kind = $urandom % 8;
        a = ridx_t'(1 + $urandom % 5); b = ridx_t'(1 + $urandom % 5); d = ridx_t'(1 + $urandom % 5);
        case (kind)
          0: prog[n++] = mk_instr(4'd0, 4'd0, d, ridx_t'($urandom % 8));   // LW R0 d off
          1: prog[n++] = mk_instr(4'd1, 4'd0, b, ridx_t'($urandom % 8));   // SW R0 b off
          default: prog[n++] = mk_instr(4'(2 + $urandom % 5), a, b, d);    // ALU op
        endcase
      end
      prog[n] = mk_instr(4'd8, 4'(n >> 7), 4'(n >> 3), 4'(n));          // JMP to itself
      n++;
      // reference run
      iss_reset(s);
      for (int k = 0; k < n - 1; k++) begin
        logic [15:0] ins;
        int dst;
        ins = prog[s.pc / 2];
        dst = (ins[15:12] == 0) ? int'(ins[7:4]) :
              (ins[15:12] >= 2 && ins[15:12] <= 6) ? int'(ins[3:0]) : 0;
        iss_step(s, ins);
        if (dst != 0) begin exp_regs.push_back(dst); exp_vals.push_back(int'(s.r[dst])); end
      end
      load(n);
      nwrites = exp_regs.size();
      collect(nwrites, 4 * n + 20, regs, vals);
      expect_eq("number of register writes", regs.size(), nwrites);
      for (int k = 0; k < nwrites && k < regs.size(); k++) begin
        expect_eq($sformatf("program %0d write %0d register", t, k), regs[k], exp_regs[k]);
        expect_eq($sformatf("program %0d write %0d value", t, k), vals[k], exp_vals[k]);
      end
    end

    $display("stalls %0d, forwards from MEM %0d, forwards from WB %0d", n_stall, n_fwd_mem, n_fwd_wb);
    checks += 3;
    if (n_stall == 0)   begin failures++; $display("no stall happened"); end
    if (n_fwd_mem == 0) begin failures++; $display("no forward from MEM happened"); end
    if (n_fwd_wb == 0)  begin failures++; $display("no forward from WB happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
