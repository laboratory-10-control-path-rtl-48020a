// Test of the register file. Two instances share the stimulus: one plain
// (WRITE_THROUGH = 0) and one that returns a value being written to a
// same-cycle read (WRITE_THROUGH = 1). Checked: the reset values (R1 = 1,
// the rest 0), R0 staying 0, random writes and reads on both ports against
// a reference array, and the same-cycle read behaviour of each instance.
module tb_reg_file;
  import mini_mips_pkg::*;

  logic  clk = 0, rst = 1, we = 0;
  ridx_t ra1 = 0, ra2 = 0, wa = 0;
  word_t wd = 0;
  word_t p_rd1, p_rd2, t_rd1, t_rd2;
  word_t ref_regs [NREGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_file #(.WRITE_THROUGH(1'b0)) dut_plain (
    .clk, .rst, .raddr1(ra1), .raddr2(ra2), .rdata1(p_rd1), .rdata2(p_rd2),
    .we, .waddr(wa), .wdata(wd));
  reg_file #(.WRITE_THROUGH(1'b1)) dut_wt (
    .clk, .rst, .raddr1(ra1), .raddr2(ra2), .rdata1(t_rd1), .rdata2(t_rd2),
    .we, .waddr(wa), .wdata(wd));

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NREGS; r++) ref_regs[r] = (r == 1) ? 16'd1 : 16'd0;
    #12 rst = 0;
    // reset values
    for (int r = 0; r < NREGS; r++) begin
      ra1 = ridx_t'(r); ra2 = ridx_t'(r); #1;
      expect_eq($sformatf("reset R%0d port1", r), p_rd1, ref_regs[r]);
      expect_eq($sformatf("reset R%0d port2", r), t_rd2, ref_regs[r]);
    end
    // random writes, reads checked before each edge
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = ridx_t'($urandom);
      wd = word_t'($urandom);
      ra1 = ridx_t'($urandom);
      ra2 = ($urandom % 3 == 0) ? wa : ridx_t'($urandom);
      #1;
      expect_eq("plain port1", p_rd1, ref_regs[ra1]);
      expect_eq("plain port2", p_rd2, ref_regs[ra2]);
      expect_eq("write-through port1", t_rd1,
                (we && wa == ra1 && ra1 != 0) ? wd : ref_regs[ra1]);
      expect_eq("write-through port2", t_rd2,
                (we && wa == ra2 && ra2 != 0) ? wd : ref_regs[ra2]);
      @(posedge clk);
      if (we && wa != 0) ref_regs[wa] = wd;
    end
    // asynchronous reset restores the reset values
    @(negedge clk); we = 0; rst = 1; #1; rst = 0;
    ra1 = 1; ra2 = 2; #1;
    expect_eq("after reset R1", p_rd1, 16'd1);
    expect_eq("after reset R2", t_rd2, 16'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
