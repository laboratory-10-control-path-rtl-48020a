// Test of the instruction memory: words are loaded through the load port,
// one per clock, then read back combinationally at every address and
// compared with what was loaded.
module tb_instr_mem;
  import mini_mips_pkg::*;

  logic  clk = 0, load_we = 0;
  addr_t addr = 0, load_addr = 0;
  word_t load_data = 0, instr;
  word_t ref_mem [2**ADDR_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_mem dut (.clk, .addr, .instr, .load_we, .load_addr, .load_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = addr_t'(a); load_data = word_t'($urandom);
      ref_mem[a] = load_data;
    end
    @(negedge clk);
    load_we = 0; load_data = 16'hDEAD;   // must not be written
    for (int a = 0; a < 2**ADDR_W; a++) begin
      addr = addr_t'(a); load_addr = addr_t'(a);
      @(negedge clk);
      checks++;
      if (instr !== ref_mem[a]) begin
        failures++;
        $display("address %h: %h, expected %h", a, instr, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
