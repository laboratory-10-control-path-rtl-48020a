// Test of the pipeline register with one of the machine's stage structs:
// q must be 0 after reset, must follow d with one clock of delay while en
// is high, and must hold its value through clock edges while en is low.
module tb_pipe_reg;
  import mini_mips_pkg::*;

  logic    clk = 0, rst = 1, en = 1;
  mem_wb_t d = '0, q, held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipe_reg #(.T(mem_wb_t)) dut (.clk, .rst, .en, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = mem_wb_t'({$urandom, $urandom});
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("not cleared by reset"); end
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      held = q;
      en = ($urandom % 4 != 0);
      d = mem_wb_t'({$urandom, $urandom});
      #1;
      checks++;
      if (q !== held) begin failures++; $display("q changed without a clock edge"); end
      @(posedge clk); #1;
      checks++;
      if (q !== (en ? d : held)) begin
        failures++;
        $display("en %b: q %h, expected %h", en, q, en ? d : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
