// Test of the data memory: random reads and writes with the active-low
// enables against a reference array. A write lands at the clock edge only
// when wr_n is low; rdata shows the addressed word only when rd_n is low and
// is 0 otherwise.
module tb_data_mem;
  import mini_mips_pkg::*;

  logic  clk = 0, rd_n = 1, wr_n = 1;
  addr_t addr = 0;
  word_t wdata = 0, rdata;
  word_t ref_mem [2**ADDR_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem dut (.clk, .addr, .wdata, .rd_n, .wr_n, .rdata);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that nothing unknown is read
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk);
      wr_n = 0; addr = addr_t'(a); wdata = word_t'($urandom);
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_n = 1'($urandom); rd_n = 1'($urandom);
      addr = addr_t'($urandom % 16);
      wdata = word_t'($urandom);
      #1;
      checks++;
      if (rdata !== (rd_n ? 16'd0 : ref_mem[addr])) begin
        failures++;
        $display("addr %h rd_n %b: %h, expected %h", addr, rd_n, rdata, ref_mem[addr]);
      end
      @(posedge clk);
      if (!wr_n) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
