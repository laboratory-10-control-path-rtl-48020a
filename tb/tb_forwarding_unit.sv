// Exhaustive-by-sampling test of the forwarding unit: random register
// numbers (drawn from a small range so that matches are frequent) and write
// enables, compared with the forwarding rule worked out here: the
// instruction in MEM wins over the one in WB, R0 is never forwarded, and
// an instruction that does not write a register is never a source.
module tb_forwarding_unit;
  import mini_mips_pkg::*;

  ridx_t ex_rs, ex_rt, mem_wreg, wb_wreg;
  logic  mem_reg_write, wb_reg_write;
  fwd_sel_t fwd_a, fwd_b;
  int checks = 0, failures = 0;
  int n_mem = 0, n_wb = 0;

  forwarding_unit dut (.*);

  function automatic fwd_sel_t rule(ridx_t src);
    if (src == 0) return FWD_NONE;
    if (mem_reg_write && mem_wreg == src) return FWD_MEM;
    if (wb_reg_write && wb_wreg == src) return FWD_WB;
    return FWD_NONE;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      ex_rs = ridx_t'($urandom % 4); ex_rt = ridx_t'($urandom % 4);
      mem_wreg = ridx_t'($urandom % 4); wb_wreg = ridx_t'($urandom % 4);
      mem_reg_write = 1'($urandom); wb_reg_write = 1'($urandom);
      #1;
      checks += 2;
      if (fwd_a !== rule(ex_rs)) begin failures++; $display("fwd_a %0d expected %0d", fwd_a, rule(ex_rs)); end
      if (fwd_b !== rule(ex_rt)) begin failures++; $display("fwd_b %0d expected %0d", fwd_b, rule(ex_rt)); end
      if (rule(ex_rs) == FWD_MEM) n_mem++;
      if (rule(ex_rs) == FWD_WB) n_wb++;
    end
    checks++;
    if (n_mem == 0 || n_wb == 0) begin failures++; $display("a forwarding case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
