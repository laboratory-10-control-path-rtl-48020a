// Test of the load-use hazard detection unit: random cases compared with
// the rule worked out here (stall when the instruction in EX loads into a
// register other than R0 that the instruction in ID reads as rs or rt).
module tb_hazard_detection_unit;
  import mini_mips_pkg::*;

  logic  ex_mem_read, stall;
  ridx_t ex_rt, id_rs, id_rt;
  int checks = 0, failures = 0, n_stall = 0;

  hazard_detection_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic exp;
      ex_mem_read = 1'($urandom);
      ex_rt = ridx_t'($urandom % 4); id_rs = ridx_t'($urandom % 4); id_rt = ridx_t'($urandom % 4);
      #1;
      exp = ex_mem_read && ex_rt != 0 && (ex_rt == id_rs || ex_rt == id_rt);
      checks++;
      if (stall !== exp) begin
        failures++;
        $display("mem_read %b rt %0d rs %0d rt %0d: stall %b", ex_mem_read, ex_rt, id_rs, id_rt, stall);
      end
      if (exp) n_stall++;
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall case occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
