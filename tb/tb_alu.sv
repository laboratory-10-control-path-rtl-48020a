// Random and corner-case test of the 16-bit ALU: each of the five
// operations is compared with a reference computed here, and the zero flag
// with the reference result.
module tb_alu;
  import mini_mips_pkg::*;

  word_t  a, b, result;
  aluop_t op;
  logic   zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .result, .zero);

  localparam aluop_t OPS [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  function automatic word_t ref_result(aluop_t o, word_t x, word_t y);
    int sx, sy;
    sx = (x >= 16'h8000) ? int'(x) - 65536 : int'(x);
    sy = (y >= 16'h8000) ? int'(y) - 65536 : int'(y);
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD: return word_t'(int'(x) + int'(y));
      ALU_SUB: return word_t'(int'(x) - int'(y));
      ALU_SLT: return (sx < sy) ? 16'd1 : 16'd0;
      default: return '0;
    endcase
  endfunction

  task automatic check(aluop_t o, word_t x, word_t y);
    word_t exp;
    op = o; a = x; b = y;
    #1;
    exp = ref_result(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("op %0d a %h b %h: result %h zero %b, expected %h", o, x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin
      check(OPS[k], 16'h0000, 16'h0000);
      check(OPS[k], 16'h8000, 16'h0001);
      check(OPS[k], 16'h0001, 16'h8000);
      check(OPS[k], 16'hFFFF, 16'h0001);
      check(OPS[k], 16'h0005, 16'h0005);
      for (int n = 0; n < 200; n++) check(OPS[k], word_t'($urandom), word_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
