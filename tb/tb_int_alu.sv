// tb_int_alu: random self-check of the integer ALU against a reference
// written independently in the testbench. 2000 random operations over all
// opcodes, with and without immediates; the branch target is checked for
// both outcomes.
module tb_int_alu;
  import vpir_pkg::*;

  op_e   op;
  pc_t   pc;
  xlen_t a, b, imm, result, exp;
  logic  use_imm;
  int    checks = 0, failures = 0;

  int_alu dut (.op, .pc, .a, .b, .use_imm, .imm, .result);

  function automatic xlen_t ref_model(op_e o, pc_t p, xlen_t x, xlen_t y, logic ui, xlen_t im);
    xlen_t s;
    s = ui ? im : y;
    case (o)
      OP_LI:  return im;
      OP_ADD: return x + s;
      OP_SUB: return x - s;
      OP_AND: return x & s;
      OP_OR:  return x | s;
      OP_XOR: return x ^ s;
      OP_SLL: return x << (s % 64);
      OP_SRL: return x >> (s % 64);
      OP_BEQ: return (x == y) ? xlen_t'(pc_t'(p + pc_t'(im))) : xlen_t'(pc_t'(p + 1));
      OP_LD, OP_ST: return x + im;
      default: return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op      = op_e'($urandom_range(0, 10));
      pc      = $urandom;
      a       = {$urandom, $urandom};
      b       = ($urandom_range(0, 3) == 0) ? a : {$urandom, $urandom};
      imm     = ($urandom_range(0, 1) == 0) ? xlen_t'($urandom_range(0, 70)) : {$urandom, $urandom};
      use_imm = (op != OP_BEQ) && (op != OP_LD) && (op != OP_ST) && $urandom_range(0, 1) == 1;
      #1;
      exp = ref_model(op, pc, a, b, use_imm, imm);
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 10)
          $display("ALU mismatch op=%s a=%h b=%h imm=%h -> %h exp %h", op.name(), a, b, imm, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
