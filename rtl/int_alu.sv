// int_alu: single-cycle integer ALU of the core.
//
// Executes the micro-ISA of vpir_pkg. For immediate forms (use_imm = 1)
// the second operand is the instruction's immediate instead of b. For a
// branch (OP_BEQ) the result is the next PC: pc + imm when a == b, else
// pc + 1; this is the value the reuse buffer remembers for a branch. For a
// load or store the result is the effective address a + imm.
//
// Timing: purely combinational; the core registers the result, which gives
// the 1-cycle integer ALU latency of the baseline machine. The operation
// set itself is this design's choice; only the unit's latency is given.
module int_alu
  import vpir_pkg::*;
(
  input  op_e   op,
  input  pc_t   pc,
  input  xlen_t a,
  input  xlen_t b,
  input  logic  use_imm,
  input  xlen_t imm,
  output xlen_t result
);

  xlen_t opb;
  pc_t   br_next;

  always_comb begin
    opb     = use_imm ? imm : b;
    br_next = (a == b) ? pc + pc_t'(imm) : pc + pc_t'(1);
    unique case (op)
      OP_LI:   result = imm;
      OP_ADD:  result = a + opb;
      OP_SUB:  result = a - opb;
      OP_AND:  result = a & opb;
      OP_OR:   result = a | opb;
      OP_XOR:  result = a ^ opb;
      OP_SLL:  result = a << opb[5:0];
      OP_SRL:  result = a >> opb[5:0];
      OP_BEQ:  result = xlen_t'(br_next);
      OP_LD,
      OP_ST:   result = a + imm;
      default: result = '0;
    endcase
  end

endmodule
