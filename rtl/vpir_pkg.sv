// vpir_pkg: shared types, constants and helper functions of the value
// prediction + instruction reuse core.
//
// The counter constants (increment bonus 2, misprediction penalty 4,
// prediction threshold 6, saturating limit 15) are the values the design
// is specified with. The instruction encoding, value and PC widths, warmup
// and replacement thresholds are this design's own choices.
package vpir_pkg;

  // ---------------------------------------------------------------------
  // Widths
  // ---------------------------------------------------------------------
  localparam int XLEN   = 64;   // data value width (64-bit integer ISA)
  localparam int PC_W   = 32;   // instruction address width
  localparam int AREG_W = 5;    // 32 architectural registers
  localparam int CONF_W = 4;    // confidence / replacement counters, 0..15

  typedef logic [XLEN-1:0]   xlen_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [CONF_W-1:0] conf_t;

  // ---------------------------------------------------------------------
  // Counter policy shared by the predictor and the reuse buffer
  // ---------------------------------------------------------------------
  localparam conf_t CONF_MAX    = 4'd15; // saturating limit
  localparam conf_t INC_BONUS   = 4'd2;  // added on a correct prediction / reuse hit
  localparam conf_t MISP_PEN    = 4'd4;  // subtracted on a misprediction / reuse miss
  localparam conf_t PRED_THRESH = 4'd6;  // predict only when confidence > this

  // ---------------------------------------------------------------------
  // Micro-ISA executed by the core
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_LI  = 4'd0,  // rd = imm                       (no source)
    OP_ADD = 4'd1,  // rd = a + b
    OP_SUB = 4'd2,  // rd = a - b
    OP_AND = 4'd3,  // rd = a & b
    OP_OR  = 4'd4,  // rd = a | b
    OP_XOR = 4'd5,  // rd = a ^ b
    OP_SLL = 4'd6,  // rd = a << b[5:0]
    OP_SRL = 4'd7,  // rd = a >> b[5:0]
    OP_BEQ = 4'd8,  // branch: target = (a == b) ? pc + imm : pc + 1, no rd
    OP_LD  = 4'd9,  // rd = mem[a + imm]
    OP_ST  = 4'd10  // mem[a + imm] = b, no rd
  } op_e;

  // One decoded instruction as delivered by the front end. When use_imm
  // is set the second operand is the immediate and rs2 is not read. For
  // OP_LD / OP_ST the immediate is the address offset and use_imm is
  // ignored; a store reads rs2 as its data. Memory is addressed in words.
  typedef struct packed {
    pc_t   pc;
    op_e   op;
    areg_t rd;
    areg_t rs1;
    areg_t rs2;
    logic  use_imm;
    xlen_t imm;
  } instr_t;

  // Commit record, one per retired instruction.
  typedef struct packed {
    pc_t   pc;
    op_e   op;
    logic  wen;     // writes rd
    areg_t rd;
    xlen_t value;   // result, or branch target for OP_BEQ
  } commit_t;

  // Per-cycle event counts for performance counting (each field counts
  // the instructions of the cycle for which the event happened).
  typedef logic [3:0] evcnt_t;
  typedef struct packed {
    evcnt_t dispatch;          // instructions dispatched
    evcnt_t rob_full_stall;    // 1: a dispatch group was held back by a full reorder buffer
    evcnt_t reuse_actual;      // (1) reuse test passed with actual operands
    evcnt_t reuse_predicted;   // (2) reuse test passed with predicted operands, reuse result kept
    evcnt_t reuse_unused;      // reuse test passed with predicted operands, VP value preferred
    evcnt_t vp_used;           // value prediction written into the destination register
    evcnt_t branch_early;      // branch resolved at dispatch by the reuse buffer
    evcnt_t group_forward;     // operand taken from an older instruction of the same dispatch group
    evcnt_t issue_predicted;   // issued with at least one predicted operand
    evcnt_t wb_correct;        // writeback: predicted result confirmed by execution   (3)
    evcnt_t wb_mispredict;     // writeback: predicted result was wrong, fixed on the CDB (3)
    evcnt_t wb_to_confirm;     // (4) result computed from predicted operands
    evcnt_t confirm_ok;        // (5) confirm stage: all operands right, on to commit
    evcnt_t confirm_reexec;    // (6) confirm stage: an operand was wrong, back to issue
    evcnt_t commit;            // instructions retired
    evcnt_t load_vp;           // a load whose value was predicted at dispatch
    evcnt_t load_wait_store;   // 1: a ready load was held back by an older store
  } events_t;

  // One reuse buffer way as seen by the reuse test: 'hit' means valid and
  // holding the PC that was looked up.
  typedef struct packed {
    logic  hit;
    xlen_t a;
    xlen_t b;
    xlen_t result;
  } rb_way_t;

  // Reuse test over the ways of one lookup: the first way holding the PC
  // whose stored operands equal the current ones (unused operands are 0).
  typedef struct packed {
    logic       pass;
    logic [1:0] way;
    xlen_t      result;
  } reuse_t;

  function automatic reuse_t reuse_test(rb_way_t [3:0] ways, xlen_t a, xlen_t b);
    reuse_t r;
    r = '0;
    for (int w = 3; w >= 0; w--)
      if (ways[w].hit && ways[w].a == a && ways[w].b == b) begin
        r.pass   = 1'b1;
        r.way    = 2'(w);
        r.result = ways[w].result;
      end
    return r;
  endfunction

  // Number of source registers an operation reads.
  function automatic logic uses_rs1(op_e op);
    return op != OP_LI;
  endfunction

  function automatic logic uses_rs2(op_e op, logic use_imm);
    return (op == OP_ST) || ((op != OP_LI) && (op != OP_LD) && !use_imm);
  endfunction

  function automatic logic writes_rd(op_e op);
    return (op != OP_BEQ) && (op != OP_ST);
  endfunction

  function automatic logic is_mem(op_e op);
    return (op == OP_LD) || (op == OP_ST);
  endfunction

  // Saturating counter arithmetic on 0..CONF_MAX.
  function automatic conf_t sat_inc(conf_t c, conf_t d);
    logic [CONF_W:0] s;
    s = {1'b0, c} + {1'b0, d};
    return (s > {1'b0, CONF_MAX}) ? CONF_MAX : s[CONF_W-1:0];
  endfunction

  function automatic conf_t sat_dec(conf_t c, conf_t d);
    return (c > d) ? c - d : '0;
  endfunction

  function automatic conf_t conf_min(conf_t a, conf_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
