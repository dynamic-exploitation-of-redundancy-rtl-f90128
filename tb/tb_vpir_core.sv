// tb_vpir_core: end-to-end self-check of the core at its default sizes.
//
// The testbench generates a program, runs it on an architectural reference
// model of its own and feeds the same instruction stream to the core in
// program order, in groups of 1 to 4 instructions of random size with some
// idle cycles (branches are checked, the stream does not follow them).
// Every retired instruction is compared with the reference: PC, destination
// and value (branch target for branches); the final register file is read
// back through the debug port.
//
// Program: a prologue of constants, then a loop body executed ITER times,
// mixing a stride counter, a period-4 value (context prediction and
// multi-instance reuse), a slowly changing value (mispredictions), a
// pseudo-random register (consumers issuing with predicted operands and
// re-executing), reuse with actual operands, two branches, a block of
// random instructions fixed per PC, a store and two loads (one reloading the
// stored counter, one of a constant) and a long dependent chain. A 256-word
// memory model serves the data port; it is compared with the reference
// memory at the end.
//
// Every mechanism of the core must occur at least once: reuse with actual
// and with predicted operands, a reuse result passed over for the VP value,
// VP predictions, early branch resolution, an operand forwarded inside a
// dispatch group, issue with predicted operands,
// confirmed and mispredicted writebacks, confirm pass and re-execution, a
// full reorder buffer stall, a value-predicted load and a load held back by
// an older store. Each that never occurs counts a failure.
module tb_vpir_core;
  import vpir_pkg::*;

  localparam int ITER   = 400;
  localparam int NRAND  = 12;
  localparam int NCHAIN = 36;
  localparam int BODY   = 20 + NRAND + NCHAIN;

  localparam int W = 4;
  logic    clk = 0, rst_n = 0;
  logic    in_ready, ready_for_work;
  logic    [W-1:0] in_valid, commit_valid;
  instr_t  [W-1:0] in_instr;
  commit_t [W-1:0] commit_info;
  areg_t   dbg_reg;
  xlen_t   dbg_value;
  events_t ev;
  logic    dmem_rd_en, dmem_wr_en;
  xlen_t   dmem_rd_addr, dmem_rd_data, dmem_wr_addr, dmem_wr_data;
  xlen_t   dmem [256];
  int      checks = 0, failures = 0;

  vpir_core dut (.clk, .rst_n, .in_valid, .in_ready, .in_instr, .commit_valid,
                 .commit_info, .dmem_rd_en, .dmem_rd_addr, .dmem_rd_data,
                 .dmem_wr_en, .dmem_wr_addr, .dmem_wr_data,
                 .dbg_reg, .dbg_value, .ev, .ready_for_work);

  // data memory: 256 words, address taken modulo 256, read data registered
  initial foreach (dmem[i]) dmem[i] = '0;
  always @(posedge clk) begin
    if (dmem_rd_en) dmem_rd_data <= dmem[dmem_rd_addr[7:0]];
    if (dmem_wr_en) dmem[dmem_wr_addr[7:0]] <= dmem_wr_data;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    for (int q = 0; q < 32; q++) $display("DBG e%0d v=%0d st=%0d op=%0d pc=%h pflag=%0d rp=%0d s0 u%0d w%0d t%0d p%0d m%0d r%0d s1 u%0d w%0d t%0d p%0d m%0d r%0d", q, dut.rob_v[q], dut.rob[q].st, dut.rob[q].op, dut.rob[q].pc, dut.rob[q].pflag, dut.rob[q].res_pred, dut.rob[q].src[0].used, dut.rob[q].src[0].wt, dut.rob[q].src[0].tag, dut.rob[q].src[0].pred, dut.rob[q].src[0].misp, dut.rob[q].src[0].rdy, dut.rob[q].src[1].used, dut.rob[q].src[1].wt, dut.rob[q].src[1].tag, dut.rob[q].src[1].pred, dut.rob[q].src[1].misp, dut.rob[q].src[1].rdy);
    $display("head=%0d tail=%0d", dut.head, dut.tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  xlen_t  ref_reg [32];
  xlen_t  ref_mem [256];
  instr_t prog [$];
  commit_t expq [$];

  function automatic xlen_t ref_exec(instr_t i, xlen_t x, xlen_t y);
    xlen_t s;
    s = i.use_imm ? i.imm : y;
    case (i.op)
      OP_LI:  return i.imm;
      OP_ADD: return x + s;
      OP_SUB: return x - s;
      OP_AND: return x & s;
      OP_OR:  return x | s;
      OP_XOR: return x ^ s;
      OP_SLL: return x << s[5:0];
      OP_SRL: return x >> s[5:0];
      OP_BEQ: return (x == y) ? xlen_t'(i.pc + pc_t'(i.imm)) : xlen_t'(i.pc + 1);
      OP_LD, OP_ST: return x + i.imm;
      default: return '0;
    endcase
  endfunction

  function automatic instr_t mk(pc_t pc, op_e op, int rd, int rs1, int rs2, logic ui, xlen_t imm);
    instr_t i;
    i.pc = pc; i.op = op; i.rd = areg_t'(rd); i.rs1 = areg_t'(rs1); i.rs2 = areg_t'(rs2);
    i.use_imm = ui; i.imm = imm;
    return i;
  endfunction

  instr_t body [BODY];

  task automatic emit(instr_t i);
    commit_t c;
    xlen_t v;
    v = ref_exec(i, ref_reg[i.rs1], ref_reg[i.rs2]);
    if (i.op == OP_ST) ref_mem[v[7:0]] = ref_reg[i.rs2];
    if (i.op == OP_LD) v = ref_mem[v[7:0]];
    c.pc = i.pc; c.op = i.op; c.wen = writes_rd(i.op); c.rd = i.rd; c.value = v;
    if (c.wen) ref_reg[i.rd] = v;
    prog.push_back(i);
    expq.push_back(c);
  endtask

  // ---------------- program ----------------
  initial begin
    pc_t b;
    for (int r = 0; r < 32; r++) ref_reg[r] = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    emit(mk(32'h0, OP_LI, 4, 0, 0, 1, 64'd1000));
    emit(mk(32'h1, OP_LI, 7, 0, 0, 1, 64'h1234_5678_9abc_def1));
    emit(mk(32'h2, OP_LI, 11, 0, 0, 1, 64'd0));
    emit(mk(32'h3, OP_LI, 21, 0, 0, 1, 64'h0bad_cafe_f00d_1234));
    emit(mk(32'h4, OP_ST, 0, 11, 4, 0, 64'd100));          // mem[100] = 1000
    b = 32'h40;
    body[0]  = mk(b + 0,  OP_ADD, 1, 1, 0, 1, 64'd1);     // stride counter
    body[1]  = mk(b + 1,  OP_AND, 2, 1, 0, 1, 64'd3);     // period 4
    body[2]  = mk(b + 2,  OP_ADD, 3, 2, 4, 0, 64'd0);     // 4 reusable instances
    body[3]  = mk(b + 3,  OP_SRL, 5, 1, 0, 1, 64'd3);     // changes every 8
    body[4]  = mk(b + 4,  OP_XOR, 6, 5, 7, 0, 64'd0);     // predicted + random operand
    body[5]  = mk(b + 5,  OP_SLL, 8, 7, 0, 1, 64'd1);
    body[6]  = mk(b + 6,  OP_SRL, 9, 7, 0, 1, 64'd3);
    body[7]  = mk(b + 7,  OP_XOR, 7, 8, 9, 0, 64'd0);     // pseudo-random sequence
    body[8]  = mk(b + 8,  OP_ADD, 10, 4, 4, 0, 64'd0);    // reuse with actual operands
    body[9]  = mk(b + 9,  OP_BEQ, 0, 4, 4, 0, 64'd5);     // always taken
    body[10] = mk(b + 10, OP_BEQ, 0, 2, 11, 0, 64'd7);    // taken every 4th
    body[11] = mk(b + 11, OP_ADD, 12, 6, 5, 0, 64'd0);
    // reuse with a predicted operand and an unpredictable result
    body[12] = mk(b + 12, OP_AND, 15, 7, 0, 1, 64'd1);    // random bit, actual later
    for (int k = 0; k < NRAND; k++) begin
      op_e op;
      op = op_e'($urandom_range(1, 7));
      body[13 + k] = mk(b + 13 + k, op, $urandom_range(18, 20), $urandom_range(1, 20),
                        $urandom_range(1, 20), $urandom_range(0, 1) == 1,
                        xlen_t'($urandom_range(0, 9)));
    end
    body[13 + NRAND] = mk(b + 13 + NRAND, OP_AND, 16, 1, 0, 1, 64'd1); // period 2, predicted
    body[14 + NRAND] = mk(b + 14 + NRAND, OP_ADD, 14, 16, 15, 0, 64'd0);
    body[15 + NRAND] = mk(b + 15 + NRAND, OP_OR, 17, 14, 0, 1, 64'd8);
    // memory: store then reload the counter (the load waits for the store
    // and is value predicted as a stride), a load of a constant, and a
    // consumer of both loads
    body[16 + NRAND] = mk(b + 16 + NRAND, OP_ST, 0, 2, 1, 0, 64'd16);
    body[17 + NRAND] = mk(b + 17 + NRAND, OP_LD, 23, 2, 0, 0, 64'd16);
    body[18 + NRAND] = mk(b + 18 + NRAND, OP_LD, 24, 11, 0, 0, 64'd100);
    body[19 + NRAND] = mk(b + 19 + NRAND, OP_ADD, 25, 23, 24, 0, 64'd0);
    // long dependent chain of xorshift steps: fills the reorder buffer
    for (int k = 0; k < NCHAIN; k += 2) begin
      int sh;
      sh = (k % 6 == 0) ? 13 : (k % 6 == 2) ? 7 : 17;
      body[20 + NRAND + k]     = mk(b + 20 + NRAND + k, (k % 6 == 2) ? OP_SRL : OP_SLL,
                                    22, 21, 0, 1, xlen_t'(sh));
      body[20 + NRAND + k + 1] = mk(b + 21 + NRAND + k, OP_XOR, 21, 21, 22, 0, 64'd0);
    end
    for (int it = 0; it < ITER; it++)
      for (int k = 0; k < BODY; k++) emit(body[k]);
  end

  // ---------------- drive ----------------
  int sent = 0, tick = 0, gsize = 4, n_off;
  always_comb begin
    n_off = 0;
    if (rst_n && ((tick / 500) % 7 != 3 || tick % 3 == 0))
      n_off = (prog.size() - sent < gsize) ? prog.size() - sent : gsize;
    for (int l = 0; l < W; l++) begin
      in_valid[l] = l < n_off;
      in_instr[l] = (l < n_off) ? prog[sent + l] : '0;
    end
  end
  always @(posedge clk) begin
    tick <= tick + 1;
    if (rst_n && in_ready) sent <= sent + n_off;
    gsize <= ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 4;
  end

  // ---------------- check and count ----------------
  int n_commit = 0;
  int cnt [15];
  evcnt_t evv [15];
  assign evv = '{ev.rob_full_stall, ev.reuse_actual, ev.reuse_predicted, ev.reuse_unused,
                 ev.vp_used, ev.branch_early, ev.group_forward, ev.issue_predicted,
                 ev.wb_correct, ev.wb_mispredict, ev.wb_to_confirm, ev.confirm_ok,
                 ev.confirm_reexec, ev.load_vp, ev.load_wait_store};
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 15; i++) cnt[i] += int'(evv[i]);
      for (int c = 0; c < W; c++)
      if (commit_valid[c]) begin
        commit_t e;
        e = expq.pop_front();
        checks++;
        if (commit_info[c] != e) begin
          failures++;
          if (failures < 10)
            $display("commit %0d: pc=%h rd=%0d val=%h, expected pc=%h rd=%0d val=%h",
                     n_commit, commit_info[c].pc, commit_info[c].rd, commit_info[c].value,
                     e.pc, e.rd, e.value);
        end
        n_commit++;
      end
    end
  end
  string names [15] = '{"rob_full_stall", "reuse_actual", "reuse_predicted", "reuse_unused",
                        "vp_used", "branch_early", "group_forward", "issue_predicted",
                        "wb_correct", "wb_mispredict", "wb_to_confirm", "confirm_ok",
                        "confirm_reexec", "load_vp", "load_wait_store"};
  int cycles = 0;

  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    dbg_reg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready_for_work);
    while (n_commit < prog.size()) begin
      @(posedge clk);
      cycles++;
    end
    @(posedge clk); #1;
    for (int r = 0; r < 32; r++) begin
      dbg_reg = areg_t'(r);
      #1;
      checks++;
      if (dbg_value != ref_reg[r]) begin
        failures++;
        $display("final r%0d = %h, expected %h", r, dbg_value, ref_reg[r]);
      end
    end
    checks++;
    if (expq.size() != 0) failures++;
    foreach (ref_mem[i]) begin
      checks++;
      if (dmem[i] != ref_mem[i]) begin
        failures++;
        $display("final mem[%0d] = %h, expected %h", i, dmem[i], ref_mem[i]);
      end
    end
    foreach (names[i]) begin
      $display("  %-16s %0d", names[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("  mechanism %s never happened", names[i]);
      end
    end
    $display("  committed %0d instructions in %0d cycles", n_commit, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
