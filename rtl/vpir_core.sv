// vpir_core: out-of-order core back end that combines value prediction (VP)
// and instruction reuse (IR), with a confirm stage for selective
// re-execution.
//
// Structure. Groups of up to W instructions enter in program order through
// in_* (fetch; lane 0 is the oldest, valid lanes are contiguous from lane
// 0). In that cycle every PC looks up the hybrid value predictor
// (hybrid_vp) and the reuse buffer (reuse_buffer); one cycle later the group
// is in dispatch, where the lookups are complete. Dispatch renames the
// sources through the register status table (and, inside the group, from
// older lanes) and allocates one reorder buffer entry per instruction; the
// entry also acts as the reservation station and as the physical register
// of the result. Each entry carries the register status bits of its result
// (value, predicted bit, confidence), the RS prediction flag and, for each
// source operand, the is_operand_predicted / is_operand_mispredicted /
// is_operand_ready bits.
//
// Dispatch (per instruction, in this order):
//  (1) reuse test passes with actual operands: the stored result is final,
//      the entry goes straight to commit. A branch that passes this way is
//      resolved here.
//  (2) reuse test passes with predicted operands and its hit confidence
//      (minimum confidence of the predicted operands) beats the VP
//      confidence (or VP has no prediction): the reuse result is written as
//      a predicted value with the hit confidence; the entry goes to confirm.
//      Otherwise, if VP predicts, the VP value is written as a predicted
//      value and the entry waits in issue for its actual operands.
//      Otherwise the entry waits in issue with no prediction.
// Issue: an entry with the prediction flag set, and every branch, issues
//  only with actual operands; any other entry may use predicted operands.
//  Up to W instructions issue per cycle, oldest first, to W 1-cycle int_alu.
// Writeback: a predicted entry compares its now-correct result with the
//  prediction and publishes it on the common data bus (CDB) with a
//  mispredicted flag; an entry that used only actual operands publishes its
//  result (3). An entry that used predicted operands writes its result as a
//  predicted value with the minimum operand confidence and goes to confirm
//  (4). The reuse buffer learns every executed instance here.
// Confirm: once all predicted operands are ready, an entry with no
//  mispredicted operand publishes its result and goes to commit (5); one
//  with a mispredicted operand clears its predicted-operand bits and goes
//  back to issue (6), where its set prediction flag makes it wait for actual
//  operands, so every instruction executes at most twice. Up to W entries
//  leave confirm per cycle.
// Commit: in order, up to W per cycle; the committed values train hybrid_vp.
//
// CDB: 2*W broadcast ports, W for writeback and W for confirm. A consumer
// that used the predicted value of the producer takes the broadcast's
// mispredicted flag and its ready bit is set; a consumer still waiting
// captures the value.
//
// Memory: loads and stores compute their address in an ALU lane from actual
//  operands only; one memory instruction issues per cycle. A load reads the
//  data port at issue and writes back the word returned the next cycle; it
//  may carry a VP prediction (checked at writeback like any other) but is
//  never reuse-tested. A load does not issue while an older store is in the
//  reorder buffer; a store writes memory when it commits, one per cycle.
//
// Width W = 4 and the 32-entry reorder buffer match the machine the scheme
// was evaluated on; all W lanes are integer ALUs with 1-cycle latency.
// Caches, a load/store queue with address disambiguation and branch
// prediction are outside this RTL: the front end delivers the instruction
// stream in program order, and branch outcomes leave through the commit
// port. The VP is trained at commit rather
// than at writeback, so it only learns architecturally correct values in
// program order. A dispatch group enters the reorder buffer whole or waits.
module vpir_core
  import vpir_pkg::*;
#(
  parameter int    W           = 4,
  parameter int    ROB_N       = 32,
  parameter int    VHT_N       = 4096,
  parameter int    VPT_N       = 8192,
  parameter int    RB_N        = 1024,
  parameter int    WARM_THRESH = 2,
  parameter conf_t REPL_THRESH = 4'd4
) (
  input  logic                clk,
  input  logic                rst_n,
  // instruction stream, program order, lane 0 oldest
  input  logic    [W-1:0]     in_valid,
  output logic                in_ready,
  input  instr_t  [W-1:0]     in_instr,
  // retirement, lane 0 oldest
  output logic    [W-1:0]     commit_valid,
  output commit_t [W-1:0]     commit_info,
  // data memory: one load per cycle (data returns the next cycle), one store
  // per cycle written at commit. Word addresses.
  output logic                dmem_rd_en,
  output xlen_t               dmem_rd_addr,
  input  xlen_t               dmem_rd_data,
  output logic                dmem_wr_en,
  output xlen_t               dmem_wr_addr,
  output xlen_t               dmem_wr_data,
  // architectural register read port (for inspection)
  input  areg_t               dbg_reg,
  output xlen_t               dbg_value,
  // event counts
  output events_t             ev,
  output logic                ready_for_work   // predictor tables are cleared
);

  localparam int ROB_W = $clog2(ROB_N);
  localparam int NCDB  = 2 * W;
  typedef logic [ROB_W-1:0] tag_t;
  typedef logic [ROB_W:0]   cnt_t;

  typedef enum logic [1:0] {S_ISSUE, S_EXEC, S_CONFIRM, S_DONE} st_e;

  typedef struct packed {
    logic  used;   // instruction reads this operand
    logic  wt;     // value not final yet: producer is entry 'tag'
    tag_t  tag;
    xlen_t val;    // actual value, or predicted value used
    logic  pred;   // is_operand_predicted
    logic  misp;   // is_operand_mispredicted
    logic  rdy;    // is_operand_ready
    conf_t conf;   // confidence of the predicted value used
  } opnd_t;

  typedef struct packed {
    st_e         st;
    pc_t         pc;
    op_e         op;
    logic        wen;
    areg_t       rd;
    logic        use_imm;
    xlen_t       imm;
    opnd_t [1:0] src;
    logic        pflag;     // RS prediction flag
    xlen_t       res;       // physical register: value
    logic        res_pred;  // register status: holds a predicted value
    conf_t       res_conf;  // register status: confidence of that value
  } rs_t;

  typedef struct packed {
    logic  valid;
    tag_t  tag;
    xlen_t value;
    logic  misp;
  } cdb_t;

  typedef struct packed {
    logic  valid;
    logic  ld;     // a load: the result comes from dmem_rd_data
    tag_t  tag;
    xlen_t result;
    xlen_t a;
    xlen_t b;
  } wb_t;

  typedef enum logic [1:0] {D_REUSE, D_REUSE_PRED, D_VP, D_PLAIN} dpath_e;

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  rs_t              rob [ROB_N];
  logic [ROB_N-1:0] rob_v;
  tag_t             head, tail;
  cnt_t             count;

  xlen_t            arf    [32];
  logic  [31:0]     rs_busy;
  tag_t             rs_tag [32];

  logic   [W-1:0]   d_valid;
  instr_t [W-1:0]   d_ins;
  wb_t    [W-1:0]   wb_q;

  // ---------------------------------------------------------------------
  // Predictor and reuse buffer
  // ---------------------------------------------------------------------
  logic                  vp_init_done;
  logic    [W-1:0]       vp_valid, vp_is_stride;
  xlen_t   [W-1:0]       vp_value;
  conf_t   [W-1:0]       vp_conf;
  rb_way_t [W-1:0][3:0]  rb_ways;
  logic    [W-1:0]       rb_test_en, rb_test_pass, rb_ins;
  logic    [W-1:0][1:0]  rb_test_way;
  pc_t     [W-1:0]       lk_pc, rb_ins_pc;
  xlen_t   [W-1:0]       wb_a, wb_b, wb_res;
  logic                  can_dispatch, d_any;
  cnt_t                  d_n;
  logic    [W-1:0]       cm_fire, vp_upd;
  pc_t     [W-1:0]       cm_pc;
  xlen_t   [W-1:0]       cm_res;

  always_comb begin
    d_any = |d_valid;
    d_n   = '0;
    for (int l = 0; l < W; l++) d_n += cnt_t'(d_valid[l]);
  end
  assign can_dispatch   = d_any && vp_init_done && (count + d_n <= cnt_t'(ROB_N));
  assign in_ready       = vp_init_done && (!d_any || can_dispatch);
  assign ready_for_work = vp_init_done;
  // a held group re-reads the tables so that they stay valid for it
  always_comb
    for (int l = 0; l < W; l++)
      lk_pc[l] = (d_any && !can_dispatch) ? d_ins[l].pc : in_instr[l].pc;

  hybrid_vp #(.VHT_N(VHT_N), .VPT_N(VPT_N), .WARM_THRESH(WARM_THRESH),
              .REPL_THRESH(REPL_THRESH), .LANES(W)) u_vp (
    .clk, .rst_n, .init_done(vp_init_done),
    .lk_pc, .pred_valid(vp_valid), .pred_value(vp_value), .pred_conf(vp_conf),
    .pred_is_stride(vp_is_stride),
    .upd_valid(vp_upd), .upd_pc(cm_pc), .upd_value(cm_res)
  );

  reuse_buffer #(.RB_N(RB_N), .REPL_THRESH(REPL_THRESH), .LANES(W)) u_rb (
    .clk, .rst_n, .lk_pc, .lk_ways(rb_ways),
    .test_en(rb_test_en), .test_pass(rb_test_pass), .test_way(rb_test_way),
    .ins_valid(rb_ins), .ins_pc(rb_ins_pc), .ins_a(wb_a), .ins_b(wb_b),
    .ins_result(wb_res)
  );

  function automatic logic op_actual(logic used, logic wt);
    return !used || !wt;
  endfunction

  // ---------------------------------------------------------------------
  // Dispatch: rename, read operands, reuse test, path decision
  // ---------------------------------------------------------------------
  cdb_t   [NCDB-1:0] cdb;
  cdb_t   [W-1:0]    cdb_wb, cdb_cf;
  assign cdb = {cdb_cf, cdb_wb};
  rs_t    [W-1:0]    d_new;
  dpath_e [W-1:0]    d_path;
  logic   [W-1:0]    d_fwd, d_pass_any;

  always_comb begin
    d_new        = '0;
    d_path       = '0;
    d_fwd        = '0;
    d_pass_any   = '0;
    rb_test_en   = '0;
    rb_test_pass = '0;
    rb_test_way  = '0;
    for (int l = 0; l < W; l++) begin
      opnd_t [1:0] src;
      logic  [1:0] avail;
      logic        all_actual, all_avail, is_br, test;
      conf_t       hit_conf;
      reuse_t      rt;
      rs_t         n;
      is_br = (d_ins[l].op == OP_BEQ);
      for (int k = 0; k < 2; k++) begin
        areg_t r;
        tag_t  p;
        logic  in_grp;
        int    gj;
        r        = (k == 0) ? d_ins[l].rs1 : d_ins[l].rs2;
        p        = rs_tag[r];
        src[k]   = '0;
        src[k].used = (k == 0) ? uses_rs1(d_ins[l].op)
                               : uses_rs2(d_ins[l].op, d_ins[l].use_imm);
        avail[k] = 1'b1;
        in_grp   = 1'b0;
        gj       = 0;
        for (int j = 0; j < l; j++)
          if (d_valid[j] && d_new[j].wen && d_ins[j].rd == r) begin
            in_grp = 1'b1;
            gj     = j;
          end
        if (src[k].used) begin
          if (in_grp) begin
            // producer is an older instruction of this group
            d_fwd[l] = 1'b1;
            if (d_new[gj].st == S_DONE) begin
              src[k].val = d_new[gj].res;
            end else begin
              src[k].wt   = 1'b1;
              src[k].tag  = tail + tag_t'(gj);
              avail[k]    = d_new[gj].res_pred;
              src[k].val  = d_new[gj].res;
              src[k].conf = d_new[gj].res_conf;
            end
          end else if (!rs_busy[r]) begin
            src[k].val = arf[r];
          end else if (rob[p].st == S_DONE) begin
            src[k].val = rob[p].res;
          end else begin
            logic got;
            got = 1'b0;
            for (int c = 0; c < NCDB; c++)
              if (!got && cdb[c].valid && cdb[c].tag == p) begin
                got        = 1'b1;
                src[k].val = cdb[c].value;
              end
            if (!got) begin
              src[k].wt   = 1'b1;
              src[k].tag  = p;
              avail[k]    = rob[p].res_pred;
              src[k].val  = rob[p].res;     // predicted value, if any
              src[k].conf = rob[p].res_conf;
            end
          end
        end
      end
      all_actual = op_actual(src[0].used, src[0].wt) && op_actual(src[1].used, src[1].wt);
      all_avail  = avail[0] && avail[1];
      hit_conf   = CONF_MAX;
      for (int k = 0; k < 2; k++)
        if (src[k].used && src[k].wt) hit_conf = conf_min(hit_conf, src[k].conf);
      // the reuse test; unused operands compare as zero. Branches are never
      // tested or run with predicted operands; loads and stores are never
      // tested.
      rt   = reuse_test(rb_ways[l], src[0].used ? src[0].val : '0,
                                    src[1].used ? src[1].val : '0);
      test = d_valid[l] && can_dispatch && !is_mem(d_ins[l].op) &&
             (is_br ? all_actual : all_avail);
      rb_test_en[l]   = test;
      rb_test_pass[l] = test && rt.pass;
      rb_test_way[l]  = rt.way;
      d_pass_any[l]   = test && rt.pass;
      if (test && rt.pass && all_actual)
        d_path[l] = D_REUSE;
      else if (test && rt.pass && (!vp_valid[l] || hit_conf > vp_conf[l]))
        d_path[l] = D_REUSE_PRED;
      else if (vp_valid[l] && writes_rd(d_ins[l].op))
        d_path[l] = D_VP;
      else
        d_path[l] = D_PLAIN;

      // new entry
      n         = '0;
      n.pc      = d_ins[l].pc;
      n.op      = d_ins[l].op;
      n.wen     = writes_rd(d_ins[l].op);
      n.rd      = d_ins[l].rd;
      n.use_imm = d_ins[l].use_imm;
      n.imm     = d_ins[l].imm;
      n.src     = src;
      n.st      = S_ISSUE;
      unique case (d_path[l])
        D_REUSE: begin
          n.st  = S_DONE;
          n.res = rt.result;
        end
        D_REUSE_PRED: begin
          n.st       = S_CONFIRM;
          n.pflag    = 1'b1;
          n.res      = rt.result;
          n.res_pred = 1'b1;
          n.res_conf = hit_conf;
          for (int k = 0; k < 2; k++)
            if (src[k].used && src[k].wt) n.src[k].pred = 1'b1;
        end
        D_VP: begin
          n.pflag    = 1'b1;
          n.res      = vp_value[l];
          n.res_pred = 1'b1;
          n.res_conf = vp_conf[l];
        end
        default: ;
      endcase
      // a waiting operand keeps no value unless it was used as predicted
      for (int k = 0; k < 2; k++)
        if (src[k].wt && !n.src[k].pred) begin
          n.src[k].val  = '0;
          n.src[k].conf = '0;
        end
      d_new[l] = n;
    end
  end

  // ---------------------------------------------------------------------
  // Issue selection: up to W oldest ready entries
  // ---------------------------------------------------------------------
  logic  [W-1:0]      is_fire;
  tag_t  [W-1:0]      is_tag;
  opnd_t [W-1:0][1:0] is_src;
  logic               ld_wait_st;
  always_comb begin
    int   n_is;
    logic mem_used, st_older;
    is_fire    = '0;
    is_tag     = '0;
    is_src     = '0;
    n_is       = 0;
    mem_used   = 1'b0;
    st_older   = 1'b0;
    ld_wait_st = 1'b0;
    for (int i = 0; i < ROB_N; i++) begin
      tag_t e;
      logic ok, mem;
      e   = head + tag_t'(i);
      mem = is_mem(rob[e].op);
      ok  = rob_v[e] && rob[e].st == S_ISSUE;
      for (int k = 0; k < 2; k++)
        if (!op_actual(rob[e].src[k].used, rob[e].src[k].wt))
          // predicted operand: allowed only for an unpredicted ALU op
          ok = ok && !rob[e].pflag && rob[e].op != OP_BEQ && !mem &&
               rob[rob[e].src[k].tag].res_pred;
      // one memory port; a load waits until every older store has left
      if (ok && rob[e].op == OP_LD && st_older) begin
        ok         = 1'b0;
        ld_wait_st = 1'b1;
      end
      if (mem && mem_used) ok = 1'b0;
      if (ok && n_is < W) begin
        is_fire[n_is] = 1'b1;
        is_tag[n_is]  = e;
        n_is++;
        if (mem) mem_used = 1'b1;
      end
      if (rob_v[e] && rob[e].op == OP_ST) st_older = 1'b1;
    end
    for (int u = 0; u < W; u++)
      for (int k = 0; k < 2; k++) begin
        opnd_t o;
        o = rob[is_tag[u]].src[k];
        if (!op_actual(o.used, o.wt)) begin
          o.pred = 1'b1;
          o.misp = 1'b0;
          o.rdy  = 1'b0;
          o.val  = rob[o.tag].res;
          o.conf = rob[o.tag].res_conf;
        end
        is_src[u][k] = o;
      end
  end

  xlen_t [W-1:0] alu_res;
  always_comb begin
    dmem_rd_en   = 1'b0;
    dmem_rd_addr = '0;
    for (int u = 0; u < W; u++)
      if (is_fire[u] && rob[is_tag[u]].op == OP_LD) begin
        dmem_rd_en   = 1'b1;
        dmem_rd_addr = alu_res[u];
      end
  end

  for (genvar u = 0; u < W; u++) begin : g_alu
    xlen_t res;
    assign alu_res[u] = res;
    int_alu u_alu (
      .op(rob[is_tag[u]].op), .pc(rob[is_tag[u]].pc),
      .a(is_src[u][0].used ? is_src[u][0].val : '0),
      .b(is_src[u][1].used ? is_src[u][1].val : '0),
      .use_imm(rob[is_tag[u]].use_imm), .imm(rob[is_tag[u]].imm), .result(res)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) wb_q[u] <= '0;
      else begin
        wb_q[u].valid  <= is_fire[u];
        wb_q[u].ld     <= is_fire[u] && rob[is_tag[u]].op == OP_LD;
        wb_q[u].tag    <= is_tag[u];
        wb_q[u].result <= res;
        wb_q[u].a      <= is_src[u][0].used ? is_src[u][0].val : '0;
        wb_q[u].b      <= is_src[u][1].used ? is_src[u][1].val : '0;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Writeback
  // ---------------------------------------------------------------------
  logic  [W-1:0] wb_used_pred, wb_misp, wb_pflag;
  conf_t [W-1:0] wb_conf;
  xlen_t [W-1:0] wb_val;
  always_comb begin
    for (int u = 0; u < W; u++) begin
      rs_t e;
      e               = rob[wb_q[u].tag];
      wb_val[u]       = wb_q[u].ld ? dmem_rd_data : wb_q[u].result;
      wb_pflag[u]     = e.pflag;
      wb_used_pred[u] = 1'b0;
      wb_conf[u]      = CONF_MAX;
      for (int k = 0; k < 2; k++)
        if (e.src[k].pred) begin
          wb_used_pred[u] = 1'b1;
          wb_conf[u]      = conf_min(wb_conf[u], e.src[k].conf);
        end
      wb_misp[u]      = e.pflag && (wb_val[u] != e.res);
      cdb_wb[u].valid    = wb_q[u].valid && (e.pflag || !wb_used_pred[u]);
      cdb_wb[u].tag      = wb_q[u].tag;
      cdb_wb[u].value    = wb_val[u];
      cdb_wb[u].misp     = wb_misp[u];
      rb_ins[u]       = wb_q[u].valid && !is_mem(e.op);
      rb_ins_pc[u]    = e.pc;
      wb_a[u]         = wb_q[u].a;
      wb_b[u]         = wb_q[u].b;
      wb_res[u]       = wb_q[u].result;
    end
  end

  // ---------------------------------------------------------------------
  // Confirm selection: up to W oldest entries whose predicted operands are
  // all ready
  // ---------------------------------------------------------------------
  logic [W-1:0] cf_fire, cf_bad;
  tag_t [W-1:0] cf_tag;
  always_comb begin
    int n_cf;
    cf_fire = '0;
    cf_bad  = '0;
    cf_tag  = '0;
    n_cf    = 0;
    for (int i = 0; i < ROB_N; i++) begin
      tag_t e;
      logic ok;
      e  = head + tag_t'(i);
      ok = rob_v[e] && rob[e].st == S_CONFIRM;
      for (int k = 0; k < 2; k++)
        if (rob[e].src[k].pred && !rob[e].src[k].rdy) ok = 1'b0;
      if (ok && n_cf < W) begin
        cf_fire[n_cf] = 1'b1;
        cf_tag[n_cf]  = e;
        cf_bad[n_cf]  = (rob[e].src[0].pred && rob[e].src[0].misp) ||
                        (rob[e].src[1].pred && rob[e].src[1].misp);
        n_cf++;
      end
    end
    for (int u = 0; u < W; u++) begin
      cdb_cf[u].valid = cf_fire[u] && !cf_bad[u];
      cdb_cf[u].tag   = cf_tag[u];
      cdb_cf[u].value = rob[cf_tag[u]].res;
      cdb_cf[u].misp  = 1'b0;
    end
  end

  // ---------------------------------------------------------------------
  // Commit: up to W in order
  // ---------------------------------------------------------------------
  cnt_t cm_n;
  always_comb begin
    logic go;
    go           = 1'b1;
    cm_n         = '0;
    dmem_wr_en   = 1'b0;
    dmem_wr_addr = '0;
    dmem_wr_data = '0;
    for (int c = 0; c < W; c++) begin
      tag_t e;
      e  = head + tag_t'(c);
      go = go && rob_v[e] && rob[e].st == S_DONE &&
           !(rob[e].op == OP_ST && dmem_wr_en);
      if (go && rob[e].op == OP_ST) begin
        dmem_wr_en   = 1'b1;
        dmem_wr_addr = rob[e].res;
        dmem_wr_data = rob[e].src[1].val;
      end
      cm_fire[c]           = go;
      cm_pc[c]             = rob[e].pc;
      cm_res[c]            = rob[e].res;
      vp_upd[c]            = go && rob[e].wen;
      commit_valid[c]      = go;
      commit_info[c].pc    = rob[e].pc;
      commit_info[c].op    = rob[e].op;
      commit_info[c].wen   = rob[e].wen;
      commit_info[c].rd    = rob[e].rd;
      commit_info[c].value = rob[e].res;
      cm_n += cnt_t'(go);
    end
  end
  assign dbg_value = arf[dbg_reg];

  // ---------------------------------------------------------------------
  // Entry state update
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rob_v   <= '0;
      head    <= '0;
      tail    <= '0;
      count   <= '0;
      rs_busy <= '0;
      d_valid <= '0;
      d_ins   <= '0;
      for (int r = 0; r < 32; r++) begin
        arf[r]    <= '0;
        rs_tag[r] <= '0;
      end
      for (int e = 0; e < ROB_N; e++) rob[e] <= '0;
    end else begin
      // front end register
      if (in_ready) begin
        d_valid <= in_valid;
        d_ins   <= in_instr;
      end

      // every entry: issue, writeback, confirm, then CDB capture
      for (int e = 0; e < ROB_N; e++) begin
        rs_t n;
        n = rob[e];
        for (int u = 0; u < W; u++)
          if (is_fire[u] && is_tag[u] == tag_t'(e)) begin
            n.st  = S_EXEC;
            n.src = is_src[u];
          end
        for (int u = 0; u < W; u++)
          if (wb_q[u].valid && wb_q[u].tag == tag_t'(e)) begin
            n.res = wb_val[u];
            if (n.pflag || !wb_used_pred[u]) begin
              n.st       = S_DONE;
              n.res_pred = 1'b0;
            end else begin
              n.st       = S_CONFIRM;
              n.pflag    = 1'b1;
              n.res_pred = 1'b1;
              n.res_conf = wb_conf[u];
            end
          end
        for (int u = 0; u < W; u++)
          if (cf_fire[u] && cf_tag[u] == tag_t'(e)) begin
            if (cf_bad[u]) begin
              n.st = S_ISSUE;
              for (int k = 0; k < 2; k++) begin
                n.src[k].pred = 1'b0;
                n.src[k].misp = 1'b0;
              end
            end else begin
              n.st       = S_DONE;
              n.res_pred = 1'b0;
            end
          end
        for (int c = 0; c < NCDB; c++)
          for (int k = 0; k < 2; k++)
            if (cdb[c].valid && n.src[k].used && n.src[k].wt && n.src[k].tag == cdb[c].tag) begin
              n.src[k].wt  = 1'b0;
              n.src[k].val = cdb[c].value;
              n.src[k].rdy = 1'b1;
              if (n.src[k].pred) n.src[k].misp = cdb[c].misp;
            end
        rob[e] <= n;
      end

      // commit
      for (int c = 0; c < W; c++)
        if (cm_fire[c]) begin
          tag_t e;
          e = head + tag_t'(c);
          rob_v[e] <= 1'b0;
          if (rob[e].wen) begin
            arf[rob[e].rd] <= rob[e].res;
            if (rs_busy[rob[e].rd] && rs_tag[rob[e].rd] == e)
              rs_busy[rob[e].rd] <= 1'b0;
          end
        end
      head <= head + tag_t'(cm_n);

      // dispatch (after commit so a new producer wins the register status)
      if (can_dispatch) begin
        for (int l = 0; l < W; l++)
          if (d_valid[l]) begin
            rob[tail + tag_t'(l)]   <= d_new[l];
            rob_v[tail + tag_t'(l)] <= 1'b1;
            if (d_new[l].wen) begin
              rs_busy[d_ins[l].rd] <= 1'b1;
              rs_tag[d_ins[l].rd]  <= tail + tag_t'(l);
            end
          end
        tail <= tail + tag_t'(d_n);
      end

      count <= count + (can_dispatch ? d_n : '0) - cm_n;
    end
  end

  // ---------------------------------------------------------------------
  // Events
  // ---------------------------------------------------------------------
  always_comb begin
    ev                = '0;
    ev.rob_full_stall = evcnt_t'(d_any && vp_init_done && !can_dispatch);
    ev.load_wait_store = evcnt_t'(ld_wait_st);
    for (int l = 0; l < W; l++) begin
      logic dl;
      dl = can_dispatch && d_valid[l];
      ev.dispatch        += evcnt_t'(dl);
      ev.reuse_actual    += evcnt_t'(dl && d_path[l] == D_REUSE);
      ev.reuse_predicted += evcnt_t'(dl && d_path[l] == D_REUSE_PRED);
      ev.reuse_unused    += evcnt_t'(dl && d_pass_any[l] && d_path[l] == D_VP);
      ev.vp_used         += evcnt_t'(dl && d_path[l] == D_VP);
      ev.branch_early    += evcnt_t'(dl && d_path[l] == D_REUSE && d_ins[l].op == OP_BEQ);
      ev.group_forward   += evcnt_t'(dl && d_fwd[l]);
      ev.load_vp         += evcnt_t'(dl && d_path[l] == D_VP && d_ins[l].op == OP_LD);
    end
    for (int u = 0; u < W; u++) begin
      ev.issue_predicted += evcnt_t'(is_fire[u] && (is_src[u][0].pred || is_src[u][1].pred));
      ev.wb_correct      += evcnt_t'(wb_q[u].valid && wb_pflag[u] && !wb_misp[u]);
      ev.wb_mispredict   += evcnt_t'(wb_q[u].valid && wb_misp[u]);
      ev.wb_to_confirm   += evcnt_t'(wb_q[u].valid && !wb_pflag[u] && wb_used_pred[u]);
      ev.confirm_ok      += evcnt_t'(cf_fire[u] && !cf_bad[u]);
      ev.confirm_reexec  += evcnt_t'(cf_fire[u] && cf_bad[u]);
      ev.commit          += evcnt_t'(cm_fire[u]);
    end
  end

  // ---------------------------------------------------------------------
  // Checks
  // ---------------------------------------------------------------------
  for (genvar u = 0; u < W; u++) begin : g_chk
    // at most two executions: a re-executing entry always has its flag set
    a_reexec_flag: assert property (@(posedge clk) disable iff (!rst_n)
      cf_fire[u] && cf_bad[u] |-> rob[cf_tag[u]].pflag);
    // a final result never carries the predicted bit
    a_done_final: assert property (@(posedge clk) disable iff (!rst_n)
      cm_fire[u] |-> !rob[head + tag_t'(u)].res_pred);
    // writeback only targets an executing entry
    a_wb_exec: assert property (@(posedge clk) disable iff (!rst_n)
      wb_q[u].valid |-> rob_v[wb_q[u].tag] && rob[wb_q[u].tag].st == S_EXEC);
  end
  // a dispatch group is packed towards lane 0
  a_in_packed: assert property (@(posedge clk) disable iff (!rst_n)
    in_ready |-> ((in_valid & (in_valid + 1'b1)) == '0));

endmodule
