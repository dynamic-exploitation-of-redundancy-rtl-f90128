// hybrid_vp: hybrid stride + context value predictor.
//
// Two tables:
//  * Value History Table (VHT, VHT_N entries, indexed by the PC, tagged):
//    last 4 results of the instruction, the two-delta stride state
//    (stride in use and last stride seen), a stride warmup counter, the
//    stride confidence counter and a replacement counter.
//  * Value Prediction Table (VPT, VPT_N entries): value to predict, a
//    context confidence counter and a warmup counter. It is indexed by the
//    4 history values of the VHT entry folded into an index with xor.
//
// The stride component predicts last value + stride. The stride in use is
// replaced only when the same new stride has been seen twice in a row. The
// context component predicts VPT[hash(history)]. A component may predict
// once its warmup counter has reached WARM_THRESH and its confidence is
// above PRED_THRESH. When both may predict the one with the higher
// confidence wins, the stride component on a tie. Confidences move by
// +INC_BONUS on a correct and -MISP_PEN on a wrong outcome, saturating at
// CONF_MAX. On a conflict miss the resident entry's replacement counter is
// decreased by MISP_PEN and the entry is replaced only once the counter has
// fallen below REPL_THRESH; a correct outcome raises it by INC_BONUS.
//
// Interface and timing (LANES lookup and LANES training ports, one per
// instruction of a dispatch / commit group; lane 0 is the oldest):
//  * lookup: lk_pc[l] is presented in cycle t (fetch). The VHT is read
//    synchronously; in cycle t+1 the VPT is read and pred_*[l] are valid
//    (dispatch). The lookups run every cycle.
//  * update: upd_valid/upd_pc/upd_value[l] train the tables with known-good
//    results, in lane order. Entries are read, recomputed and written in the
//    same cycle; a lane sees what older lanes of the same cycle wrote, so a
//    group behaves like the same updates made one after another.
//  * after reset both tables are cleared by a sweep of max(VHT_N, VPT_N)
//    cycles; init_done rises when it is over and no prediction is made
//    before.
// Table sizes, counter constants and the update rules follow the design
// description. The hash, PC tag, warmup threshold, replacement threshold,
// initial counter values and the clearing sweep are this design's choices.
module hybrid_vp
  import vpir_pkg::*;
#(
  parameter int    VHT_N       = 4096,
  parameter int    VPT_N       = 8192,
  parameter int    WARM_THRESH = 2,
  parameter conf_t REPL_THRESH = 4'd4,
  parameter int    LANES       = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    init_done,
  // lookup
  input  pc_t   [LANES-1:0]       lk_pc,
  output logic  [LANES-1:0]       pred_valid,
  output xlen_t [LANES-1:0]       pred_value,
  output conf_t [LANES-1:0]       pred_conf,
  output logic  [LANES-1:0]       pred_is_stride,
  // training
  input  logic  [LANES-1:0]       upd_valid,
  input  pc_t   [LANES-1:0]       upd_pc,
  input  xlen_t [LANES-1:0]       upd_value
);

  localparam int VHT_W = $clog2(VHT_N);
  localparam int VPT_W = $clog2(VPT_N);
  localparam int TAG_W = PC_W - VHT_W;
  localparam int INIT_N = (VHT_N > VPT_N) ? VHT_N : VPT_N;
  localparam int INIT_W = $clog2(INIT_N) + 1;

  typedef struct packed {
    logic               valid;
    logic [TAG_W-1:0]   tag;
    xlen_t [3:0]        hist;        // hist[0] is the most recent value
    xlen_t              stride;      // stride used for prediction
    xlen_t              last_stride; // most recent stride seen
    logic [1:0]         warm;        // stride warmup counter
    conf_t              sconf;       // stride confidence
    conf_t              repl;        // replacement counter
  } vht_t;

  typedef struct packed {
    xlen_t      value;
    logic [1:0] warm;
    conf_t      cconf;               // context confidence
  } vpt_t;

  vht_t vht [VHT_N];
  vpt_t vpt [VPT_N];

  // xor-fold of the 4 history values; older values are rotated further so
  // that the order of the history matters.
  function automatic logic [VPT_W-1:0] ctx_hash(xlen_t [3:0] h);
    xlen_t x;
    logic [VPT_W-1:0] idx;
    x = h[0] ^ {h[1][XLEN-6:0], h[1][XLEN-1:XLEN-5]}
             ^ {h[2][XLEN-11:0], h[2][XLEN-1:XLEN-10]}
             ^ {h[3][XLEN-16:0], h[3][XLEN-1:XLEN-15]};
    idx = '0;
    for (int i = 0; i < XLEN; i += VPT_W) idx ^= VPT_W'(x >> i);
    return idx;
  endfunction

  function automatic logic [VHT_W-1:0] vht_idx(pc_t pc);
    return pc[VHT_W-1:0];
  endfunction

  function automatic logic [TAG_W-1:0] vht_tag(pc_t pc);
    return pc[PC_W-1:VHT_W];
  endfunction

  // ---------------------------------------------------------------------
  // Clearing sweep
  // ---------------------------------------------------------------------
  logic [INIT_W-1:0] init_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) init_cnt <= '0;
    else if (!init_done) init_cnt <= init_cnt + 1'b1;
  end
  assign init_done = (init_cnt == INIT_W'(INIT_N));

  // ---------------------------------------------------------------------
  // Lookup: VHT read in the fetch cycle, VPT read in the dispatch cycle
  // ---------------------------------------------------------------------
  vht_t [LANES-1:0] lk_e;
  pc_t  [LANES-1:0] lk_pc_q;
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      lk_e[l]    <= vht[vht_idx(lk_pc[l])];
      lk_pc_q[l] <= lk_pc[l];
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      vpt_t v;
      logic hit, s_ok, c_ok;
      v    = vpt[ctx_hash(lk_e[l].hist)];
      hit  = init_done && lk_e[l].valid && (lk_e[l].tag == vht_tag(lk_pc_q[l]));
      s_ok = hit && (lk_e[l].warm >= 2'(WARM_THRESH)) && (lk_e[l].sconf > PRED_THRESH);
      c_ok = hit && (v.warm >= 2'(WARM_THRESH)) && (v.cconf > PRED_THRESH);
      pred_valid[l]     = s_ok || c_ok;
      pred_is_stride[l] = s_ok && (!c_ok || lk_e[l].sconf >= v.cconf);
      pred_value[l]     = pred_is_stride[l] ? lk_e[l].hist[0] + lk_e[l].stride : v.value;
      pred_conf[l]      = !pred_valid[l] ? '0 : (pred_is_stride[l] ? lk_e[l].sconf : v.cconf);
    end
  end

  // ---------------------------------------------------------------------
  // Training, lane by lane with forwarding between lanes
  // ---------------------------------------------------------------------
  vht_t [LANES-1:0]             u_e_n;
  vpt_t [LANES-1:0]             u_v_n;
  logic [LANES-1:0][VHT_W-1:0]  u_i;
  logic [LANES-1:0][VPT_W-1:0]  u_ci;
  logic [LANES-1:0]             u_vpt_we;

  always_comb begin
    u_e_n    = '0;
    u_v_n    = '0;
    u_vpt_we = '0;
    for (int l = 0; l < LANES; l++) begin
      vht_t  e, en;
      vpt_t  v, vn;
      logic  hit, s_right, c_right;
      xlen_t new_stride;
      u_i[l] = vht_idx(upd_pc[l]);
      e      = vht[u_i[l]];
      for (int j = 0; j < l; j++)
        if (upd_valid[j] && u_i[j] == u_i[l]) e = u_e_n[j];
      u_ci[l] = ctx_hash(e.hist);
      v       = vpt[u_ci[l]];
      for (int j = 0; j < l; j++)
        if (upd_valid[j] && u_vpt_we[j] && u_ci[j] == u_ci[l]) v = u_v_n[j];
      hit        = e.valid && (e.tag == vht_tag(upd_pc[l]));
      en         = e;
      vn         = v;
      u_vpt_we[l] = 1'b0;
      new_stride = upd_value[l] - e.hist[0];
      s_right    = (e.hist[0] + e.stride) == upd_value[l];
      c_right    = v.value == upd_value[l];
      if (hit) begin
        // stride component
        if (e.warm >= 2'(WARM_THRESH))
          en.sconf = s_right ? sat_inc(e.sconf, INC_BONUS) : sat_dec(e.sconf, MISP_PEN);
        if (new_stride == e.last_stride) en.stride = new_stride;  // two-delta
        en.last_stride = new_stride;
        if (e.warm != 2'b11) en.warm = e.warm + 2'd1;
        // context component
        u_vpt_we[l] = 1'b1;
        if (v.warm >= 2'(WARM_THRESH))
          vn.cconf = c_right ? sat_inc(v.cconf, INC_BONUS) : sat_dec(v.cconf, MISP_PEN);
        if (v.warm != 2'b11) vn.warm = v.warm + 2'd1;
        vn.value = upd_value[l];
        en.hist  = {e.hist[2:0], upd_value[l]};
        // replacement counter follows how useful the entry is
        en.repl = (s_right || c_right) ? sat_inc(e.repl, INC_BONUS)
                                       : sat_dec(e.repl, MISP_PEN);
      end else if (!e.valid || sat_dec(e.repl, MISP_PEN) < REPL_THRESH) begin
        // allocate
        en         = '0;
        en.valid   = 1'b1;
        en.tag     = vht_tag(upd_pc[l]);
        en.hist[0] = upd_value[l];
        en.repl    = REPL_THRESH;
      end else begin
        // conflict: keep the resident entry, make it easier to evict
        en.repl = sat_dec(e.repl, MISP_PEN);
      end
      u_e_n[l] = en;
      u_v_n[l] = vn;
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      if (init_cnt < INIT_W'(VHT_N)) vht[init_cnt[VHT_W-1:0]] <= '0;
      if (init_cnt < INIT_W'(VPT_N)) vpt[init_cnt[VPT_W-1:0]] <= '0;
    end else begin
      // later lanes are written last and so win on a shared entry
      for (int l = 0; l < LANES; l++)
        if (upd_valid[l]) begin
          vht[u_i[l]] <= u_e_n[l];
          if (u_vpt_we[l]) vpt[u_ci[l]] <= u_v_n[l];
        end
    end
  end

endmodule
