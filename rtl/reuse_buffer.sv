// reuse_buffer: instruction reuse buffer, operand-value (Sv) scheme.
//
// Each entry holds an instruction's PC tag, the operand values it was
// executed with and its result (for a branch, its next PC). The buffer has
// RB_N entries in RB_N/4 sets of 4 ways and is indexed by the PC, so the
// same instruction may own several ways, each for a different operand set.
// The reuse test (vpir_pkg::reuse_test) compares an instruction's current
// operands with the stored ones; on a match the stored result is reused.
//
// Replacement counters: when a tested instruction passes the reuse test the
// way that passed gets +INC_BONUS; when it is present but no way passes,
// every way holding it gets -MISP_PEN. A new instance does not evict a
// resident one at once: the victim way (an invalid way, else the one with
// the lowest counter) has its counter decreased by MISP_PEN, and it is
// replaced only when the counter falls below REPL_THRESH. A new entry
// starts at REPL_THRESH.
//
// Interface and timing (LANES ports of each kind, lane 0 oldest):
//  * lookup: lk_pc[l] in cycle t (fetch); the set is read synchronously and
//    lk_ways[l] shows its 4 ways in cycle t+1 (dispatch), 'hit' marking the
//    ways that hold the PC. The core runs the reuse test on them.
//  * test feedback, in that dispatch cycle: test_en[l] says the test was
//    made, test_pass[l]/test_way[l] its outcome; the counters are trained.
//  * insert: ins_*[l] at writeback; the set is read, checked and written in
//    the same cycle. An instance already present is left alone. When two
//    lanes insert into the same set in one cycle only the older one is
//    taken (the buffer is a hint: a lost insertion costs only a reuse).
// Valid bits and counters are flip-flops cleared by reset; the data ways
// are a memory array. Size, associativity and counter policy follow the
// design description; REPL_THRESH, the victim choice and the same-set rule
// are this design's.
module reuse_buffer
  import vpir_pkg::*;
#(
  parameter int    RB_N        = 1024,
  parameter conf_t REPL_THRESH = 4'd4,
  parameter int    LANES       = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // lookup
  input  pc_t     [LANES-1:0]          lk_pc,
  output rb_way_t [LANES-1:0][3:0]     lk_ways,
  // reuse test outcome
  input  logic    [LANES-1:0]          test_en,
  input  logic    [LANES-1:0]          test_pass,
  input  logic    [LANES-1:0][1:0]     test_way,
  // insertion
  input  logic    [LANES-1:0]          ins_valid,
  input  pc_t     [LANES-1:0]          ins_pc,
  input  xlen_t   [LANES-1:0]          ins_a,
  input  xlen_t   [LANES-1:0]          ins_b,
  input  xlen_t   [LANES-1:0]          ins_result
);

  localparam int WAYS  = 4;
  localparam int SETS  = RB_N / WAYS;
  localparam int SET_W = $clog2(SETS);
  localparam int TAG_W = PC_W - SET_W;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    xlen_t            a;
    xlen_t            b;
    xlen_t            result;
  } rb_entry_t;

  rb_entry_t [WAYS-1:0] data [SETS];
  logic  [WAYS-1:0] valid [SETS];
  conf_t [WAYS-1:0] repl  [SETS];

  function automatic logic [SET_W-1:0] set_of(pc_t pc);
    return pc[SET_W-1:0];
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(pc_t pc);
    return pc[PC_W-1:SET_W];
  endfunction

  // ---------------------------------------------------------------------
  // Lookup (fetch): set read; ways presented in dispatch
  // ---------------------------------------------------------------------
  rb_entry_t [LANES-1:0][WAYS-1:0] lk_d;
  logic      [LANES-1:0][SET_W-1:0] lk_set;
  pc_t       [LANES-1:0]            lk_pc_q;
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      lk_d[l]    <= data[set_of(lk_pc[l])];
      lk_set[l]  <= set_of(lk_pc[l]);
      lk_pc_q[l] <= lk_pc[l];
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int w = 0; w < WAYS; w++) begin
        lk_ways[l][w].hit    = valid[lk_set[l]][w] && (lk_d[l][w].tag == tag_of(lk_pc_q[l]));
        lk_ways[l][w].a      = lk_d[l][w].a;
        lk_ways[l][w].b      = lk_d[l][w].b;
        lk_ways[l][w].result = lk_d[l][w].result;
      end
  end

  // ---------------------------------------------------------------------
  // Insertion
  // ---------------------------------------------------------------------
  logic [LANES-1:0][SET_W-1:0] i_set;
  logic [LANES-1:0]            i_do, i_replace;
  logic [LANES-1:0][1:0]       i_way;
  conf_t [LANES-1:0]           i_cnt;
  always_comb begin
    i_set = '0; i_do = '0; i_replace = '0; i_way = '0; i_cnt = '0;
    for (int l = 0; l < LANES; l++) begin
      rb_entry_t [WAYS-1:0] d;
      logic present, free, clash;
      i_set[l] = set_of(ins_pc[l]);
      d        = data[i_set[l]];
      present  = 1'b0;
      free     = 1'b0;
      clash    = 1'b0;
      for (int j = 0; j < l; j++)
        if (ins_valid[j] && i_set[j] == i_set[l]) clash = 1'b1;
      for (int w = 0; w < WAYS; w++)
        if (valid[i_set[l]][w] && d[w].tag == tag_of(ins_pc[l]) &&
            d[w].a == ins_a[l] && d[w].b == ins_b[l])
          present = 1'b1;
      for (int w = WAYS - 1; w >= 0; w--)
        if (!valid[i_set[l]][w]) begin
          free     = 1'b1;
          i_way[l] = 2'(w);
        end
      if (!free)
        for (int w = WAYS - 1; w >= 0; w--)
          if (repl[i_set[l]][w] <= repl[i_set[l]][i_way[l]]) i_way[l] = 2'(w);
      i_cnt[l]     = sat_dec(repl[i_set[l]][i_way[l]], MISP_PEN);
      i_replace[l] = free || (i_cnt[l] < REPL_THRESH);
      i_do[l]      = ins_valid[l] && !present && !clash;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        repl[s]  <= '0;
      end
    end else begin
      for (int l = 0; l < LANES; l++)
        if (test_en[l])
          for (int w = 0; w < WAYS; w++)
            if (test_pass[l] ? (test_way[l] == 2'(w)) : lk_ways[l][w].hit)
              repl[lk_set[l]][w] <= test_pass[l] ? sat_inc(repl[lk_set[l]][w], INC_BONUS)
                                                 : sat_dec(repl[lk_set[l]][w], MISP_PEN);
      for (int l = 0; l < LANES; l++)
        if (i_do[l]) begin
          if (i_replace[l]) begin
            valid[i_set[l]][i_way[l]] <= 1'b1;
            repl[i_set[l]][i_way[l]]  <= REPL_THRESH;
          end else begin
            repl[i_set[l]][i_way[l]]  <= i_cnt[l];
          end
        end
    end
  end

  always_ff @(posedge clk)
    for (int l = 0; l < LANES; l++)
      if (i_do[l] && i_replace[l])
        data[i_set[l]][i_way[l]] <= '{tag: tag_of(ins_pc[l]), a: ins_a[l], b: ins_b[l],
                                      result: ins_result[l]};

endmodule
