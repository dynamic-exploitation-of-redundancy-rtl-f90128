// tb_hybrid_vp: self-check of the hybrid stride/context value predictor.
//  * waits for the table clearing sweep and checks no prediction is made
//    before training;
//  * stride sequence: the predictor must stay silent until its confidence
//    exceeds the threshold (7th update with +2 per correct outcome after a
//    two-delta stride and warmup of 2), then predict last + stride with the
//    expected confidence; a broken stride must cost 4 confidence points;
//  * context sequence with no constant stride (period 4): the context
//    component must predict every element after enough periods and never
//    within the first 5 periods;
//  * replacement: a well-trained entry survives two conflicting
//    instructions and is replaced by the third;
//  * the prediction appears exactly one cycle after the PC is presented;
//  * four training values of one instruction in one cycle (one per lane)
//    train it exactly as four cycles of one value would, and all four
//    lookup lanes work at once.
module tb_hybrid_vp;
  import vpir_pkg::*;

  localparam int L = 4;
  logic  clk = 0, rst_n = 0;
  logic  init_done;
  pc_t   [L-1:0] lk_pc_v;
  logic  [L-1:0] pred_valid_v, pred_is_stride_v;
  xlen_t [L-1:0] pred_value_v;
  conf_t [L-1:0] pred_conf_v;
  logic  [L-1:0] upd_valid_v;
  pc_t   [L-1:0] upd_pc_v;
  xlen_t [L-1:0] upd_value_v;
  // lane 0 view used by most checks
  pc_t   lk_pc;
  logic  pred_valid, pred_is_stride, upd_valid;
  xlen_t pred_value, upd_value;
  conf_t pred_conf;
  pc_t   upd_pc;
  always_comb begin
    lk_pc_v[0]     = lk_pc;
    pred_valid     = pred_valid_v[0];
    pred_is_stride = pred_is_stride_v[0];
    pred_value     = pred_value_v[0];
    pred_conf      = pred_conf_v[0];
  end
  int    checks = 0, failures = 0;

  localparam int VHT_N = 4096;

  hybrid_vp dut (.clk, .rst_n, .init_done, .lk_pc(lk_pc_v), .pred_valid(pred_valid_v),
                 .pred_value(pred_value_v), .pred_conf(pred_conf_v),
                 .pred_is_stride(pred_is_stride_v), .upd_valid(upd_valid_v),
                 .upd_pc(upd_pc_v), .upd_value(upd_value_v));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic lookup(pc_t pc);
    lk_pc = pc;
    @(posedge clk);
    #1;
  endtask

  task automatic update(pc_t pc, xlen_t v);
    upd_valid_v = '0; upd_valid_v[0] = 1; upd_pc_v[0] = pc; upd_value_v[0] = v;
    @(posedge clk);
    #1;
    upd_valid_v = '0;
  endtask

  // one value per lane, lane 0 first
  task automatic update_group(pc_t pc, xlen_t v0, xlen_t step);
    for (int l = 0; l < L; l++) begin
      upd_valid_v[l] = 1; upd_pc_v[l] = pc; upd_value_v[l] = v0 + step * xlen_t'(l);
    end
    @(posedge clk);
    #1;
    upd_valid_v = '0;
  endtask

  xlen_t v, pat [4];
  int    ok_cnt;

  initial begin
    upd_valid_v = '0; upd_pc_v = '0; upd_value_v = '0; lk_pc = 0;
    for (int l = 1; l < L; l++) lk_pc_v[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    @(posedge clk); #1;

    // ---------------- stride ----------------
    lookup(32'h100);
    check("no prediction when empty", !pred_valid);
    v = 64'd1000;
    for (int n = 0; n < 14; n++) begin
      lookup(32'h100);
      if (n >= 7) begin
        check("stride predicts after training", pred_valid && pred_is_stride);
        check("stride value", pred_value == v);
        check("stride confidence", pred_conf == ((2 * (n - 3) > 15) ? 4'd15 : conf_t'(2 * (n - 3))));
      end else begin
        check("stride silent while confidence is low", !pred_valid);
      end
      update(32'h100, v);
      v += 64'd3;
    end
    // break the stride: confidence 15 -> 11, still predicting
    update(32'h100, v + 64'd50);
    lookup(32'h100);
    check("mispredict penalty 4", pred_valid && pred_conf == 4'd11);
    // two-delta: a single odd stride does not replace the stride in use
    check("two-delta keeps the stride", pred_value == v + 64'd53);

    // ---------------- context ----------------
    pat[0] = 64'd7; pat[1] = 64'd100; pat[2] = 64'd3; pat[3] = 64'd42;
    for (int per = 0; per < 5; per++)
      for (int i = 0; i < 4; i++) begin
        lookup(32'h200);
        check("context silent in first periods", !pred_valid);
        update(32'h200, pat[i]);
      end
    for (int per = 0; per < 7; per++)
      for (int i = 0; i < 4; i++) update(32'h200, pat[i]);
    ok_cnt = 0;
    for (int i = 0; i < 4; i++) begin
      lookup(32'h200);
      check("context predicts", pred_valid && !pred_is_stride);
      check("context value", pred_value == pat[i]);
      update(32'h200, pat[i]);
    end

    // ---------------- replacement ----------------
    // 0x100 is trained (replacement counter saturated). Conflicts map to the
    // same VHT index with another tag.
    v = 64'd5000;
    for (int n = 0; n < 12; n++) begin update(32'h300, v); v += 64'd1; end
    lookup(32'h300);
    check("trained entry predicts", pred_valid && pred_value == v);
    update(32'h300 + VHT_N, 64'd1);
    lookup(32'h300);
    check("survives first conflict", pred_valid && pred_value == v);
    update(32'h300 + VHT_N, 64'd1);
    lookup(32'h300);
    check("survives second conflict", pred_valid && pred_value == v);
    update(32'h300 + VHT_N, 64'd1);
    lookup(32'h300);
    check("replaced by third conflict", !pred_valid);

    // ---------------- one-cycle lookup latency ----------------
    lk_pc = 32'h100;
    @(posedge clk); #1;
    lk_pc = 32'h999;          // next PC is unknown, result must still be for 0x100
    check("prediction valid one cycle after the PC", pred_valid);
    @(posedge clk); #1;
    check("new PC seen one cycle later", !pred_valid);

    // ---------------- four lanes ----------------
    // 16 values of stride 5 in 4 cycles: confidence 2 * (16 - 3) -> 15 and
    // stride 5, exactly as after 16 single updates; a lookup on every lane
    v = 64'd77;
    for (int g = 0; g < 4; g++) begin
      update_group(32'h500, v, 64'd5);
      v += 64'd20;
    end
    lk_pc_v[1] = 32'h500; lk_pc_v[2] = 32'h200; lk_pc_v[3] = 32'h777;
    lookup(32'h100);
    check("lane 1: group-trained stride", pred_valid_v[1] && pred_is_stride_v[1] &&
          pred_value_v[1] == v && pred_conf_v[1] == 4'd15);
    check("lane 0 lookup in parallel", pred_valid_v[0]);
    check("lane 2 lookup in parallel", pred_valid_v[2] && !pred_is_stride_v[2]);
    check("lane 3: unknown PC", !pred_valid_v[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
