// tb_reuse_buffer: self-check of the reuse buffer.
//  * empty buffer: no hit; after one insertion the reuse test passes only
//    for the stored operands and returns the stored result;
//  * one PC may hold 4 instances (4 ways) at once; another PC in the same
//    set does not hit;
//  * a 5th instance replaces the way with the lowest replacement counter;
//  * ways whose counters have been raised by reuse hits survive two
//    conflicting insertions and give way on the third;
//  * results are available one cycle after the PC is presented;
//  * two lanes inserting into different sets in one cycle are both taken,
//    into the same set only the older lane is.
// The testbench runs the reuse test itself on the ways the buffer shows.
module tb_reuse_buffer;
  import vpir_pkg::*;

  localparam int RB_N = 1024, SETS = RB_N / 4;

  localparam int L = 4;
  logic  clk = 0, rst_n = 0;
  pc_t     [L-1:0]      lk_pc_v, ins_pc_v;
  rb_way_t [L-1:0][3:0] lk_ways;
  logic    [L-1:0]      test_en_v, test_pass_v, ins_valid_v;
  logic    [L-1:0][1:0] test_way_v;
  xlen_t   [L-1:0]      ins_a_v, ins_b_v, ins_result_v;
  // lane 0 view
  pc_t   lk_pc, ins_pc;
  xlen_t t_a, t_b, rb_result, ins_a, ins_b, ins_result;
  logic  test_en, rb_hit, rb_pass, ins_valid;
  logic [1:0] pass_way;
  int    checks = 0, failures = 0;

  reuse_buffer dut (.clk, .rst_n, .lk_pc(lk_pc_v), .lk_ways, .test_en(test_en_v),
                    .test_pass(test_pass_v), .test_way(test_way_v),
                    .ins_valid(ins_valid_v), .ins_pc(ins_pc_v), .ins_a(ins_a_v),
                    .ins_b(ins_b_v), .ins_result(ins_result_v));

  logic  [L-1:0] lane_ins = '0;
  pc_t   [L-1:0] lane_pc = '0;
  xlen_t [L-1:0] lane_a = '0, lane_res = '0;

  // reuse test on lane 0, written out here
  always_comb begin
    rb_hit = 0; rb_pass = 0; rb_result = 0; pass_way = 0;
    for (int w = 0; w < 4; w++) begin
      if (lk_ways[0][w].hit) rb_hit = 1;
      if (!rb_pass && lk_ways[0][w].hit && lk_ways[0][w].a == t_a && lk_ways[0][w].b == t_b) begin
        rb_pass = 1; rb_result = lk_ways[0][w].result; pass_way = 2'(w);
      end
    end
    lk_pc_v[0]      = lk_pc;
    test_en_v[0]    = test_en;
    test_pass_v[0]  = rb_pass;
    test_way_v[0]   = pass_way;
    ins_valid_v[0]  = ins_valid;
    ins_pc_v[0]     = ins_pc;
    ins_a_v[0]      = ins_a;
    ins_b_v[0]      = ins_b;
    ins_result_v[0] = ins_result;
    for (int l = 1; l < L; l++) begin
      lk_pc_v[l] = '0; test_en_v[l] = 0; test_pass_v[l] = 0; test_way_v[l] = '0;
      ins_valid_v[l] = lane_ins[l]; ins_pc_v[l] = lane_pc[l];
      ins_a_v[l] = lane_a[l]; ins_b_v[l] = 0; ins_result_v[l] = lane_res[l];
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic insert(pc_t pc, xlen_t a, xlen_t b, xlen_t r);
    ins_valid = 1; ins_pc = pc; ins_a = a; ins_b = b; ins_result = r;
    @(posedge clk); #1;
    ins_valid = 0;
  endtask

  // look the PC up, then test the operands in the next cycle
  task automatic probe(pc_t pc, xlen_t a, xlen_t b, logic train);
    lk_pc = pc;
    @(posedge clk); #1;
    t_a = a; t_b = b; test_en = train;
    #1;
  endtask

  task automatic end_probe();
    @(posedge clk); #1;
    test_en = 0;
  endtask

  localparam pc_t P = 32'h0000_0042;

  initial begin
    ins_valid = 0; test_en = 0; lk_pc = 0; t_a = 0; t_b = 0;
    ins_pc = 0; ins_a = 0; ins_b = 0; ins_result = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    probe(P, 1, 2, 0);
    check("empty: no hit", !rb_hit && !rb_pass);
    end_probe();

    insert(P, 1, 2, 3);
    probe(P, 1, 2, 0);
    check("reuse test passes", rb_hit && rb_pass && rb_result == 3);
    end_probe();
    probe(P, 1, 5, 0);
    check("operand differs: hit without reuse", rb_hit && !rb_pass);
    end_probe();
    probe(P + SETS, 1, 2, 0);
    check("other PC in same set: no hit", !rb_hit && !rb_pass);
    end_probe();

    // four instances of the same PC
    insert(P, 10, 0, 100);
    insert(P, 20, 0, 200);
    insert(P, 30, 0, 300);
    probe(P, 10, 0, 0); check("way 2 instance", rb_pass && rb_result == 100); end_probe();
    probe(P, 20, 0, 0); check("way 3 instance", rb_pass && rb_result == 200); end_probe();
    probe(P, 30, 0, 0); check("way 4 instance", rb_pass && rb_result == 300); end_probe();
    probe(P, 1, 2, 0);  check("way 1 instance kept", rb_pass && rb_result == 3); end_probe();

    // raise the counters of all but the (30,0) instance to 10
    for (int i = 0; i < 3; i++) begin
      probe(P, 1, 2, 1);  end_probe();
      probe(P, 10, 0, 1); end_probe();
      probe(P, 20, 0, 1); end_probe();
    end
    insert(P, 40, 0, 400);
    probe(P, 40, 0, 0); check("5th instance replaced lowest counter way", rb_pass && rb_result == 400); end_probe();
    probe(P, 30, 0, 0); check("victim instance gone", rb_hit && !rb_pass); end_probe();
    probe(P, 1, 2, 0);  check("busy instance kept", rb_pass && rb_result == 3); end_probe();
    probe(P, 10, 0, 0); check("busy instance kept", rb_pass && rb_result == 100); end_probe();

    // saturate every way's counter
    for (int i = 0; i < 6; i++) begin
      probe(P, 40, 0, 1); end_probe();
    end
    for (int i = 0; i < 3; i++) begin
      probe(P, 1, 2, 1);  end_probe();
      probe(P, 10, 0, 1); end_probe();
      probe(P, 20, 0, 1); end_probe();
    end
    // all at 15: a new instance needs three tries (15 -> 11 -> 7 -> 3 < 4)
    insert(P, 50, 0, 500);
    probe(P, 50, 0, 0); check("resists 1st conflict", !rb_pass); end_probe();
    insert(P, 50, 0, 500);
    probe(P, 50, 0, 0); check("resists 2nd conflict", !rb_pass); end_probe();
    probe(P, 1, 2, 0);  check("resident still there", rb_pass && rb_result == 3); end_probe();
    insert(P, 50, 0, 500);
    probe(P, 50, 0, 0); check("replaced at 3rd conflict", rb_pass && rb_result == 500); end_probe();
    probe(P, 1, 2, 0);  check("lowest-counter resident replaced", rb_hit && !rb_pass); end_probe();

    // reuse misses lower every resident way by 4: 3 misses from 15 leave 3,
    // so the next conflict replaces at once
    for (int i = 0; i < 3; i++) begin
      probe(P, 99, 99, 1); check("miss while present", rb_hit && !rb_pass); end_probe();
    end
    insert(P, 60, 0, 600);
    probe(P, 60, 0, 0); check("replaced after misses", rb_pass && rb_result == 600); end_probe();

    // timing: the result belongs to the PC of the previous cycle
    lk_pc = P;
    @(posedge clk); #1;
    lk_pc = P + 2; t_a = 60; t_b = 0; #1;
    check("one-cycle lookup", rb_pass && rb_result == 600);
    @(posedge clk); #1;
    check("next PC next cycle", !rb_hit);

    // lanes: lane 0 and lane 1 insert into sets P+3 and P+4, lane 2 into
    // P+3 as well (dropped), all in one cycle
    ins_valid = 1; ins_pc = P + 3; ins_a = 7; ins_b = 0; ins_result = 70;
    lane_ins[1] = 1; lane_pc[1] = P + 4; lane_a[1] = 8; lane_res[1] = 80;
    lane_ins[2] = 1; lane_pc[2] = P + 3; lane_a[2] = 9; lane_res[2] = 90;
    @(posedge clk); #1;
    ins_valid = 0; lane_ins = '0;
    probe(P + 3, 7, 0, 0); check("lane 0 insertion", rb_pass && rb_result == 70); end_probe();
    probe(P + 4, 8, 0, 0); check("lane 1 insertion", rb_pass && rb_result == 80); end_probe();
    probe(P + 3, 9, 0, 0); check("same-set younger lane dropped", rb_hit && !rb_pass); end_probe();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
