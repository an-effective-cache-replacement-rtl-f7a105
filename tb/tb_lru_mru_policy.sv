// Self-checking testbench for lru_mru_policy.
//
// The testbench plays the tag store of a small cache (4 sets x 4 ways, tags
// from a small alphabet so that hits, misses and repeated tags are all
// frequent). For each access it works out hit and hit way itself, feeds them
// and the set's valid bits to the policy, and compares N, the victim way and
// the set's stack with a reference model: a queue of ways per set (front =
// top), a single previous tag starting at 0, the lowest invalid way first,
// otherwise the way at the back of the queue.
module tb_lru_mru_policy;
  localparam int unsigned SETS = 4, WAYS = 4, TAG_W = 6, SET_W = 2, WAY_W = 2;

  logic                       clk = 1'b0;
  logic                       rst_n;
  logic                       acc_valid;
  logic [SET_W-1:0]           acc_set;
  logic [TAG_W-1:0]           acc_tag;
  logic                       acc_hit;
  logic [WAY_W-1:0]           acc_hit_way;
  logic [WAYS-1:0]            set_valid;
  logic [WAY_W-1:0]           victim;
  logic                       n;
  logic [WAYS-1:0][WAY_W-1:0] order;

  int unsigned checks = 0, failures = 0;
  int unsigned cnt_hit_top = 0, cnt_hit_bottom = 0, cnt_miss_top = 0, cnt_miss_bottom = 0, cnt_evict = 0;

  lru_mru_policy #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .SET_W(SET_W), .WAY_W(WAY_W)) dut (
    .clk(clk), .rst_n(rst_n), .acc_valid_i(acc_valid), .acc_set_i(acc_set), .acc_tag_i(acc_tag),
    .acc_hit_i(acc_hit), .acc_hit_way_i(acc_hit_way), .set_valid_i(set_valid),
    .victim_way_o(victim), .n_o(n), .order_o(order)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int               ref_q[SETS][$];
  logic [TAG_W-1:0] ref_tag[SETS][WAYS];
  logic             ref_valid[SETS][WAYS];
  logic [TAG_W-1:0] ref_prev;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    rst_n = 1'b0; acc_valid = 1'b0; acc_set = '0; acc_tag = '0; acc_hit = 1'b0;
    acc_hit_way = '0; set_valid = '0; ref_prev = '0;
    for (int s = 0; s < SETS; s++) begin
      for (int w = 0; w < WAYS; w++) begin ref_q[s].push_back(w); ref_valid[s][w] = 1'b0; ref_tag[s][w] = '0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int   s, hw, pos, vic, exp_n;
      bit   h;
      @(negedge clk);
      s = $urandom_range(0, SETS - 1);
      acc_set = SET_W'(s);
      // repeat the previous tag often to exercise N = 0
      acc_tag = ($urandom_range(0, 2) == 0) ? ref_prev : TAG_W'($urandom_range(0, 7));
      h = 1'b0; hw = 0;
      for (int w = 0; w < WAYS; w++) begin
        set_valid[w] = ref_valid[s][w];
        if (ref_valid[s][w] && ref_tag[s][w] == acc_tag) begin h = 1'b1; hw = w; end
      end
      acc_hit = h; acc_hit_way = WAY_W'(hw);
      acc_valid = ($urandom_range(0, 7) != 0);
      #1;
      exp_n = (acc_tag != ref_prev);
      vic = -1;
      for (int w = WAYS - 1; w >= 0; w--) if (!ref_valid[s][w]) vic = w;
      if (vic < 0) vic = ref_q[s][WAYS - 1];
      check(n == 1'(exp_n), $sformatf("N=%0b expected %0d", n, exp_n));
      check(int'(victim) == vic, $sformatf("victim %0d expected %0d", victim, vic));
      for (int k = 0; k < WAYS; k++)
        check(int'(order[k]) == ref_q[s][k], $sformatf("set %0d entry %0d = %0d expected %0d", s, k, order[k], ref_q[s][k]));
      if (acc_valid) begin
        int tw;
        tw = h ? hw : vic;
        if (!h && ref_valid[s][vic]) cnt_evict++;
        if (h) begin if (exp_n) cnt_hit_top++; else cnt_hit_bottom++; end
        else   begin if (exp_n) cnt_miss_top++; else cnt_miss_bottom++; end
        foreach (ref_q[s][k]) if (ref_q[s][k] == tw) pos = k;
        ref_q[s].delete(pos);
        if (exp_n) ref_q[s].push_front(tw); else ref_q[s].push_back(tw);
        if (!h) begin ref_tag[s][tw] = acc_tag; ref_valid[s][tw] = 1'b1; end
        ref_prev = acc_tag;
      end
      @(posedge clk);
    end
    check(cnt_hit_top > 0 && cnt_hit_bottom > 0 && cnt_miss_top > 0 && cnt_miss_bottom > 0 && cnt_evict > 0,
          $sformatf("coverage hit_top=%0d hit_bottom=%0d miss_top=%0d miss_bottom=%0d evict=%0d",
                    cnt_hit_top, cnt_hit_bottom, cnt_miss_top, cnt_miss_bottom, cnt_evict));
    $display("coverage hit_top=%0d hit_bottom=%0d miss_top=%0d miss_bottom=%0d evict=%0d",
             cnt_hit_top, cnt_hit_bottom, cnt_miss_top, cnt_miss_bottom, cnt_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
