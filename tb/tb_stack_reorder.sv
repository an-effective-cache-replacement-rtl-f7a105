// Self-checking testbench for stack_reorder.
//
// For random permutations of 8 way numbers, every stack entry and both
// values of N, the reordered stack is compared with a reference built with
// queue operations: remove the moved way, then push it at the front (N = 1)
// or at the back (N = 0). It also replays the four stack pictures of the
// policy (LRU/MRU miss and hit with entries a..h).
module tb_stack_reorder;
  localparam int unsigned WAYS = 8;
  localparam int unsigned WAY_W = 3;

  logic [WAYS-1:0][WAY_W-1:0] order_i, order_o;
  logic [WAY_W-1:0]           pos;
  logic                       n;
  int unsigned                checks = 0, failures = 0;

  stack_reorder #(.WAYS(WAYS), .WAY_W(WAY_W)) dut (
    .order_i(order_i), .pos_i(pos), .n_i(n), .order_o(order_o)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_case(input logic [WAYS-1:0][WAY_W-1:0] o, input int p, input logic nn);
    int q[$];
    int moved;
    for (int i = 0; i < WAYS; i++) q.push_back(int'(o[i]));
    moved = q[p];
    q.delete(p);
    if (nn) q.push_front(moved); else q.push_back(moved);
    order_i = o; pos = WAY_W'(p); n = nn;
    #1;
    for (int i = 0; i < WAYS; i++) begin
      checks++;
      if (int'(order_o[i]) != q[i]) begin
        failures++;
        $display("FAIL: pos=%0d n=%0b entry %0d got %0d want %0d", p, nn, i, order_o[i], q[i]);
      end
    end
  endtask

  // Stack a..h is ways 0..7 from top to bottom.
  task automatic picture(input int p, input logic nn, input int exp[WAYS]);
    for (int i = 0; i < WAYS; i++) order_i[i] = WAY_W'(i);
    pos = WAY_W'(p); n = nn;
    #1;
    for (int i = 0; i < WAYS; i++) begin
      checks++;
      if (int'(order_o[i]) != exp[i]) begin
        failures++;
        $display("FAIL: picture pos=%0d n=%0b entry %0d got %0d want %0d", p, nn, i, order_o[i], exp[i]);
      end
    end
  endtask

  initial begin
    // miss, N=1: x takes h's way (7) and goes on top: x a b c d e f g
    picture(7, 1'b1, '{7, 0, 1, 2, 3, 4, 5, 6});
    // miss, N=0: x replaces h at the bottom: a b c d e f g x
    picture(7, 1'b0, '{0, 1, 2, 3, 4, 5, 6, 7});
    // hit on c, N=1: c a b d e f g h
    picture(2, 1'b1, '{2, 0, 1, 3, 4, 5, 6, 7});
    // hit on c, N=0: a b d e f g h c
    picture(2, 1'b0, '{0, 1, 3, 4, 5, 6, 7, 2});
    for (int t = 0; t < 300; t++) begin
      logic [WAYS-1:0][WAY_W-1:0] o;
      int perm[WAYS];
      for (int i = 0; i < WAYS; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < WAYS; i++) o[i] = WAY_W'(perm[i]);
      check_case(o, $urandom_range(0, WAYS - 1), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
