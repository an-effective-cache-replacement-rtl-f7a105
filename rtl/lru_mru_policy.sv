// LRU-MRU replacement state for a whole set-associative cache.
//
// Each set keeps a recency stack of its way numbers (stack_reorder explains
// the order). One tag_history register serves the cache and yields N for the
// access in progress. For every access presented with acc_valid_i:
//   hit : the hit way moves to the top of its set's stack when N = 1 and to
//         the bottom when N = 0;
//   miss: the victim is the way at the bottom of the stack; the new block
//         takes that way, which then moves to the top (N = 1) or stays at /
//         moves to the bottom (N = 0).
// While a set still has invalid ways, a miss fills the lowest-numbered
// invalid way instead of evicting the bottom entry; that way is then moved
// the same way as a victim would be. This cold-start rule is this design's
// own choice: the policy only describes a full set.
//
// Interface: the caller presents set index, tag, hit flag, hit way and the
// valid bits of the set; victim_way_o and n_o are combinational answers for
// that access. Stack and tag history update at the clock edge that ends a
// cycle with acc_valid_i high. order_o shows the addressed set's current
// stack (top first) for observation.
//
// Reset puts every stack in the order way 0 (top) .. way WAYS-1 (bottom) and
// clears the previous tag to 0, as the algorithm initialises it.
module lru_mru_policy #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 2,
  parameter int unsigned TAG_W = 20,
  parameter int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       acc_valid_i,
  input  logic [SET_W-1:0]           acc_set_i,
  input  logic [TAG_W-1:0]           acc_tag_i,
  input  logic                       acc_hit_i,
  input  logic [WAY_W-1:0]           acc_hit_way_i,
  input  logic [WAYS-1:0]            set_valid_i,
  output logic [WAY_W-1:0]           victim_way_o,
  output logic                       n_o,
  output logic [WAYS-1:0][WAY_W-1:0] order_o
);

  typedef logic [WAYS-1:0][WAY_W-1:0] order_t;

  order_t           stack_q [SETS];
  order_t           cur_order;
  order_t           next_order;
  logic [WAY_W-1:0] target_way;
  logic [WAY_W-1:0] target_pos;
  logic             any_invalid;
  logic [WAY_W-1:0] first_invalid;

  tag_history #(.TAG_W(TAG_W)) u_hist (
    .clk        (clk),
    .rst_n      (rst_n),
    .acc_valid_i(acc_valid_i),
    .acc_tag_i  (acc_tag_i),
    .n_o        (n_o)
  );

  assign cur_order = stack_q[acc_set_i];
  assign order_o   = cur_order;

  // Lowest-numbered invalid way of the set, if any.
  always_comb begin
    any_invalid   = 1'b0;
    first_invalid = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!set_valid_i[w]) begin
        any_invalid   = 1'b1;
        first_invalid = WAY_W'(w);
      end
    end
  end

  assign victim_way_o = any_invalid ? first_invalid : cur_order[WAYS-1];
  assign target_way   = acc_hit_i ? acc_hit_way_i : victim_way_o;

  // Stack entry that holds target_way.
  always_comb begin
    target_pos = '0;
    for (int i = 0; i < WAYS; i++) begin
      if (cur_order[i] == target_way) target_pos = WAY_W'(i);
    end
  end

  stack_reorder #(.WAYS(WAYS), .WAY_W(WAY_W)) u_reorder (
    .order_i(cur_order),
    .pos_i  (target_pos),
    .n_i    (n_o),
    .order_o(next_order)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int i = 0; i < WAYS; i++) stack_q[s][i] <= WAY_W'(i);
      end
    end else if (acc_valid_i) begin
      stack_q[acc_set_i] <= next_order;
    end
  end

endmodule
