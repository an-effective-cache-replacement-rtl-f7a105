// Recency-stack reorder for one cache set under the LRU-MRU policy.
//
// A set's stack lists its way numbers from top (entry 0) to bottom (entry
// WAYS-1). One way, found at stack entry pos_i, is moved:
//   n_i = 1 (LRU behaviour): the way goes to the top, the entries that were
//     above it shift down by one.
//   n_i = 0 (MRU behaviour): the way goes to the bottom, the entries that were
//     below it shift up by one.
// The same move serves a hit (pos_i is where the hit way sits) and a miss
// (pos_i is where the victim sits; the new block takes the victim's way, so
// moving that way places the new block). Entries not involved keep their
// order.
//
// Interface: order_i and order_o are packed arrays of WAYS way numbers,
// index 0 being the top of the stack. Purely combinational.
module stack_reorder #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][WAY_W-1:0] order_i,
  input  logic [WAY_W-1:0]           pos_i,
  input  logic                       n_i,
  output logic [WAYS-1:0][WAY_W-1:0] order_o
);

  logic [WAY_W-1:0] moved;

  always_comb begin
    moved = order_i[pos_i];
    for (int unsigned i = 0; i < WAYS; i++) begin
      if (n_i) begin
        if (i == 0)                        order_o[i] = moved;
        else if (i <= 32'(pos_i))          order_o[i] = order_i[(i > 0) ? i - 1 : 0];
        else                               order_o[i] = order_i[i];
      end else begin
        if (i == WAYS - 1)                 order_o[i] = moved;
        else if (i >= 32'(pos_i))          order_o[i] = order_i[(i < WAYS - 1) ? i + 1 : i];
        else                               order_o[i] = order_i[i];
      end
    end
  end

endmodule
