// Tag history: produces the policy-selection bit N of the LRU-MRU algorithm.
//
// The module remembers the tag of the block accessed last. For the access
// presented now it compares the current tag with that remembered tag:
// N = 0 when they are equal (the next placement follows MRU, bottom of the
// stack) and N = 1 when they differ (LRU, top of the stack). When acc_valid_i
// is high the current tag becomes the remembered tag at the next clock edge.
//
// Interface: acc_valid_i qualifies an access, acc_tag_i is its tag, n_o is
// combinational from acc_tag_i and the stored tag. Timing: n_o is valid in the
// same cycle as the access; the history updates on the rising clock edge.
//
// Following the algorithm, the previous tag starts at 0 after reset, so a
// first access with tag 0 sees N = 0. Only the tag takes part in the
// comparison, not the set index: one history register serves the whole
// cache, as the algorithm keeps a single previous tag.
module tag_history #(
  parameter int unsigned TAG_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acc_valid_i,
  input  logic [TAG_W-1:0] acc_tag_i,
  output logic             n_o
);

  logic [TAG_W-1:0] prev_tag_q;

  assign n_o = (acc_tag_i != prev_tag_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_tag_q <= '0;
    end else if (acc_valid_i) begin
      prev_tag_q <= acc_tag_i;
    end
  end

endmodule
