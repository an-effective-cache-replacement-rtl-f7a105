// Self-checking testbench for tag_history.
//
// Drives a stream of accesses whose tags repeat often (small tag alphabet),
// with idle cycles in between, and compares N against a reference that
// remembers the last accessed tag, starting from 0 after reset: N must be 0
// exactly when the tag equals the previous access's tag.
module tb_tag_history;
  localparam int unsigned TAG_W = 8;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             acc_valid;
  logic [TAG_W-1:0] acc_tag;
  logic             n;
  int unsigned      checks = 0, failures = 0;
  logic [TAG_W-1:0] ref_prev;
  int unsigned      n_zero = 0, n_one = 0;

  tag_history #(.TAG_W(TAG_W)) dut (
    .clk(clk), .rst_n(rst_n), .acc_valid_i(acc_valid), .acc_tag_i(acc_tag), .n_o(n)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; acc_valid = 1'b0; acc_tag = '0; ref_prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // First access with tag 0 must see N = 0 (history initialised to 0).
    @(negedge clk);
    acc_valid = 1'b1; acc_tag = '0;
    #1;
    checks++;
    if (n !== 1'b0) begin failures++; $display("FAIL: first access with tag 0 gave N=%0b", n); end
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      acc_valid = ($urandom_range(0, 3) != 0);
      acc_tag   = TAG_W'($urandom_range(0, 3)) | (($urandom_range(0, 7) == 0) ? TAG_W'(8'h80) : '0);
      #1;
      checks++;
      if (n !== (acc_tag != ref_prev)) begin
        failures++;
        $display("FAIL: tag=%0h prev=%0h N=%0b", acc_tag, ref_prev, n);
      end
      if (acc_valid) begin
        if (n) n_one++; else n_zero++;
        ref_prev = acc_tag;
      end
      @(posedge clk);
    end
    checks++;
    if (n_zero == 0 || n_one == 0) begin failures++; $display("FAIL: N did not take both values"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
