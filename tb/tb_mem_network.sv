// Self-checking testbench for mem_network (3 sources, 2 destinations,
// 1024-bit buffers of 256-bit messages).
//
// Phase 1 holds every destination lane not ready and sends each source's
// requests to destination 0: the source's input buffer and its lane output
// buffer must take exactly 4 + 4 messages before the source is stalled.
// Phase 2 runs random traffic: every request carries its source and a
// sequence number; destinations accept with random readiness and answer each
// request after a random delay with a response naming destination, source
// and sequence number. The testbench checks that every request reaches the
// destination chosen by address bit 31, on the lane of its source, in the
// order the source sent it, and that every response reaches the right source
// in per-lane order.
module tb_mem_network;
  import lru_mru_pkg::*;
  localparam int unsigned NS = 3, ND = 2, N_PER_SRC = 300;

  logic clk = 1'b0, rst_n;
  logic [NS-1:0] s_req_valid, s_req_ready, s_resp_valid, s_resp_ready;
  line_req_t [NS-1:0] s_req;
  line_resp_t [NS-1:0] s_resp;
  logic [ND-1:0][NS-1:0] d_req_valid, d_req_ready, d_resp_valid, d_resp_ready;
  line_req_t [ND-1:0][NS-1:0] d_req;
  line_resp_t [ND-1:0][NS-1:0] d_resp;

  mem_network #(.N_SRC(NS), .N_DST(ND), .BUF_BITS(1024)) dut (
    .clk(clk), .rst_n(rst_n),
    .src_req_valid(s_req_valid), .src_req_ready(s_req_ready), .src_req(s_req),
    .src_resp_valid(s_resp_valid), .src_resp_ready(s_resp_ready), .src_resp(s_resp),
    .dst_req_valid(d_req_valid), .dst_req_ready(d_req_ready), .dst_req(d_req),
    .dst_resp_valid(d_resp_valid), .dst_resp_ready(d_resp_ready), .dst_resp(d_resp)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  bit phase2 = 0;
  int unsigned sent[NS], got_resp[NS], delivered = 0;
  int unsigned exp_req  [ND][NS][$];   // sequence numbers expected at lane [d][s]
  int unsigned exp_resp [NS][ND][$];   // sequence numbers expected back at source s from d
  int unsigned pend     [ND][NS][$];   // accepted at destination, not yet answered
  int unsigned n_dst_used[ND];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_req_t make_req(int s, int seq);
    line_req_t r;
    r.write = seq[0];
    r.addr  = {1'($urandom_range(0, 1)), 26'($urandom), 5'b0};
    r.data  = '0;
    r.data[15:0] = 16'(seq);
    r.data[23:16] = 8'(s);
    return r;
  endfunction

  // destinations: accept with random readiness, answer after a delay
  for (genvar d = 0; d < ND; d++) begin : g_dst
    for (genvar s = 0; s < NS; s++) begin : g_lane
      initial begin
        d_req_ready[d][s] = 1'b0; d_resp_valid[d][s] = 1'b0; d_resp[d][s] = '0;
        wait (phase2);
        forever begin
          @(posedge clk);
          if (d_req_valid[d][s] && d_req_ready[d][s]) begin
            int seq;
            seq = int'(d_req[d][s].data[15:0]);
            check(int'(d_req[d][s].data[23:16]) == s, "request on wrong lane");
            check(int'(d_req[d][s].addr[31]) == d, "request routed to wrong destination");
            check(exp_req[d][s].size() > 0 && exp_req[d][s][0] == seq,
                  $sformatf("lane %0d/%0d got seq %0d out of order", d, s, seq));
            if (exp_req[d][s].size() > 0) void'(exp_req[d][s].pop_front());
            pend[d][s].push_back(seq);
            n_dst_used[d]++;
          end
          d_req_ready[d][s] <= ($urandom_range(0, 1) == 1);
        end
      end
      initial begin
        wait (phase2);
        forever begin
          @(posedge clk);
          if (pend[d][s].size() > 0) begin
            int seq;
            seq = pend[d][s].pop_front();
            repeat ($urandom_range(0, 4)) @(posedge clk);
            @(negedge clk);
            d_resp[d][s].data = {224'(0), 8'(d), 8'(s), 16'(seq)};
            d_resp_valid[d][s] = 1'b1;
            #1;  // let the combinational ready settle
            while (!d_resp_ready[d][s]) begin @(negedge clk); #1; end
            @(negedge clk);
            d_resp_valid[d][s] = 1'b0;
          end
        end
      end
    end
  end

  // sources
  for (genvar s = 0; s < NS; s++) begin : g_src
    initial begin
      s_req_valid[s] = 1'b0; s_req[s] = '0; s_resp_ready[s] = 1'b0;
      wait (phase2);
      for (int i = 0; i < N_PER_SRC; i++) begin
        line_req_t r;
        r = make_req(s, i);
        @(negedge clk);
        s_req[s] = r;
        s_req_valid[s] = 1'b1;
        #1;
        while (!s_req_ready[s]) begin @(negedge clk); #1; end
        exp_req[r.addr[31]][s].push_back(i);
        exp_resp[s][r.addr[31]].push_back(i);
        sent[s]++;
        @(negedge clk);
        s_req_valid[s] = 1'b0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    always @(posedge clk) begin
      if (phase2) s_resp_ready[s] <= ($urandom_range(0, 3) != 0);
      if (s_resp_valid[s] && s_resp_ready[s]) begin
        int d, ss, seq;
        d = int'(s_resp[s].data[31:24]); ss = int'(s_resp[s].data[23:16]); seq = int'(s_resp[s].data[15:0]);
        check(ss == s, "response delivered to wrong source");
        check(d < ND && exp_resp[s][d].size() > 0 && exp_resp[s][d][0] == seq,
              $sformatf("source %0d response seq %0d from %0d out of order", s, seq, d));
        if (d < ND && exp_resp[s][d].size() > 0) void'(exp_resp[s][d].pop_front());
        got_resp[s]++;
        delivered++;
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: destinations never ready; input plus lane buffer hold 8.
    for (int s = 0; s < NS; s++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < 12; k++) begin
        @(negedge clk);
        s_req_valid[s] = 1'b1;
        s_req[s] = make_req(s, 0);
        s_req[s].addr[31] = 1'b0;
        @(posedge clk);
        if (s_req_ready[s]) acc++;
      end
      @(negedge clk);
      s_req_valid[s] = 1'b0;
      check(acc == 8, $sformatf("source %0d buffers took %0d messages, expected 8", s, acc));
    end
    // Restart empty for phase 2.
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    phase2 = 1;
    wait (delivered == NS * N_PER_SRC);
    repeat (5) @(posedge clk);
    for (int s = 0; s < NS; s++) check(got_resp[s] == N_PER_SRC, "missing responses");
    check(n_dst_used[0] > 0 && n_dst_used[1] > 0, "a destination was never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
