// Self-checking testbench for set_assoc_cache in the second-level geometry
// (512 sets, 4 ways, 4 ports, hit latency 20, whole 256-bit lines per
// access), as each L2 bank is built.
//
// Four port drivers issue random line reads and writes to a few sets with
// more tags than ways, so hits, misses, dirty evictions, both N values and
// port contention all occur. The lower level is a memory with random
// response delay. A reference model predicts, for every accepted access in
// acceptance order, whether it hits, which line a dirty eviction writes back,
// and the read data. The testbench checks the read data, the hit/miss event
// of each lookup, address and data of every write-back, and that every hit
// answers exactly 20 cycles after acceptance.
module tb_l2_cache;
  import lru_mru_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned SETS = 512, WAYS = 4, PORTS = 4, LATENCY = 20, UP_BITS = 256;
  localparam int unsigned SET_W = 9, TAG_W = 32 - SET_W - OFFSET_BITS;
  localparam int unsigned N_ACC = 2000;

  logic clk = 1'b0, rst_n;
  logic [PORTS-1:0] req_valid, req_ready, req_write, resp_valid, resp_ready;
  addr_t [PORTS-1:0] req_addr;
  logic [PORTS-1:0][UP_BITS-1:0] req_wdata;
  logic [UP_BITS-1:0] resp_rdata;
  logic lo_req_valid, lo_req_ready, lo_resp_valid, lo_resp_ready;
  line_req_t lo_req;
  line_resp_t lo_resp;
  logic ev_hit, ev_miss, ev_top, ev_bottom, ev_wb;

  set_assoc_cache #(.SETS(SETS), .WAYS(WAYS), .PORTS(PORTS), .LATENCY(LATENCY), .UP_BITS(UP_BITS)) dut (
    .clk(clk), .rst_n(rst_n),
    .up_req_valid(req_valid), .up_req_ready(req_ready), .up_req_write(req_write),
    .up_req_addr(req_addr), .up_req_wdata(req_wdata),
    .up_resp_valid(resp_valid), .up_resp_ready(resp_ready), .up_resp_rdata(resp_rdata),
    .lo_req_valid(lo_req_valid), .lo_req_ready(lo_req_ready), .lo_req(lo_req),
    .lo_resp_valid(lo_resp_valid), .lo_resp_ready(lo_resp_ready), .lo_resp(lo_resp),
    .ev_hit(ev_hit), .ev_miss(ev_miss), .ev_place_top(ev_top), .ev_place_bottom(ev_bottom),
    .ev_writeback(ev_wb)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycle = 0;
  int unsigned n_hit = 0, n_miss = 0, n_wb = 0, n_top = 0, n_bottom = 0, n_both = 0, done = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ lower-level memory
  line_t lower [logic [26:0]];
  int    lo_delay;
  initial begin
    lo_req_ready = 1'b0; lo_resp_valid = 1'b0; lo_resp = '0;
    forever begin
      @(posedge clk);
      if (rst_n && lo_req_valid && lo_req_ready) begin
        line_req_t r;
        r = lo_req;
        lo_req_ready <= 1'b0;
        lo_delay = $urandom_range(1, 6);
        repeat (lo_delay) @(posedge clk);
        if (r.write) begin
          lower[r.addr[31:5]] = r.data;
          lo_resp.data <= r.data;
        end else begin
          lo_resp.data <= lower.exists(r.addr[31:5]) ? lower[r.addr[31:5]] : default_line(r.addr);
        end
        lo_resp_valid <= 1'b1;
        do @(posedge clk); while (!lo_resp_ready);
        lo_resp_valid <= 1'b0;
      end else begin
        lo_req_ready <= ($urandom_range(0, 2) != 0);
      end
    end
  end

  // ------------------------------------------------------------ reference model
  line_t            ref_mem [logic [26:0]];
  int               ref_q   [SETS][$];
  logic [TAG_W-1:0] ref_tag [SETS][WAYS];
  bit               ref_v   [SETS][WAYS];
  bit               ref_d   [SETS][WAYS];
  logic [TAG_W-1:0] ref_prev = '0;

  typedef struct { bit hit; line_t rdata; int acc_cycle; } exp_t;
  exp_t      exp_q [PORTS][$];
  bit        exp_hit_q[$];
  addr_t     exp_wb_q[$];

  function automatic line_t ref_line(addr_t a);
    return ref_mem.exists(a[31:5]) ? ref_mem[a[31:5]] : default_line(a);
  endfunction

  // Apply one access to the reference, in acceptance order.
  task automatic ref_access(input int p, input bit wr, input addr_t a, input line_t wd);
    int s, hw, vic, tw, pos;
    bit h, nn;
    logic [TAG_W-1:0] t;
    exp_t e;
    s = int'(a[5 +: SET_W]);
    t = a[31 -: TAG_W];
    h = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) if (ref_v[s][w] && ref_tag[s][w] == t) begin h = 1; hw = w; end
    nn = (t != ref_prev);
    ref_prev = t;
    if (nn) n_top++; else n_bottom++;
    vic = -1;
    for (int w = WAYS - 1; w >= 0; w--) if (!ref_v[s][w]) vic = w;
    if (vic < 0) vic = ref_q[s][WAYS-1];
    tw = h ? hw : vic;
    if (!h && ref_v[s][vic] && ref_d[s][vic]) exp_wb_q.push_back({ref_tag[s][vic], SET_W'(s), 5'b0});
    foreach (ref_q[s][k]) if (ref_q[s][k] == tw) pos = k;
    ref_q[s].delete(pos);
    if (nn) ref_q[s].push_front(tw); else ref_q[s].push_back(tw);
    if (!h) begin ref_tag[s][tw] = t; ref_v[s][tw] = 1; ref_d[s][tw] = 0; end
    if (wr) begin ref_d[s][tw] = 1; ref_mem[a[31:5]] = wd; end
    e.hit = h; e.rdata = ref_line(a); e.acc_cycle = int'(cycle);
    exp_q[p].push_back(e);
    exp_hit_q.push_back(h);
  endtask

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(req_valid) > 1) n_both++;
      for (int p = 0; p < PORTS; p++)
        if (req_valid[p] && req_ready[p]) ref_access(p, req_write[p], req_addr[p], req_wdata[p]);
      for (int p = 0; p < PORTS; p++) begin
        if (resp_valid[p] && resp_ready[p]) begin
          exp_t e;
          check(exp_q[p].size() > 0, "response without request");
          if (exp_q[p].size() > 0) begin
            e = exp_q[p].pop_front();
            check(resp_rdata == e.rdata, $sformatf("port %0d read data differs from reference", p));
            if (e.hit) check(int'(cycle) - e.acc_cycle == LATENCY,
                             $sformatf("hit latency %0d", int'(cycle) - e.acc_cycle));
            done++;
          end
        end
      end
      if (ev_hit || ev_miss) begin
        bit h;
        check(exp_hit_q.size() > 0, "lookup without accepted request");
        if (exp_hit_q.size() > 0) begin
          h = exp_hit_q.pop_front();
          check(ev_hit == h, $sformatf("lookup hit=%0b expected %0b", ev_hit, h));
          if (ev_hit) n_hit++; else n_miss++;
        end
      end
      if (lo_req_valid && lo_req_ready && lo_req.write) begin
        addr_t a;
        n_wb++;
        check(exp_wb_q.size() > 0, "unexpected write-back");
        if (exp_wb_q.size() > 0) begin
          a = exp_wb_q.pop_front();
          check(lo_req.addr == a, $sformatf("write-back address %h expected %h", lo_req.addr, a));
          check(lo_req.data == ref_line(a), "write-back data differs from reference");
        end
      end
    end
  end

  // ------------------------------------------------------------ port drivers
  int unsigned issued = 0;
  function automatic addr_t rand_addr();
    int sets[3] = '{0, 1, 511};
    logic [TAG_W-1:0] t;
    t = TAG_W'($urandom_range(0, 7));
    if ($urandom_range(0, 5) == 0) t = t | TAG_W'(18'h20000);
    return {t, SET_W'(sets[$urandom_range(0, 2)]), 5'b0};
  endfunction

  for (genvar p = 0; p < PORTS; p++) begin : g_drv
    initial begin
      req_valid[p] = 1'b0; req_write[p] = 1'b0; req_addr[p] = '0; req_wdata[p] = '0;
      resp_ready[p] = 1'b0;
      @(posedge rst_n);
      while (issued < N_ACC) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        issued++;
        req_valid[p] <= 1'b1;
        req_write[p] <= ($urandom_range(0, 2) == 0);
        req_addr[p]  <= rand_addr();
        for (int k = 0; k < 8; k++) req_wdata[p][k*32 +: 32] <= $urandom;
        do @(posedge clk); while (!req_ready[p]);
        req_valid[p]  <= 1'b0;
        resp_ready[p] <= 1'b1;
        do @(posedge clk); while (!resp_valid[p]);
        resp_ready[p] <= 1'b0;
      end
    end
  end

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      ref_q[s].push_back(w); ref_v[s][w] = 0; ref_d[s][w] = 0; ref_tag[s][w] = '0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (issued >= N_ACC && done >= N_ACC);
    repeat (5) @(posedge clk);
    check(done == N_ACC, $sformatf("%0d of %0d accesses answered", done, N_ACC));
    check(n_hit > 0 && n_miss > 0 && n_wb > 0 && n_top > 0 && n_bottom > 0 && n_both > 0,
          $sformatf("coverage hit=%0d miss=%0d wb=%0d top=%0d bottom=%0d contention=%0d",
                    n_hit, n_miss, n_wb, n_top, n_bottom, n_both));
    check(exp_wb_q.size() == 0, "predicted write-back never happened");
    $display("coverage hit=%0d miss=%0d wb=%0d top=%0d bottom=%0d contention=%0d",
             n_hit, n_miss, n_wb, n_top, n_bottom, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
