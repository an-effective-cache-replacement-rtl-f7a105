// End-to-end testbench for lru_mru_system at its default size: three cores'
// worth of L1 caches (128 sets x 2 ways), two L2 banks (512 sets x 4 ways),
// both networks, and a 200-cycle main memory model.
//
// Each core has an instruction port that only reads and a data port that
// reads and writes. Core c works in its own address region (so the private
// L1 caches never share writable lines), spread over both L2 banks and over a
// few L1 and L2 sets with more tags than ways, with half of the accesses
// reusing a recent address. A reference copy of memory predicts every read;
// the testbench checks all read data, that every L1 hit answers 2 cycles
// after acceptance and every L2 hit 20 cycles after acceptance, and counts
// each mechanism of the hierarchy: L1/L2 hits and misses, N = 1 (top) and
// N = 0 (bottom) placements in L1 and L2, L1 and L2 write-backs, traffic to
// each L2 bank, two L1 caches requesting one L2 bank in the same cycle, and
// both ports of an L1 requesting in the same cycle. A mechanism that never
// happened counts as a failure.
module tb_lru_mru_system;
  import lru_mru_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned NC = 3, NP = 2, NB = 2;
  localparam int unsigned N_PER_PORT = 600;

  logic clk = 1'b0, rst_n;
  logic  [NC-1:0][NP-1:0]        core_req_valid, core_req_ready, core_req_write;
  logic  [NC-1:0][NP-1:0]        core_resp_valid, core_resp_ready;
  addr_t [NC-1:0][NP-1:0]        core_req_addr;
  logic  [NC-1:0][NP-1:0][31:0]  core_req_wdata;
  logic  [NC-1:0][31:0]          core_resp_rdata;
  logic       [NB-1:0] mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  line_req_t  [NB-1:0] mem_req;
  line_resp_t [NB-1:0] mem_resp;
  logic [NC-1:0] l1_hit, l1_miss, l1_top, l1_bottom, l1_wb;
  logic [NB-1:0] l2_hit, l2_miss, l2_top, l2_bottom, l2_wb;

  lru_mru_system dut (
    .clk(clk), .rst_n(rst_n),
    .core_req_valid(core_req_valid), .core_req_ready(core_req_ready),
    .core_req_write(core_req_write), .core_req_addr(core_req_addr),
    .core_req_wdata(core_req_wdata), .core_resp_valid(core_resp_valid),
    .core_resp_ready(core_resp_ready), .core_resp_rdata(core_resp_rdata),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req(mem_req),
    .mem_resp_valid(mem_resp_valid), .mem_resp_ready(mem_resp_ready), .mem_resp(mem_resp),
    .l1_ev_hit(l1_hit), .l1_ev_miss(l1_miss), .l1_ev_place_top(l1_top),
    .l1_ev_place_bottom(l1_bottom), .l1_ev_writeback(l1_wb),
    .l2_ev_hit(l2_hit), .l2_ev_miss(l2_miss), .l2_ev_place_top(l2_top),
    .l2_ev_place_bottom(l2_bottom), .l2_ev_writeback(l2_wb)
  );

  main_memory_model #(.N_LANES(NB), .LATENCY(200)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_ready(mem_resp_ready), .resp(mem_resp)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycle = 0, done = 0, issued = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d accesses answered", done, NC * NP * N_PER_PORT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ reference
  logic [31:0] ref_mem [logic [29:0]];
  typedef struct { logic [31:0] rdata; int acc_cycle; } exp_t;
  exp_t exp_q [NC][NP][$];
  int   l1_acc_cycle [NC];
  int   l2_acc_cycle [NB];
  bit   l1_was_hit [NC];
  bit   l2_was_hit [NB];

  function automatic logic [31:0] ref_read(addr_t a);
    return ref_mem.exists(a[31:2]) ? ref_mem[a[31:2]] : default_word(a);
  endfunction

  // L2 port activity, observed inside the design
  logic [NB-1:0][3:0] l2_up_valid, l2_up_ready, l2_up_rvalid, l2_up_rready;
  for (genvar b = 0; b < NB; b++) begin : g_probe
    assign l2_up_valid[b]  = dut.g_l2[b].up_valid;
    assign l2_up_ready[b]  = dut.g_l2[b].up_ready;
    assign l2_up_rvalid[b] = dut.g_l2[b].up_resp_valid;
    assign l2_up_rready[b] = dut.g_l2[b].up_resp_ready;
  end

  // mechanism counters
  int unsigned c_l1_hit, c_l1_miss, c_l1_top, c_l1_bottom, c_l1_wb;
  int unsigned c_l2_hit, c_l2_miss, c_l2_top, c_l2_bottom, c_l2_wb;
  int unsigned c_bank[NB], c_l2_contention, c_l1_both_ports;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        for (int p = 0; p < NP; p++) begin
          if (core_req_valid[c][p] && core_req_ready[c][p]) begin
            exp_t e;
            if (core_req_write[c][p]) ref_mem[core_req_addr[c][p][31:2]] = core_req_wdata[c][p];
            e.rdata = ref_read(core_req_addr[c][p]);
            e.acc_cycle = int'(cycle);
            exp_q[c][p].push_back(e);
            l1_acc_cycle[c] = int'(cycle);
          end
          if (core_resp_valid[c][p] && core_resp_ready[c][p]) begin
            exp_t e;
            check(exp_q[c][p].size() > 0, "response without request");
            if (exp_q[c][p].size() > 0) begin
              e = exp_q[c][p].pop_front();
              check(core_resp_rdata[c] == e.rdata,
                    $sformatf("core %0d port %0d rdata %h expected %h", c, p, core_resp_rdata[c], e.rdata));
              if (l1_was_hit[c])
                check(int'(cycle) - e.acc_cycle == 2, $sformatf("L1 hit latency %0d", int'(cycle) - e.acc_cycle));
            end
            done++;
          end
        end
        if (&core_req_valid[c]) c_l1_both_ports++;
        if (l1_hit[c] || l1_miss[c]) l1_was_hit[c] = l1_hit[c];
        c_l1_hit += l1_hit[c]; c_l1_miss += l1_miss[c]; c_l1_top += l1_top[c];
        c_l1_bottom += l1_bottom[c]; c_l1_wb += l1_wb[c];
      end
      for (int b = 0; b < NB; b++) begin
        if (|(l2_up_valid[b] & l2_up_ready[b])) begin
          l2_acc_cycle[b] = int'(cycle);
          c_bank[b]++;
        end
        if ($countones(l2_up_valid[b]) > 1) c_l2_contention++;
        if (l2_hit[b] || l2_miss[b]) l2_was_hit[b] = l2_hit[b];
        if (|(l2_up_rvalid[b] & l2_up_rready[b]) && l2_was_hit[b])
          check(int'(cycle) - l2_acc_cycle[b] == 20,
                $sformatf("L2 hit latency %0d", int'(cycle) - l2_acc_cycle[b]));
        c_l2_hit += l2_hit[b]; c_l2_miss += l2_miss[b]; c_l2_top += l2_top[b];
        c_l2_bottom += l2_bottom[b]; c_l2_wb += l2_wb[b];
      end
    end
  end

  // ------------------------------------------------------------ core drivers
  // Address of core c: bit 31 picks the L2 bank, bits 17:14 = {core, t} make
  // the L2 tag, bits 13:5 pick one of three L2 sets (which are also L1 sets).
  function automatic addr_t rand_addr(int c);
    int sets[3] = '{0, 1, 300};
    addr_t a;
    a = '0;
    a[31]    = 1'($urandom_range(0, 1));
    a[17:14] = {2'(c), 2'($urandom_range(0, 3))};
    a[13:5]  = 9'(sets[$urandom_range(0, 2)]);
    a[4:2]   = 3'($urandom_range(0, 7));
    return a;
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_core
    for (genvar p = 0; p < NP; p++) begin : g_port
      initial begin
        addr_t recent[$];
        core_req_valid[c][p] = 1'b0; core_req_write[c][p] = 1'b0;
        core_req_addr[c][p] = '0; core_req_wdata[c][p] = '0; core_resp_ready[c][p] = 1'b0;
        @(posedge rst_n);
        for (int i = 0; i < N_PER_PORT; i++) begin
          addr_t a;
          a = (recent.size() > 0 && $urandom_range(0, 1) == 0) ? recent[$urandom_range(0, recent.size() - 1)]
                                                              : rand_addr(c);
          recent.push_back(a);
          if (recent.size() > 6) void'(recent.pop_front());
          @(negedge clk);
          issued++;
          core_req_valid[c][p] = 1'b1;
          core_req_write[c][p] = (p == 1) && ($urandom_range(0, 2) == 0);
          core_req_addr[c][p]  = a;
          core_req_wdata[c][p] = $urandom;
          #1;
          while (!core_req_ready[c][p]) begin @(negedge clk); #1; end
          @(negedge clk);
          core_req_valid[c][p]  = 1'b0;
          core_resp_ready[c][p] = 1'b1;
          #1;
          while (!core_resp_valid[c][p]) begin @(negedge clk); #1; end
          @(negedge clk);
          core_resp_ready[c][p] = 1'b0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done >= NC * NP * N_PER_PORT);
    repeat (5) @(posedge clk);
    $display("cycles=%0d accesses=%0d", cycle, done);
    $display("L1: hit=%0d miss=%0d top=%0d bottom=%0d writeback=%0d both_ports=%0d",
             c_l1_hit, c_l1_miss, c_l1_top, c_l1_bottom, c_l1_wb, c_l1_both_ports);
    $display("L2: hit=%0d miss=%0d top=%0d bottom=%0d writeback=%0d bank0=%0d bank1=%0d contention=%0d",
             c_l2_hit, c_l2_miss, c_l2_top, c_l2_bottom, c_l2_wb, c_bank[0], c_bank[1], c_l2_contention);
    $display("memory: reads=%0d writes=%0d", u_mem.reads, u_mem.writes);
    check(c_l1_hit > 0, "no L1 hit");
    check(c_l1_miss > 0, "no L1 miss");
    check(c_l1_top > 0, "no L1 N=1 placement");
    check(c_l1_bottom > 0, "no L1 N=0 placement");
    check(c_l1_wb > 0, "no L1 write-back");
    check(c_l1_both_ports > 0, "L1 ports never requested together");
    check(c_l2_hit > 0, "no L2 hit");
    check(c_l2_miss > 0, "no L2 miss");
    check(c_l2_top > 0, "no L2 N=1 placement");
    check(c_l2_bottom > 0, "no L2 N=0 placement");
    check(c_l2_wb > 0, "no L2 write-back");
    check(c_bank[0] > 0 && c_bank[1] > 0, "an L2 bank was never used");
    check(c_l2_contention > 0, "no two L1 caches requested one L2 bank together");
    check(u_mem.writes > 0, "memory never written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
