// Radix-sort workload run through set_assoc_cache at several geometries.
//
// The evaluation sweeps associativity at 512 sets and the number of sets at
// associativity 4 and 2 while running a radix sort. This testbench runs the
// data accesses of an LSD radix sort (2048 random 32-bit keys, 8-bit digits,
// four passes of histogram clear, count, prefix sum and scatter) on one cache
// per geometry, each backed by a memory model that answers after 200 cycles.
// Every load and store of the sort goes through the cache, and the sort
// computes with the values the cache returns, so a wrong word anywhere
// spoils the result.
//
// Per geometry it checks that the output is sorted and is a permutation of
// the input (sum and xor of the keys), that hits, misses, N = 1 and N = 0
// placements all occurred, and that every hit answered in 2 cycles. It prints
// accesses, hit rate, write-backs and total cycles per geometry.
//
// The access stream is this testbench's own model of a radix sort, not the
// benchmark binary.
module tb_radix_sweep;
  import lru_mru_pkg::*;

  localparam int NG = 9;
  localparam int G_SETS [NG] = '{512, 512, 512, 512, 16, 64, 1024, 16, 128};
  localparam int G_WAYS [NG] = '{1,   2,   4,   8,   4,  4,  4,    2,  2};
  localparam int N_KEYS = 2048;
  localparam int MEM_LAT = 200;
  localparam addr_t KEY_BASE = 32'h0001_0000, TMP_BASE = 32'h0002_0000, HIST_BASE = 32'h0003_0000;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, finished = 0;
  logic [31:0] keys_in [N_KEYS];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_KEYS; i++) keys_in[i] = $urandom;
  end

  for (genvar g = 0; g < NG; g++) begin : g_geo
    logic req_valid, req_ready, req_write, resp_valid, resp_ready;
    addr_t req_addr;
    logic [31:0] req_wdata, resp_rdata;
    logic lo_req_valid, lo_req_ready, lo_resp_valid, lo_resp_ready;
    line_req_t lo_req;
    line_resp_t lo_resp;
    logic ev_hit, ev_miss, ev_top, ev_bottom, ev_wb;
    int unsigned n_acc = 0, n_hit = 0, n_miss = 0, n_top = 0, n_bottom = 0, n_wb = 0, cyc = 0;
    int unsigned t_acc;
    bit last_hit;

    set_assoc_cache #(.SETS(G_SETS[g]), .WAYS(G_WAYS[g]), .PORTS(1), .LATENCY(2), .UP_BITS(32)) dut (
      .clk(clk), .rst_n(rst_n),
      .up_req_valid(req_valid), .up_req_ready(req_ready), .up_req_write(req_write),
      .up_req_addr(req_addr), .up_req_wdata(req_wdata),
      .up_resp_valid(resp_valid), .up_resp_ready(resp_ready), .up_resp_rdata(resp_rdata),
      .lo_req_valid(lo_req_valid), .lo_req_ready(lo_req_ready), .lo_req(lo_req),
      .lo_resp_valid(lo_resp_valid), .lo_resp_ready(lo_resp_ready), .lo_resp(lo_resp),
      .ev_hit(ev_hit), .ev_miss(ev_miss), .ev_place_top(ev_top), .ev_place_bottom(ev_bottom),
      .ev_writeback(ev_wb)
    );

    main_memory_model #(.N_LANES(1), .LATENCY(MEM_LAT)) u_mem (
      .clk(clk), .rst_n(rst_n),
      .req_valid(lo_req_valid), .req_ready(lo_req_ready), .req(lo_req),
      .resp_valid(lo_resp_valid), .resp_ready(lo_resp_ready), .resp(lo_resp)
    );

    always @(posedge clk) begin
      cyc++;
      n_hit += ev_hit; n_miss += ev_miss; n_top += ev_top; n_bottom += ev_bottom; n_wb += ev_wb;
      if (ev_hit || ev_miss) last_hit = ev_hit;
    end

    // One word access through the cache; returns the read data.
    task automatic access(input bit wr, input addr_t a, input logic [31:0] wd, output logic [31:0] rd);
      @(negedge clk);
      req_valid = 1'b1; req_write = wr; req_addr = a; req_wdata = wd;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      t_acc = cyc;
      @(negedge clk);
      req_valid = 1'b0; resp_ready = 1'b1;
      #1;
      while (!resp_valid) begin @(negedge clk); #1; end
      rd = resp_rdata;
      if (last_hit) check(cyc - t_acc == 2, $sformatf("geometry %0d: hit latency %0d", g, cyc - t_acc));
      @(negedge clk);
      resp_ready = 1'b0;
      n_acc++;
    endtask

    task automatic ld(input addr_t a, output logic [31:0] v);
      access(1'b0, a, '0, v);
    endtask
    task automatic st(input addr_t a, input logic [31:0] v);
      logic [31:0] unused;
      access(1'b1, a, v, unused);
    endtask

    initial begin
      logic [31:0] v, k, h;
      addr_t src, dst, tmp;
      logic [31:0] sum_in, sum_out, xor_in, xor_out, prev;
      bit sorted;
      req_valid = 1'b0; req_write = 1'b0; req_addr = '0; req_wdata = '0; resp_ready = 1'b0;
      @(posedge rst_n);
      // load the keys
      for (int i = 0; i < N_KEYS; i++) st(KEY_BASE + addr_t'(4 * i), keys_in[i]);
      src = KEY_BASE; dst = TMP_BASE;
      for (int pass = 0; pass < 4; pass++) begin
        for (int d = 0; d < 256; d++) st(HIST_BASE + addr_t'(4 * d), 0);
        for (int i = 0; i < N_KEYS; i++) begin
          ld(src + addr_t'(4 * i), k);
          ld(HIST_BASE + addr_t'(4 * ((k >> (8 * pass)) & 255)), h);
          st(HIST_BASE + addr_t'(4 * ((k >> (8 * pass)) & 255)), h + 1);
        end
        v = 0;
        for (int d = 0; d < 256; d++) begin
          ld(HIST_BASE + addr_t'(4 * d), h);
          st(HIST_BASE + addr_t'(4 * d), v);
          v += h;
        end
        for (int i = 0; i < N_KEYS; i++) begin
          ld(src + addr_t'(4 * i), k);
          ld(HIST_BASE + addr_t'(4 * ((k >> (8 * pass)) & 255)), h);
          st(dst + addr_t'(4 * h), k);
          st(HIST_BASE + addr_t'(4 * ((k >> (8 * pass)) & 255)), h + 1);
        end
        tmp = src; src = dst; dst = tmp;
      end
      // read back and check
      sum_in = 0; xor_in = 0; sum_out = 0; xor_out = 0; sorted = 1; prev = 0;
      for (int i = 0; i < N_KEYS; i++) begin
        sum_in += keys_in[i]; xor_in ^= keys_in[i];
        ld(src + addr_t'(4 * i), k);
        sum_out += k; xor_out ^= k;
        if (i > 0 && k < prev) sorted = 0;
        prev = k;
      end
      check(sorted, $sformatf("geometry %0d: output not sorted", g));
      check(sum_in == sum_out && xor_in == xor_out, $sformatf("geometry %0d: output is not a permutation of the input", g));
      check(n_hit > 0 && n_miss > 0 && n_top > 0 && n_bottom > 0,
            $sformatf("geometry %0d: hit=%0d miss=%0d top=%0d bottom=%0d", g, n_hit, n_miss, n_top, n_bottom));
      $display("sets=%5d ways=%3d  accesses=%0d hits=%0d misses=%0d hit_rate=%0.3f N0=%0d writebacks=%0d cycles=%0d",
               G_SETS[g], G_WAYS[g], n_acc, n_hit, n_miss, real'(n_hit) / real'(n_acc), n_bottom, n_wb, cyc);
      finished++;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == NG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
