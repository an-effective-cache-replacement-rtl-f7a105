// Three-core cache hierarchy whose caches all use the LRU-MRU replacement
// policy.
//
// Structure (the modelled configuration):
//   core c --(instruction port 0, data port 1)--> L1 cache c   (c = 0..2)
//   L1 caches --> network l1-l2 --> L2 bank 0 (addresses below 0x8000_0000)
//                                   L2 bank 1 (addresses from 0x8000_0000)
//   L2 banks  --> network l2-mm --> main memory
// Each L1 has 128 sets x 2 ways of 256-bit lines, a 2-cycle hit latency and
// two ports, used by one core for instruction fetches and data accesses. Each
// L2 bank has 512 sets x 4 ways, a 20-cycle hit latency and four ports; L1
// cache c reaches port c of each bank. Both networks buffer 1024 bits per
// buffer (input and output buffers, both directions) and move one 256-bit
// line per cycle.
//
// The cores and the main memory are outside this module. Core c drives
// core_req_*[c][p] and receives core_resp_*[c][p], p = 0 instruction, 1 data:
// word (32-bit) accesses with valid/ready handshakes. Memory receives line
// requests on one lane per L2 bank (mem_req_*[b]) and must answer each of
// them, in order per lane, on mem_resp_*[b]; a write is answered too.
//
// The event outputs count nothing themselves; each bit pulses for one cycle
// when the matching cache looks up an access (hit, miss, N = 1 or N = 0
// placement) or starts a write-back.
//
// Geometry, latencies, port counts, address split and network sizes follow
// the modelled configuration. The private L1 caches are not kept coherent
// with one another: cores that share writable data see stale copies.
module lru_mru_system
  import lru_mru_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 3,
  parameter int unsigned L1_SETS      = 128,
  parameter int unsigned L1_WAYS      = 2,
  parameter int unsigned L1_LATENCY   = 2,
  parameter int unsigned L1_PORTS     = 2,
  parameter int unsigned L2_BANKS     = 2,
  parameter int unsigned L2_SETS      = 512,
  parameter int unsigned L2_WAYS      = 4,
  parameter int unsigned L2_LATENCY   = 20,
  parameter int unsigned L2_PORTS     = 4,
  parameter int unsigned NET_BUF_BITS = 1024
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  // cores
  input  logic  [NUM_CORES-1:0][L1_PORTS-1:0]                 core_req_valid,
  output logic  [NUM_CORES-1:0][L1_PORTS-1:0]                 core_req_ready,
  input  logic  [NUM_CORES-1:0][L1_PORTS-1:0]                 core_req_write,
  input  addr_t [NUM_CORES-1:0][L1_PORTS-1:0]                 core_req_addr,
  input  logic  [NUM_CORES-1:0][L1_PORTS-1:0][WORD_BITS-1:0]  core_req_wdata,
  output logic  [NUM_CORES-1:0][L1_PORTS-1:0]                 core_resp_valid,
  input  logic  [NUM_CORES-1:0][L1_PORTS-1:0]                 core_resp_ready,
  output logic  [NUM_CORES-1:0][WORD_BITS-1:0]                core_resp_rdata,
  // main memory, one lane per L2 bank
  output logic       [L2_BANKS-1:0]                           mem_req_valid,
  input  logic       [L2_BANKS-1:0]                           mem_req_ready,
  output line_req_t  [L2_BANKS-1:0]                           mem_req,
  input  logic       [L2_BANKS-1:0]                           mem_resp_valid,
  output logic       [L2_BANKS-1:0]                           mem_resp_ready,
  input  line_resp_t [L2_BANKS-1:0]                           mem_resp,
  // events
  output logic  [NUM_CORES-1:0]                               l1_ev_hit,
  output logic  [NUM_CORES-1:0]                               l1_ev_miss,
  output logic  [NUM_CORES-1:0]                               l1_ev_place_top,
  output logic  [NUM_CORES-1:0]                               l1_ev_place_bottom,
  output logic  [NUM_CORES-1:0]                               l1_ev_writeback,
  output logic  [L2_BANKS-1:0]                                l2_ev_hit,
  output logic  [L2_BANKS-1:0]                                l2_ev_miss,
  output logic  [L2_BANKS-1:0]                                l2_ev_place_top,
  output logic  [L2_BANKS-1:0]                                l2_ev_place_bottom,
  output logic  [L2_BANKS-1:0]                                l2_ev_writeback
);

  // L1 lower side <-> network l1-l2 source side
  logic       [NUM_CORES-1:0] l1_req_valid, l1_req_ready, l1_resp_valid, l1_resp_ready;
  line_req_t  [NUM_CORES-1:0] l1_req;
  line_resp_t [NUM_CORES-1:0] l1_resp;

  // network l1-l2 destination lanes [bank][core]
  logic       [L2_BANKS-1:0][NUM_CORES-1:0] n1_req_valid, n1_req_ready;
  logic       [L2_BANKS-1:0][NUM_CORES-1:0] n1_resp_valid, n1_resp_ready;
  line_req_t  [L2_BANKS-1:0][NUM_CORES-1:0] n1_req;
  line_resp_t [L2_BANKS-1:0][NUM_CORES-1:0] n1_resp;

  // L2 lower side <-> network l2-mm source side
  logic       [L2_BANKS-1:0] l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_ready;
  line_req_t  [L2_BANKS-1:0] l2_req;
  line_resp_t [L2_BANKS-1:0] l2_resp;

  // ------------------------------------------------------------ L1 caches
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_l1
    set_assoc_cache #(
      .SETS(L1_SETS), .WAYS(L1_WAYS), .PORTS(L1_PORTS),
      .LATENCY(L1_LATENCY), .UP_BITS(WORD_BITS)
    ) u_l1 (
      .clk            (clk),
      .rst_n          (rst_n),
      .up_req_valid   (core_req_valid[c]),
      .up_req_ready   (core_req_ready[c]),
      .up_req_write   (core_req_write[c]),
      .up_req_addr    (core_req_addr[c]),
      .up_req_wdata   (core_req_wdata[c]),
      .up_resp_valid  (core_resp_valid[c]),
      .up_resp_ready  (core_resp_ready[c]),
      .up_resp_rdata  (core_resp_rdata[c]),
      .lo_req_valid   (l1_req_valid[c]),
      .lo_req_ready   (l1_req_ready[c]),
      .lo_req         (l1_req[c]),
      .lo_resp_valid  (l1_resp_valid[c]),
      .lo_resp_ready  (l1_resp_ready[c]),
      .lo_resp        (l1_resp[c]),
      .ev_hit         (l1_ev_hit[c]),
      .ev_miss        (l1_ev_miss[c]),
      .ev_place_top   (l1_ev_place_top[c]),
      .ev_place_bottom(l1_ev_place_bottom[c]),
      .ev_writeback   (l1_ev_writeback[c])
    );
  end

  // ------------------------------------------------------------ network l1-l2
  mem_network #(.N_SRC(NUM_CORES), .N_DST(L2_BANKS), .BUF_BITS(NET_BUF_BITS)) u_net_l1_l2 (
    .clk           (clk),
    .rst_n         (rst_n),
    .src_req_valid (l1_req_valid),
    .src_req_ready (l1_req_ready),
    .src_req       (l1_req),
    .src_resp_valid(l1_resp_valid),
    .src_resp_ready(l1_resp_ready),
    .src_resp      (l1_resp),
    .dst_req_valid (n1_req_valid),
    .dst_req_ready (n1_req_ready),
    .dst_req       (n1_req),
    .dst_resp_valid(n1_resp_valid),
    .dst_resp_ready(n1_resp_ready),
    .dst_resp      (n1_resp)
  );

  // ------------------------------------------------------------ L2 banks
  for (genvar b = 0; b < L2_BANKS; b++) begin : g_l2
    logic       [L2_PORTS-1:0]                up_valid, up_ready, up_write, up_resp_valid, up_resp_ready;
    addr_t      [L2_PORTS-1:0]                up_addr;
    logic       [L2_PORTS-1:0][LINE_BITS-1:0] up_wdata;
    logic       [LINE_BITS-1:0]               up_rdata;

    // Port c serves L1 cache c; ports beyond NUM_CORES stay idle, and their
    // ready and response-valid bits are left unread.
    for (genvar p = 0; p < L2_PORTS; p++) begin : g_port
      if (p < NUM_CORES) begin : g_used
        assign up_valid[p]         = n1_req_valid[b][p];
        assign n1_req_ready[b][p]  = up_ready[p];
        assign up_write[p]         = n1_req[b][p].write;
        assign up_addr[p]          = n1_req[b][p].addr;
        assign up_wdata[p]         = n1_req[b][p].data;
        assign n1_resp_valid[b][p] = up_resp_valid[p];
        assign up_resp_ready[p]    = n1_resp_ready[b][p];
        assign n1_resp[b][p].data  = up_rdata;
      end else begin : g_idle
        assign up_valid[p]      = 1'b0;
        assign up_write[p]      = 1'b0;
        assign up_addr[p]       = '0;
        assign up_wdata[p]      = '0;
        assign up_resp_ready[p] = 1'b1;
      end
    end

    set_assoc_cache #(
      .SETS(L2_SETS), .WAYS(L2_WAYS), .PORTS(L2_PORTS),
      .LATENCY(L2_LATENCY), .UP_BITS(LINE_BITS)
    ) u_l2 (
      .clk            (clk),
      .rst_n          (rst_n),
      .up_req_valid   (up_valid),
      .up_req_ready   (up_ready),
      .up_req_write   (up_write),
      .up_req_addr    (up_addr),
      .up_req_wdata   (up_wdata),
      .up_resp_valid  (up_resp_valid),
      .up_resp_ready  (up_resp_ready),
      .up_resp_rdata  (up_rdata),
      .lo_req_valid   (l2_req_valid[b]),
      .lo_req_ready   (l2_req_ready[b]),
      .lo_req         (l2_req[b]),
      .lo_resp_valid  (l2_resp_valid[b]),
      .lo_resp_ready  (l2_resp_ready[b]),
      .lo_resp        (l2_resp[b]),
      .ev_hit         (l2_ev_hit[b]),
      .ev_miss        (l2_ev_miss[b]),
      .ev_place_top   (l2_ev_place_top[b]),
      .ev_place_bottom(l2_ev_place_bottom[b]),
      .ev_writeback   (l2_ev_writeback[b])
    );
  end

  // ------------------------------------------------------------ network l2-mm
  logic       [0:0][L2_BANKS-1:0] n2_req_valid, n2_req_ready, n2_resp_valid, n2_resp_ready;
  line_req_t  [0:0][L2_BANKS-1:0] n2_req;
  line_resp_t [0:0][L2_BANKS-1:0] n2_resp;

  mem_network #(.N_SRC(L2_BANKS), .N_DST(1), .BUF_BITS(NET_BUF_BITS)) u_net_l2_mm (
    .clk           (clk),
    .rst_n         (rst_n),
    .src_req_valid (l2_req_valid),
    .src_req_ready (l2_req_ready),
    .src_req       (l2_req),
    .src_resp_valid(l2_resp_valid),
    .src_resp_ready(l2_resp_ready),
    .src_resp      (l2_resp),
    .dst_req_valid (n2_req_valid),
    .dst_req_ready (n2_req_ready),
    .dst_req       (n2_req),
    .dst_resp_valid(n2_resp_valid),
    .dst_resp_ready(n2_resp_ready),
    .dst_resp      (n2_resp)
  );

  assign mem_req_valid    = n2_req_valid[0];
  assign n2_req_ready[0]  = mem_req_ready;
  assign mem_req          = n2_req[0];
  assign n2_resp_valid[0] = mem_resp_valid;
  assign mem_resp_ready   = n2_resp_ready[0];
  assign n2_resp[0]       = mem_resp;

  initial begin
    assert (L2_PORTS >= NUM_CORES) else $error("each L1 cache needs its own L2 port");
  end

endmodule
