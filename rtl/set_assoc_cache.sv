// Set-associative, write-back, write-allocate cache with LRU-MRU replacement.
//
// The cache serves PORTS upper-level request channels, one access at a time.
// A round-robin arbiter picks a requesting port; the access is looked up one
// cycle later against the tags of its set, and lru_mru_policy updates that
// set's recency stack in the same cycle:
//   hit : reads return the addressed word, writes merge it into the line and
//         mark the line dirty; the response comes LATENCY cycles after the
//         request was accepted.
//   miss: the policy names the victim way (bottom of the stack, or a free
//         way). A dirty victim is first written to the lower level, then the
//         missing line is fetched, merged with write data if any, and
//         installed; the response follows the fill.
// Misses block: no new request is accepted until the current one has
// answered.
//
// Upper interface, per port: req_valid/req_ready handshake with write flag,
// 32-bit byte address and UP_BITS of write data; resp_valid/resp_ready with
// UP_BITS of read data (the shared up_resp_rdata belongs to the port whose
// resp_valid is high). UP_BITS is 32 for a cache next to a core (word
// accesses) and 256 for a cache below another cache (whole lines). Lower
// interface: one line request channel and one line response channel, each a
// valid/ready handshake; every lower request, write or read, gets exactly one
// response. Event outputs pulse for one cycle per lookup (hit, miss, N) and
// per write-back.
//
// Sets, ways, hit latency and port count follow the two cache geometries
// being modelled (first level: 128 sets, 2 ways, latency 2, 2 ports; second
// level: 512 sets, 4 ways, latency 20, 4 ports; 256-bit lines). Write policy,
// the handshakes, serialising the ports and the blocking miss handling are
// this design's own choices. LATENCY must be at least 2.
module set_assoc_cache
  import lru_mru_pkg::*;
#(
  parameter int unsigned SETS    = 128,
  parameter int unsigned WAYS    = 2,
  parameter int unsigned PORTS   = 2,
  parameter int unsigned LATENCY = 2,
  parameter int unsigned UP_BITS = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // upper level
  input  logic       [PORTS-1:0]          up_req_valid,
  output logic       [PORTS-1:0]          up_req_ready,
  input  logic       [PORTS-1:0]          up_req_write,
  input  addr_t      [PORTS-1:0]          up_req_addr,
  input  logic       [PORTS-1:0][UP_BITS-1:0] up_req_wdata,
  output logic       [PORTS-1:0]          up_resp_valid,
  input  logic       [PORTS-1:0]          up_resp_ready,
  output logic       [UP_BITS-1:0]        up_resp_rdata,
  // lower level
  output logic                            lo_req_valid,
  input  logic                            lo_req_ready,
  output line_req_t                       lo_req,
  input  logic                            lo_resp_valid,
  output logic                            lo_resp_ready,
  input  line_resp_t                      lo_resp,
  // events, one-cycle pulses
  output logic                            ev_hit,
  output logic                            ev_miss,
  output logic                            ev_place_top,
  output logic                            ev_place_bottom,
  output logic                            ev_writeback
);

  localparam int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned IDX_W   = (SETS > 1) ? $clog2(SETS) : 0;
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned PORT_W  = (PORTS > 1) ? $clog2(PORTS) : 1;
  localparam int unsigned TAG_W   = ADDR_BITS - IDX_W - OFFSET_BITS;
  localparam int unsigned WPL     = LINE_BITS / UP_BITS;   // words per line
  localparam int unsigned UP_BYTES = UP_BITS / 8;
  localparam int unsigned CNT_W   = (LATENCY > 1) ? $clog2(LATENCY) + 1 : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_HIT_WAIT, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT, S_RESP
  } state_e;

  // storage
  logic [TAG_W-1:0] tag_q  [SETS*WAYS];
  line_t            data_q [SETS*WAYS];
  logic [SETS-1:0][WAYS-1:0] valid_q, dirty_q;

  // current access
  state_e              state_q;
  logic [PORT_W-1:0]   port_q, rr_q;
  logic                write_q;
  addr_t               addr_q;
  logic [UP_BITS-1:0]  wdata_q;
  logic [WAY_W-1:0]    way_q;
  logic [CNT_W-1:0]    cnt_q;
  logic [UP_BITS-1:0]  rdata_q;

  // address fields of the current access
  logic [SET_W-1:0]    set_idx;
  logic [TAG_W-1:0]    tag;
  int unsigned         word_idx;

  if (SETS > 1) begin : g_idx
    assign set_idx = addr_q[OFFSET_BITS +: SET_W];
  end else begin : g_noidx
    assign set_idx = '0;
  end
  assign tag      = addr_q[ADDR_BITS-1 -: TAG_W];
  assign word_idx = (WPL > 1) ? (32'(addr_q[OFFSET_BITS-1:0]) / UP_BYTES) % WPL : 0;

  function automatic int unsigned slot(input logic [SET_W-1:0] s, input logic [WAY_W-1:0] w);
    return 32'(s) * WAYS + 32'(w);
  endfunction

  function automatic line_t merge_word(input line_t l, input logic [UP_BITS-1:0] w,
                                       input int unsigned idx);
    line_t r;
    r = l;
    r[idx*UP_BITS +: UP_BITS] = w;
    return r;
  endfunction

  // ---------------------------------------------------------------- arbiter
  logic              grant_any;
  logic [PORT_W-1:0] grant;

  always_comb begin
    grant_any = 1'b0;
    grant     = '0;
    for (int k = PORTS - 1; k >= 0; k--) begin
      logic [PORT_W-1:0] p;
      p = PORT_W'((32'(rr_q) + 32'(k)) % PORTS);
      if (up_req_valid[p]) begin
        grant_any = 1'b1;
        grant     = p;
      end
    end
  end

  always_comb begin
    up_req_ready = '0;
    if (state_q == S_IDLE && grant_any) up_req_ready[grant] = 1'b1;
  end

  // ---------------------------------------------------------------- lookup
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] victim_way;
  logic             n_bit;
  logic [WAYS-1:0][WAY_W-1:0] order_unused;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[set_idx][w] && tag_q[slot(set_idx, WAY_W'(w))] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  lru_mru_policy #(
    .SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .SET_W(SET_W), .WAY_W(WAY_W)
  ) u_policy (
    .clk          (clk),
    .rst_n        (rst_n),
    .acc_valid_i  (state_q == S_LOOKUP),
    .acc_set_i    (set_idx),
    .acc_tag_i    (tag),
    .acc_hit_i    (hit),
    .acc_hit_way_i(hit_way),
    .set_valid_i  (valid_q[set_idx]),
    .victim_way_o (victim_way),
    .n_o          (n_bit),
    .order_o      (order_unused)
  );

  assign ev_hit          = (state_q == S_LOOKUP) && hit;
  assign ev_miss         = (state_q == S_LOOKUP) && !hit;
  assign ev_place_top    = (state_q == S_LOOKUP) && n_bit;
  assign ev_place_bottom = (state_q == S_LOOKUP) && !n_bit;
  assign ev_writeback    = (state_q == S_WB_REQ) && lo_req_ready;

  // ---------------------------------------------------------------- lower side
  always_comb begin
    lo_req_valid = (state_q == S_WB_REQ) || (state_q == S_FILL_REQ);
    lo_req.write = (state_q == S_WB_REQ);
    if (state_q == S_WB_REQ) begin
      lo_req.addr = {tag_q[slot(set_idx, way_q)], addr_q[ADDR_BITS-TAG_W-1:0]};
      lo_req.addr[OFFSET_BITS-1:0] = '0;
      lo_req.data = data_q[slot(set_idx, way_q)];
    end else begin
      lo_req.addr = {addr_q[ADDR_BITS-1:OFFSET_BITS], {OFFSET_BITS{1'b0}}};
      lo_req.data = '0;
    end
  end

  assign lo_resp_ready = (state_q == S_WB_WAIT) || (state_q == S_FILL_WAIT);

  // ---------------------------------------------------------------- upper responses
  always_comb begin
    up_resp_valid = '0;
    if (state_q == S_RESP) up_resp_valid[port_q] = 1'b1;
  end
  assign up_resp_rdata = rdata_q;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      port_q  <= '0;
      rr_q    <= '0;
      write_q <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      way_q   <= '0;
      cnt_q   <= '0;
      rdata_q <= '0;
      valid_q <= '0;
      dirty_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (grant_any) begin
            port_q  <= grant;
            rr_q    <= PORT_W'((32'(grant) + 1) % PORTS);
            write_q <= up_req_write[grant];
            addr_q  <= up_req_addr[grant];
            wdata_q <= up_req_wdata[grant];
            state_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (hit) begin
            way_q   <= hit_way;
            rdata_q <= data_q[slot(set_idx, hit_way)][word_idx*UP_BITS +: UP_BITS];
            if (write_q) begin
              dirty_q[set_idx][hit_way] <= 1'b1;
              rdata_q <= wdata_q;
            end
            if (LATENCY <= 2) begin
              state_q <= S_RESP;
            end else begin
              cnt_q   <= CNT_W'(LATENCY - 2);
              state_q <= S_HIT_WAIT;
            end
          end else begin
            way_q <= victim_way;
            if (valid_q[set_idx][victim_way] && dirty_q[set_idx][victim_way])
              state_q <= S_WB_REQ;
            else
              state_q <= S_FILL_REQ;
          end
        end
        S_HIT_WAIT: begin
          if (cnt_q <= 1) state_q <= S_RESP;
          else            cnt_q   <= cnt_q - 1'b1;
        end
        S_WB_REQ:    if (lo_req_ready)  state_q <= S_WB_WAIT;
        S_WB_WAIT:   if (lo_resp_valid) state_q <= S_FILL_REQ;
        S_FILL_REQ:  if (lo_req_ready)  state_q <= S_FILL_WAIT;
        S_FILL_WAIT: begin
          if (lo_resp_valid) begin
            valid_q[set_idx][way_q] <= 1'b1;
            dirty_q[set_idx][way_q] <= write_q;
            rdata_q <= write_q ? wdata_q : lo_resp.data[word_idx*UP_BITS +: UP_BITS];
            state_q <= S_RESP;
          end
        end
        S_RESP: if (up_resp_ready[port_q]) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Tag and data arrays (not reset; a line is only read once it is valid).
  always_ff @(posedge clk) begin
    if (state_q == S_LOOKUP && hit && write_q) begin
      data_q[slot(set_idx, hit_way)] <=
        merge_word(data_q[slot(set_idx, hit_way)], wdata_q, word_idx);
    end
    if (state_q == S_FILL_WAIT && lo_resp_valid) begin
      tag_q[slot(set_idx, way_q)]  <= tag;
      data_q[slot(set_idx, way_q)] <=
        write_q ? merge_word(lo_resp.data, wdata_q, word_idx) : lo_resp.data;
    end
  end

  // Handshake rules.
  property p_resp_onehot;
    @(posedge clk) disable iff (!rst_n) $onehot0(up_resp_valid);
  endproperty
  assert property (p_resp_onehot) else $error("more than one response port active");

  property p_lo_req_stable;
    @(posedge clk) disable iff (!rst_n) lo_req_valid && !lo_req_ready |=> lo_req_valid;
  endproperty
  assert property (p_lo_req_stable) else $error("lower request withdrawn before accepted");

  initial begin
    assert (LATENCY >= 2) else $error("LATENCY must be at least 2");
    assert (LINE_BITS % UP_BITS == 0) else $error("UP_BITS must divide the line");
  end

endmodule
