// Buffered request/response network between two levels of the hierarchy.
//
// N_SRC upper-level modules (sources) send line requests to N_DST lower-level
// modules (destinations). Destinations split the 32-bit address space into
// equal contiguous ranges: with two destinations, addresses 0x0000_0000 to
// 0x7FFF_FFFF go to destination 0 and 0x8000_0000 to 0xFFFF_FFFF to
// destination 1, i.e. the top log2(N_DST) address bits choose it.
//
// Every destination sees one lane per source, lane (d, s), and arbitrates
// between its lanes itself (a cache does this with its ports). Buffers:
//   request path : source s -> input buffer of s -> routed by address ->
//                  output buffer of lane (d, s) -> destination d
//   response path: destination d -> input buffer of lane (d, s) ->
//                  round-robin over d -> output buffer of s -> source s
// Each buffer holds BUF_BITS / LINE_BITS messages (1024 / 256 = 4), and every
// link moves one whole 256-bit line per cycle, matching a link bandwidth of
// 256.
//
// Interface: valid/ready handshakes everywhere; line_req_t and line_resp_t
// come from lru_mru_pkg. Timing: a message needs two clock edges to cross
// the network in either direction (one per buffer); per lane and per source,
// order is preserved.
//
// Address-range routing and the buffer and bandwidth sizes follow the
// modelled configuration; the lane structure and the arbitration are this
// design's own choices.
module mem_network
  import lru_mru_pkg::*;
#(
  parameter int unsigned N_SRC    = 3,
  parameter int unsigned N_DST    = 2,
  parameter int unsigned BUF_BITS = 1024
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // source side
  input  logic       [N_SRC-1:0]             src_req_valid,
  output logic       [N_SRC-1:0]             src_req_ready,
  input  line_req_t  [N_SRC-1:0]             src_req,
  output logic       [N_SRC-1:0]             src_resp_valid,
  input  logic       [N_SRC-1:0]             src_resp_ready,
  output line_resp_t [N_SRC-1:0]             src_resp,
  // destination side: lane [d][s]
  output logic       [N_DST-1:0][N_SRC-1:0]  dst_req_valid,
  input  logic       [N_DST-1:0][N_SRC-1:0]  dst_req_ready,
  output line_req_t  [N_DST-1:0][N_SRC-1:0]  dst_req,
  input  logic       [N_DST-1:0][N_SRC-1:0]  dst_resp_valid,
  output logic       [N_DST-1:0][N_SRC-1:0]  dst_resp_ready,
  input  line_resp_t [N_DST-1:0][N_SRC-1:0]  dst_resp
);

  localparam int unsigned DEPTH = (BUF_BITS / LINE_BITS > 0) ? BUF_BITS / LINE_BITS : 1;
  localparam int unsigned DST_W = (N_DST > 1) ? $clog2(N_DST) : 1;

  function automatic int unsigned route(input logic [DST_W-1:0] top_bits);
    if (N_DST > 1) return 32'(top_bits) % N_DST;
    else           return 0;
  endfunction

  // Lane output buffers of the request path and lane input buffers of the
  // response path.
  logic       [N_DST-1:0][N_SRC-1:0] lreq_in_valid, lreq_in_ready;
  logic       [N_DST-1:0][N_SRC-1:0] lresp_out_valid, lresp_out_ready;
  line_resp_t [N_DST-1:0][N_SRC-1:0] lresp_out;

  for (genvar s = 0; s < N_SRC; s++) begin : g_src
    // ------------------------------------------------ request input buffer
    logic      head_valid, head_ready;
    line_req_t head;

    sync_fifo #(.WIDTH($bits(line_req_t)), .DEPTH(DEPTH)) u_req_in (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (src_req_valid[s]),
      .in_ready (src_req_ready[s]),
      .in_data  (src_req[s]),
      .out_valid(head_valid),
      .out_ready(head_ready),
      .out_data (head)
    );

    always_comb begin
      head_ready = 1'b0;
      for (int d = 0; d < N_DST; d++) begin
        lreq_in_valid[d][s] = head_valid && (route(head.addr[ADDR_BITS-1 -: DST_W]) == 32'(d));
        if (lreq_in_valid[d][s] && lreq_in_ready[d][s]) head_ready = 1'b1;
      end
    end

    // ------------------------------------------------ lane buffers
    for (genvar d = 0; d < N_DST; d++) begin : g_lane
      sync_fifo #(.WIDTH($bits(line_req_t)), .DEPTH(DEPTH)) u_req_out (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (lreq_in_valid[d][s]),
        .in_ready (lreq_in_ready[d][s]),
        .in_data  (head),
        .out_valid(dst_req_valid[d][s]),
        .out_ready(dst_req_ready[d][s]),
        .out_data (dst_req[d][s])
      );

      sync_fifo #(.WIDTH($bits(line_resp_t)), .DEPTH(DEPTH)) u_resp_in (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (dst_resp_valid[d][s]),
        .in_ready (dst_resp_ready[d][s]),
        .in_data  (dst_resp[d][s]),
        .out_valid(lresp_out_valid[d][s]),
        .out_ready(lresp_out_ready[d][s]),
        .out_data (lresp_out[d][s])
      );
    end

    // ------------------------------------------------ response merge and output buffer
    logic [DST_W-1:0] rr_q;
    logic             pick_any;
    logic [DST_W-1:0] pick;
    logic             buf_ready;

    always_comb begin
      pick_any = 1'b0;
      pick     = '0;
      for (int k = N_DST - 1; k >= 0; k--) begin
        int unsigned d;
        d = (32'(rr_q) + 32'(k)) % N_DST;
        if (lresp_out_valid[d][s]) begin
          pick_any = 1'b1;
          pick     = DST_W'(d);
        end
      end
      for (int d = 0; d < N_DST; d++) begin
        lresp_out_ready[d][s] = buf_ready && pick_any && (pick == DST_W'(d));
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     rr_q <= '0;
      else if (pick_any && buf_ready) rr_q <= DST_W'((32'(pick) + 1) % N_DST);
    end

    sync_fifo #(.WIDTH($bits(line_resp_t)), .DEPTH(DEPTH)) u_resp_out (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (pick_any),
      .in_ready (buf_ready),
      .in_data  (lresp_out[pick][s]),
      .out_valid(src_resp_valid[s]),
      .out_ready(src_resp_ready[s]),
      .out_data (src_resp[s])
    );
  end

endmodule
