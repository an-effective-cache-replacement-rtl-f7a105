// Behavioural model of main memory for the testbenches (not synthesizable
// intent; the real part is a DRAM system outside this design).
//
// N_LANES independent request lanes, each taking one line request at a time
// with a valid/ready handshake and answering it LATENCY cycles after
// acceptance (200 in the modelled system). Reads return the stored line,
// writes store the line and echo it back. Lines never written read as
// tb_util_pkg::default_line. Contents live in an associative array indexed
// by line address.
module main_memory_model
  import lru_mru_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int unsigned N_LANES = 2,
  parameter int unsigned LATENCY = 200
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic       [N_LANES-1:0]  req_valid,
  output logic       [N_LANES-1:0]  req_ready,
  input  line_req_t  [N_LANES-1:0]  req,
  output logic       [N_LANES-1:0]  resp_valid,
  input  logic       [N_LANES-1:0]  resp_ready,
  output line_resp_t [N_LANES-1:0]  resp
);
  line_t store [logic [ADDR_BITS-OFFSET_BITS-1:0]];
  int unsigned reads = 0, writes = 0;

  function automatic line_t read_line(input addr_t a);
    if (store.exists(a[ADDR_BITS-1:OFFSET_BITS])) return store[a[ADDR_BITS-1:OFFSET_BITS]];
    return default_line(a);
  endfunction

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    logic        busy;
    int unsigned cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy <= 1'b0; cnt <= 0; resp_valid[l] <= 1'b0; resp[l] <= '0;
      end else begin
        if (!busy && req_valid[l]) begin
          busy <= 1'b1;
          cnt  <= LATENCY - 1;
          if (req[l].write) begin
            store[req[l].addr[ADDR_BITS-1:OFFSET_BITS]] = req[l].data;
            resp[l].data <= req[l].data;
            writes++;
          end else begin
            resp[l].data <= read_line(req[l].addr);
            reads++;
          end
        end else if (busy && !resp_valid[l]) begin
          if (cnt <= 1) resp_valid[l] <= 1'b1;
          else          cnt <= cnt - 1;
        end else if (resp_valid[l] && resp_ready[l]) begin
          resp_valid[l] <= 1'b0;
          busy <= 1'b0;
        end
      end
    end
    assign req_ready[l] = !busy;
  end
endmodule
