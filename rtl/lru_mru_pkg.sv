// Shared types and constants of the LRU-MRU cache hierarchy.
//
// Every cache line is 256 bits (32 bytes) and addresses are 32-bit byte
// addresses. Between cache levels a message is a whole line: a request
// carries a write flag, a line-aligned address and the line (meaningful only
// for writes); a response carries a line (the fill data, or the written line
// echoed back as an acknowledgement for writes).
//
// The line size and the 32-bit address range follow the hierarchy being
// modelled; the message format is this design's own choice.
package lru_mru_pkg;

  localparam int unsigned ADDR_BITS = 32;
  localparam int unsigned LINE_BITS = 256;
  localparam int unsigned LINE_BYTES = LINE_BITS / 8;
  localparam int unsigned OFFSET_BITS = $clog2(LINE_BYTES);
  localparam int unsigned WORD_BITS = 32;

  typedef logic [ADDR_BITS-1:0] addr_t;
  typedef logic [LINE_BITS-1:0] line_t;

  // Request from an upper level to a lower level (whole line).
  typedef struct packed {
    logic  write;
    addr_t addr;
    line_t data;
  } line_req_t;

  // Response from a lower level to an upper level.
  typedef struct packed {
    line_t data;
  } line_resp_t;

  // N as defined by the replacement algorithm: 1 selects LRU behaviour
  // (place at the top of the stack), 0 selects MRU behaviour (place at the
  // bottom of the stack).
  typedef enum logic {
    PLACE_BOTTOM = 1'b0,
    PLACE_TOP    = 1'b1
  } placement_e;

endpackage
