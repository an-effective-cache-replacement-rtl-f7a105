// Helpers shared by the testbenches: the initial contents of main memory.
//
// Every 32-bit word of memory that was never written holds
// default_word(a) = (a * 0x9E3779B9) xor 0x12345678, a being the word's byte
// address, so a wrong address or a wrong word slot shows up as wrong data.
package tb_util_pkg;
  import lru_mru_pkg::*;

  function automatic logic [31:0] default_word(input addr_t a);
    return ({a[31:2], 2'b00} * 32'h9E37_79B9) ^ 32'h1234_5678;
  endfunction

  function automatic line_t default_line(input addr_t a);
    line_t l;
    addr_t base;
    base = {a[ADDR_BITS-1:OFFSET_BITS], {OFFSET_BITS{1'b0}}};
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = default_word(base + addr_t'(4 * i));
    return l;
  endfunction
endpackage
