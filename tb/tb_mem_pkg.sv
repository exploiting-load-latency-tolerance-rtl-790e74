// tb_mem_pkg: what the testbenches agree memory holds before anything is
// written. Each 64-bit word's initial value is a fixed function of its
// address, so the level-2 model and the reference models of the testbenches
// need no shared storage to start from the same contents.
package tb_mem_pkg;
  import mlc_pkg::*;

  function automatic word_t init_word(addr_t a);
    logic [31:0] w;
    w = {a[31:3], 3'b000};
    return {w ^ 32'h5A5A_1234, ~w + 32'h0000_0F0F};
  endfunction

  function automatic line_t init_line(line_addr_t la);
    line_t l;
    for (int i = 0; i < WORDS_PER_LINE; i++)
      l[i*WORD_W +: WORD_W] = init_word({la, OFFSET_W'(i * WORD_BYTES)});
    return l;
  endfunction
endpackage
