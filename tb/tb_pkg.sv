// tb_pkg: helpers shared by the cache testbenches: the initial contents of
// the behavioural main memory (a word's value is a fixed function of its
// address, so a reference model needs no copy of untouched memory).
package tb_pkg;
  import sc_pkg::*;

  function automatic logic [WORD_W-1:0] init_word(logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] w;
    w = {a[ADDR_W-1:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [LINE_W-1:0] init_line(logic [ADDR_W-OFF_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / WORD_W; i++)
      l[i*WORD_W +: WORD_W] = init_word({la, {OFF_W{1'b0}}} + ADDR_W'(i * (WORD_W / 8)));
    return l;
  endfunction
endpackage
