// splics_tb_pkg: what the split latency cache testbenches share.
//
// init_line gives the content of an L2 line that was never written: every 64-bit
// word holds its own byte address in the low half and that address XOR 5A5A1234
// in the high half, so any read can be predicted and a word from the wrong place
// is caught.
package splics_tb_pkg;
  import splics_pkg::*;

  function automatic line_t init_line(line_addr_t l);
    line_t r;
    for (int w = 0; w < WORDS_PER_LINE; w++) begin
      logic [31:0] a;
      a = 32'({l, OFF_W'(0)}) + 32'(w * WORD_BYTES);
      r[w*WORD_W +: WORD_W] = {a ^ 32'h5A5A_1234, a};
    end
    return r;
  endfunction
endpackage
