// alg_decoder: algorithm decoder of the memory BIST.
//
// Turns the selected microcode word into the three control signals of the
// block diagram: Read/Write to the embedded RAM (mem_en, mem_we), Up/Down to
// the address generator (up) and Zero/One to the data generator (zero_one).
// It also tells the address generator when to move: after the last operation
// of an element it advances the address (addr_inc) or, at the element's last
// address, clears it for the next element (addr_clr). cmp_en marks a read, on
// which the comparator checks the data one cycle later.
//
// Purely combinational. Everything is gated by running, so the RAM sees no
// access while the BIST is idle or done. The three named control signals are
// the design's; addr_inc, addr_clr, cmp_en and the element flags returned to
// the generator are this design's way of sequencing the operations.
module alg_decoder
  import bist_pkg::*;
(
  input  mc_word_t word,
  input  logic     running,
  input  logic     addr_last,
  output logic     mem_en,
  output logic     mem_we,
  output logic     cmp_en,
  output logic     up,
  output logic     zero_one,
  output logic     elem_last,
  output logic     alg_last,
  output logic     addr_inc,
  output logic     addr_clr
);

  logic op;

  always_comb begin
    op        = running && word.valid;
    mem_en    = op;
    mem_we    = op && word.write;
    cmp_en    = op && !word.write;
    up        = word.up;
    zero_one  = word.data;
    elem_last = op && word.elem_last;
    alg_last  = op && word.alg_last;
    addr_inc  = elem_last && !addr_last;
    addr_clr  = !running || (elem_last && addr_last);
  end

endmodule
