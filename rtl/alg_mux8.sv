// alg_mux8: 8:1 selector between the eight algorithm ROMs.
//
// Passes the microcode word of the algorithm whose 3-bit code is on sel to
// the algorithm decoder. Codes follow the algorithm table: 000 MATS+,
// 001 March X, 010 March C-, 011 March A, 100 March B, 101 March U,
// 110 March LR, 111 March SS. Purely combinational; sel must be held steady
// for the whole test. The 3-bit width is taken from the table's codes.
module alg_mux8
  import bist_pkg::*;
(
  input  mc_word_t       words [NUM_ALGS],
  input  logic     [2:0] sel,
  output mc_word_t       word
);

  always_comb begin
    word = '0;
    unique case (sel)
      3'd0: word = words[0];
      3'd1: word = words[1];
      3'd2: word = words[2];
      3'd3: word = words[3];
      3'd4: word = words[4];
      3'd5: word = words[5];
      3'd6: word = words[6];
      3'd7: word = words[7];
      default: word = '0;
    endcase
  end

endmodule
