// tb_alg_mux8: checks that the 8:1 selector passes exactly the word of the
// selected algorithm, for every code and random word contents.
module tb_alg_mux8;
  import bist_pkg::*;

  mc_word_t   words [NUM_ALGS];
  logic [2:0] sel;
  mc_word_t   word;
  int checks = 0, failures = 0;

  alg_mux8 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int b = 0; b < NUM_ALGS; b++) words[b] = mc_word_t'($urandom);
      sel = 3'(t);
      #1;
      checks++;
      if (word !== words[t % 8]) begin
        failures++;
        $display("FAIL sel=%0d word=%b expected %b", sel, word, words[t % 8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
