// tb_march_generator: checks the ROM-based algorithm generator.
//
// For each of the eight algorithms the testbench plays the part of the
// decoder and the address generator for a memory of N words: it feeds back
// elem_last, alg_last and addr_last from the parsed reference algorithm and
// checks, every cycle, the word offered for every algorithm against the
// reference at the expected program counter. It also checks the idle state
// before bist_en, the FLUSH cycle, End_ and its release, the cycle count
// (operations x N + 1 cycles from the first operation to End_) and an abort.
module tb_march_generator;
  import bist_pkg::*;
  import march_ref_pkg::*;

  localparam int N = 4;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     bist_en = 1'b0;
  logic     elem_last = 1'b0, alg_last = 1'b0, addr_last = 1'b0;
  mc_word_t words [NUM_ALGS];
  logic     running, end_o;

  int checks = 0, failures = 0;

  march_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  ref_op_t ops [NUM_ALGS][$];
  int      first [NUM_ALGS][$];

  // Expected word of algorithm b at program counter pc.
  task automatic check_word(int b, int pc);
    mc_word_t w;
    w = words[b];
    if (pc < ops[b].size()) begin
      check(w.valid && w.up == ops[b][pc].up && w.write == ops[b][pc].wr &&
            w.data == ops[b][pc].d && w.elem_last == ops[b][pc].elem_last &&
            w.alg_last == ops[b][pc].alg_last,
            $sformatf("%s word %0d wrong: %b", alg_name(b), pc, w));
    end else begin
      check(!w.valid, $sformatf("%s word %0d should be empty", alg_name(b), pc));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NUM_ALGS; a++) begin
      parse(a, ops[a], first[a]);
      check(ops[a].size() == ops_per_word(a), $sformatf("%s parsed length", alg_name(a)));
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      check(!running && !end_o, "idle before bist_en");
    end

    for (int a = 0; a < NUM_ALGS; a++) begin
      int cycles;
      @(negedge clk);
      bist_en = 1'b1;
      @(negedge clk);
      cycles = 0;
      for (int e = 0; e < first[a].size(); e++) begin
        int lo, hi;
        lo = first[a][e];
        hi = (e + 1 < first[a].size()) ? first[a][e+1] : ops[a].size();
        for (int i = 0; i < N; i++) begin
          for (int k = lo; k < hi; k++) begin
            check(running && !end_o, "running during test");
            for (int b = 0; b < NUM_ALGS; b++) check_word(b, k);
            elem_last = ops[a][k].elem_last;
            alg_last  = ops[a][k].alg_last;
            addr_last = (i == N - 1);
            cycles++;
            @(negedge clk);
          end
        end
      end
      elem_last = 1'b0; alg_last = 1'b0; addr_last = 1'b0;
      check(!running && !end_o, "flush cycle");
      cycles++;
      @(negedge clk);
      check(end_o && !running, "End_ after flush");
      check(cycles == ops_per_word(a) * N + 1,
            $sformatf("%s: %0d cycles to End_", alg_name(a), cycles));
      @(negedge clk);
      check(end_o, "End_ held");
      bist_en = 1'b0;
      @(negedge clk);
      check(!end_o && !running, "End_ released");
    end

    // Abort: drop bist_en in the middle of a test.
    bist_en = 1'b1;
    repeat (3) @(negedge clk);
    check(running, "running before abort");
    bist_en = 1'b0;
    @(negedge clk);
    check(!running && !end_o, "abort returns to idle");
    for (int b = 0; b < NUM_ALGS; b++) check_word(b, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
