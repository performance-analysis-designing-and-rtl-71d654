// tb_microcode_pmbist: end-to-end test of the 512-bit SRAM with BIST, at the
// design's default size (64 words x 8 bits).
//
// Every one of the eight algorithms is run three times: on a fault-free RAM,
// with read-data bit 3 stuck at 0 and with read-data bit 6 stuck at 1 (a
// stuck line, forced on the RAM's output). For each run the testbench
//   - checks every RAM access (enable, read/write, address, write data)
//     against the operation sequence worked out from the algorithm's March
//     notation, walking the elements up and down over all 64 words;
//   - keeps its own copy of the memory contents and counts the reads whose
//     data must differ from the expected word; fault_detect must pulse
//     exactly that often, and fault_flag must be set at End_ exactly when
//     there was at least one;
//   - checks that End_ rises K*64 + 1 cycles after the first operation,
//     K being the algorithm's operations per word.
// It also aborts a test halfway and checks that the RAM then sees no access.
// The mechanisms exercised are counted and each must occur at least once.
module tb_microcode_pmbist;
  import march_ref_pkg::*;

  localparam int DEPTH = 64;
  localparam int DATA_W = 8;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             bist_en = 1'b0;
  logic [2:0]       alg_sel = '0;
  logic             end_o, fault_detect, fault_flag;
  logic [5:0]       addr_o;
  logic [DATA_W-1:0] out_data;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_up_elem = 0, n_down_elem = 0, n_read = 0, n_write = 0;
  int n_zero = 0, n_one = 0, n_fault = 0, n_end = 0, n_abort = 0;
  int n_alg [8];

  microcode_pmbist dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stuck: 0 none, 1 bit sbit stuck at sval.
  task automatic run_alg(int a, bit stuck, int sbit, bit sval);
    ref_op_t          ops[$];
    int               first[$];
    logic [DATA_W-1:0] model [DEPTH];
    int               exp_faults, got_faults, cycles, acc_errors;
    bit               pending;
    logic [DATA_W-1:0] pend_exp;

    parse(a, ops, first);
    exp_faults = 0; got_faults = 0; cycles = 0; acc_errors = 0;
    pending = 1'b0;
    for (int i = 0; i < DEPTH; i++) model[i] = 'x;

    @(negedge clk);
    alg_sel = 3'(a);
    bist_en = 1'b1;
    @(negedge clk);   // generator leaves IDLE at the next edge
    for (int e = 0; e < first.size(); e++) begin
      int lo, hi;
      lo = first[e];
      hi = (e + 1 < first.size()) ? first[e+1] : ops.size();
      if (ops[lo].up) n_up_elem++; else n_down_elem++;
      for (int i = 0; i < DEPTH; i++) begin
        int ad;
        ad = ops[lo].up ? i : DEPTH - 1 - i;
        for (int k = lo; k < hi; k++) begin
          logic [DATA_W-1:0] word;
          word = {DATA_W{ops[k].d}};
          // Result of the read issued in the previous cycle.
          if (fault_detect) got_faults++;
          // This cycle's access.
          if (!(dut.mem_en === 1'b1 && dut.mem_we === ops[k].wr && addr_o == 6'(ad) &&
                (!ops[k].wr || dut.u_ram.din == word))) begin
            acc_errors++;
            if (acc_errors < 5)
              $display("FAIL %s op %0d addr %0d: en=%b we=%b addr=%0d", alg_name(a), k, ad,
                       dut.mem_en, dut.mem_we, addr_o);
          end
          if (ops[k].wr) begin
            model[ad] = word;
            n_write++;
          end else begin
            logic [DATA_W-1:0] seen;
            seen = model[ad];
            if (stuck) seen[sbit] = sval;
            if (seen != word) exp_faults++;
            n_read++;
          end
          if (ops[k].d) n_one++; else n_zero++;
          cycles++;
          @(negedge clk);
        end
      end
    end
    // Flush cycle: the last read's result.
    if (fault_detect) got_faults++;
    check(!end_o, "End_ not yet in flush cycle");
    check(!dut.mem_en, "no access in flush cycle");
    cycles++;
    @(negedge clk);
    check(end_o, $sformatf("%s: End_ after %0d cycles", alg_name(a), cycles));
    check(cycles == ops_per_word(a) * DEPTH + 1, $sformatf("%s cycle count %0d", alg_name(a), cycles));
    check(acc_errors == 0, $sformatf("%s: %0d wrong RAM accesses", alg_name(a), acc_errors));
    check(got_faults == exp_faults,
          $sformatf("%s stuck=%0d: %0d fault pulses, expected %0d", alg_name(a), stuck, got_faults, exp_faults));
    check(fault_flag == (exp_faults > 0), $sformatf("%s: fault_flag %b", alg_name(a), fault_flag));
    if (end_o) n_end++;
    n_fault += got_faults;
    n_alg[a]++;
    repeat (2) @(negedge clk);
    check(end_o && !dut.mem_en, "End_ held, RAM quiet");
    bist_en = 1'b0;
    @(negedge clk);
    check(!end_o && !fault_flag, "result cleared after bist_en drops");
  endtask

  initial begin
    for (int a = 0; a < 8; a++) n_alg[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      check(!dut.mem_en && !end_o && !fault_detect, "idle until bist_en");
    end

    for (int a = 0; a < 8; a++) run_alg(a, 1'b0, 0, 1'b0);

    force dut.u_ram.dout[3] = 1'b0;
    for (int a = 0; a < 8; a++) run_alg(a, 1'b1, 3, 1'b0);
    release dut.u_ram.dout[3];

    force dut.u_ram.dout[6] = 1'b1;
    for (int a = 0; a < 8; a++) run_alg(a, 1'b1, 6, 1'b1);
    release dut.u_ram.dout[6];

    // Abort a March C- test halfway through.
    @(negedge clk);
    alg_sel = 3'b010;
    bist_en = 1'b1;
    repeat (300) @(negedge clk);
    check(dut.mem_en, "test running before abort");
    bist_en = 1'b0;
    @(negedge clk);
    begin
      bit quiet;
      quiet = 1'b1;
      repeat (20) begin
        if (dut.mem_en || end_o) quiet = 1'b0;
        @(negedge clk);
      end
      check(quiet, "RAM quiet after abort");
      if (quiet) n_abort++;
    end
    // A full run after the abort starts from the beginning.
    run_alg(2, 1'b0, 0, 1'b0);

    $display("mechanisms: up elements %0d, down elements %0d, reads %0d, writes %0d,",
             n_up_elem, n_down_elem, n_read, n_write);
    $display("            zero data %0d, one data %0d, fault detects %0d, End_ %0d, aborts %0d",
             n_zero, n_one, n_fault, n_end, n_abort);
    check(n_up_elem > 0, "up addressing used");
    check(n_down_elem > 0, "down addressing used");
    check(n_read > 0 && n_write > 0, "reads and writes");
    check(n_zero > 0 && n_one > 0, "zero and one data");
    check(n_fault > 0, "fault detected");
    check(n_end > 0, "End_ reached");
    check(n_abort > 0, "abort");
    for (int a = 0; a < 8; a++) check(n_alg[a] > 0, $sformatf("%s selected", alg_name(a)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
