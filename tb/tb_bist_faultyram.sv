// tb_bist_faultyram: fault coverage of the eight March algorithms.
//
// The BIST blocks are wired as in microcode_pmbist, but around a RAM model
// that carries one injected fault (see faulty_ram). Every algorithm is run
// against every fault; a fault counts as detected when the fault flag is set
// at End_. The results are printed as a table and checked against the
// expected coverage:
//   MATS+     stuck-at and address faults all detected; some transition and
//             some coupling faults missed
//   March X   stuck-at, address and transition faults all detected; some
//             coupling faults detected
//   March C-  every stuck-at, transition, address and inversion coupling
//             fault detected. Its elements as stored here, up(r0,w1);
//             down(r1,w0); up(r0,w1); down(r1,w0), raise an aggressor only
//             in up order and lower it only in down order, so an idempotent
//             coupling whose forced value the victim already holds at that
//             moment is never sensitised: faults 12 and 13 must be missed,
//             10 and 11 detected (worked out by hand from the elements).
//   March A, B, U, LR, SS: every stuck-at, transition, address and coupling
//             fault of the list detected
// and no algorithm may flag the fault-free RAM.
module tb_bist_faultyram;
  import bist_pkg::*;
  import march_ref_pkg::*;

  localparam int NFAULTS = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bist_en = 1'b0;
  logic [2:0] alg_sel = '0;
  int   fault_sel = 0;

  mc_word_t   words [NUM_ALGS];
  mc_word_t   word;
  logic       running, end_o;
  logic       mem_en, mem_we, cmp_en, up, zero_one, elem_last, alg_last;
  logic       addr_inc, addr_clr, addr_last;
  logic [5:0] addr;
  logic [7:0] test_data, out_data;
  logic       fault, fault_flag;

  int checks = 0, failures = 0;

  march_generator u_gen (.clk, .rst_n, .bist_en, .elem_last, .alg_last, .addr_last,
                         .words, .running, .end_o);
  alg_mux8 u_mux (.words, .sel(alg_sel), .word);
  alg_decoder u_dec (.word, .running, .addr_last, .mem_en, .mem_we, .cmp_en, .up,
                     .zero_one, .elem_last, .alg_last, .addr_inc, .addr_clr);
  addr_gen u_addr (.clk, .rst_n, .clr(addr_clr), .inc(addr_inc), .up, .addr, .last(addr_last));
  data_gen u_data (.zero_one, .data(test_data));
  faulty_ram u_ram (.clk, .en(mem_en), .we(mem_we), .addr, .din(test_data), .dout(out_data),
                    .fault_sel);
  comparator u_cmp (.clk, .rst_n, .cmp_en, .exp_data(test_data), .out_data, .fault);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (!bist_en)   fault_flag <= 1'b0;
    else if (fault) fault_flag <= 1'b1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fault classes: 0 none, 1 stuck-at, 2 transition, 3 address, 4 coupling.
  function automatic int fclass(int f);
    if (f == 0) return 0;
    if (f <= 2) return 1;
    if (f <= 4) return 2;
    if (f == 5) return 3;
    return 4;
  endfunction

  bit det [8][NFAULTS];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 8; a++) begin
      for (int f = 0; f < NFAULTS; f++) begin
        int cycles;
        fault_sel = f;
        alg_sel = 3'(a);
        @(negedge clk);
        bist_en = 1'b1;
        cycles = 0;
        while (!end_o && cycles < 2000) begin
          @(negedge clk);
          cycles++;
        end
        check(end_o && cycles == ops_per_word(a) * 64 + 2,
              $sformatf("%s fault %0d: End_ after %0d cycles", alg_name(a), f, cycles));
        det[a][f] = fault_flag;
        bist_en = 1'b0;
        @(negedge clk);
      end
    end

    $display("fault   none SA0 SA1 TFr TFf AF  CFi0 CFi1 CFi2 CFi3 CFd0 CFd1 CFd2 CFd3");
    for (int a = 0; a < 8; a++) begin
      string line;
      line = $sformatf("%-8s", alg_name(a));
      for (int f = 0; f < NFAULTS; f++) line = {line, det[a][f] ? " yes" : "  - "};
      $display("%s", line);
    end

    for (int a = 0; a < 8; a++) begin
      int miss [5], hit [5];
      for (int c = 0; c < 5; c++) begin miss[c] = 0; hit[c] = 0; end
      for (int f = 0; f < NFAULTS; f++) if (det[a][f]) hit[fclass(f)]++; else miss[fclass(f)]++;
      check(hit[0] == 0, $sformatf("%s flags a fault-free RAM", alg_name(a)));
      check(miss[1] == 0, $sformatf("%s misses a stuck-at fault", alg_name(a)));
      check(miss[3] == 0, $sformatf("%s misses the address fault", alg_name(a)));
      case (a)
        0: begin
          check(miss[2] > 0, "MATS+ should miss a transition fault");
          check(miss[4] > 0, "MATS+ should miss a coupling fault");
        end
        1: begin
          check(miss[2] == 0, "March X misses a transition fault");
          check(hit[4] > 0, "March X detects no coupling fault");
        end
        2: begin
          check(miss[2] == 0, "March C- misses a transition fault");
          for (int f = 6; f <= 11; f++)
            check(det[a][f], $sformatf("March C- misses coupling fault %0d", f));
          check(!det[a][12] && !det[a][13], "March C- idempotent couplings 12, 13");
        end
        default: begin
          check(miss[2] == 0, $sformatf("%s misses a transition fault", alg_name(a)));
          check(miss[4] == 0, $sformatf("%s misses a coupling fault", alg_name(a)));
        end
      endcase
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
