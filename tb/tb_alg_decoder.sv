// tb_alg_decoder: exhaustive check of the algorithm decoder over every
// microcode word, the running flag and addr_last, against the decoding rules
// written out independently here.
module tb_alg_decoder;
  import bist_pkg::*;

  mc_word_t word;
  logic     running, addr_last;
  logic     mem_en, mem_we, cmp_en, up, zero_one, elem_last, alg_last, addr_inc, addr_clr;
  int checks = 0, failures = 0;

  alg_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bit valid, wup, wr, d, el, al, run, last, op;
      bit [8:0] expv, got;
      {valid, wup, wr, d, el, al, run, last} = 8'(v);
      word      = {valid, wup, wr, d, el, al};
      running   = run;
      addr_last = last;
      #1;
      op   = run & valid;
      // mem_en mem_we cmp_en up zero_one elem_last alg_last addr_inc addr_clr
      expv = {op, op & wr, op & ~wr, wup, d, op & el, op & al,
              op & el & ~last, ~run | (op & el & last)};
      got  = {mem_en, mem_we, cmp_en, up, zero_one, elem_last, alg_last, addr_inc, addr_clr};
      checks++;
      if (got !== expv) begin
        failures++;
        $display("FAIL v=%b got %b expected %b", 8'(v), got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
