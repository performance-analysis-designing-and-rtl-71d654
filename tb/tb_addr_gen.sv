// tb_addr_gen: checks the address generator at its default size (64 words).
// Walks a full element upward and downward, checking every address and the
// last flag, then checks that clr returns the count to the first address, that
// the count holds without inc, and that the direction can change mid-count.
module tb_addr_gen;
  localparam int ADDR_W = 6;
  localparam int DEPTH  = 64;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              clr = 1'b0, inc = 1'b0, up = 1'b1;
  logic [ADDR_W-1:0] addr;
  logic              last;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int dir = 1; dir >= 0; dir--) begin
      up = dir[0];
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      inc = 1'b1;
      for (int i = 0; i < DEPTH; i++) begin
        int exp_a;
        exp_a = up ? i : DEPTH - 1 - i;
        check(addr == ADDR_W'(exp_a), $sformatf("up=%0d step %0d addr %0d", up, i, addr));
        check(last == (i == DEPTH - 1), $sformatf("last at step %0d", i));
        @(negedge clk);
      end
      inc = 1'b0;
    end
    // Hold without inc.
    up = 1'b1;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    inc = 1'b1;
    repeat (5) @(negedge clk);
    inc = 1'b0;
    repeat (3) @(negedge clk);
    check(addr == 6'd5, "count holds without inc");
    up = 1'b0;
    #1;
    check(addr == 6'd58, "down view of the same count");
    // clr wins over inc.
    clr = 1'b1;
    inc = 1'b1;
    @(negedge clk);
    check(addr == 6'd63 && !last, "clr over inc");
    clr = 1'b0;
    inc = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
