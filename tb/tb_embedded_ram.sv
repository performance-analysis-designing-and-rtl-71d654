// tb_embedded_ram: checks the 64 x 8 SRAM. Writes random words to every
// address, reads them back in a different order with the one-cycle read
// latency, and checks that dout holds while en is 0 and that a write with
// en = 0 changes nothing.
module tb_embedded_ram;
  localparam int ADDR_W = 6, DATA_W = 8, DEPTH = 64;

  logic              clk = 1'b0;
  logic              en = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] din = '0, dout;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  embedded_ram dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic read(int a);
    en = 1'b1; we = 1'b0; addr = ADDR_W'(a);
    @(negedge clk);
    en = 1'b0;
    check(dout == model[a], $sformatf("read %0d got %h expected %h", a, dout, model[a]));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = DATA_W'($urandom);
      en = 1'b1; we = 1'b1; addr = ADDR_W'(a); din = model[a];
      @(negedge clk);
    end
    en = 1'b0; we = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) read(a);
    // Output holds while en is 0.
    read(17);
    addr = 6'd3;
    repeat (3) @(negedge clk);
    check(dout == model[17], "dout holds with en = 0");
    // No write without en.
    we = 1'b1; din = ~model[3]; addr = 6'd3;
    @(negedge clk);
    we = 1'b0;
    read(3);
    // Back-to-back read after write.
    en = 1'b1; we = 1'b1; addr = 6'd9; din = 8'h5A; model[9] = 8'h5A;
    @(negedge clk);
    read(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
