// tb_comparator: checks the comparator. Random reads and writes are issued;
// a read's expected word is compared with the RAM data that arrives one cycle
// later, and fault must be 1 exactly when a read's data differs. Writes and
// idle cycles must never raise fault, whatever the data. The next command is
// applied while the previous read's data is on out_data, so a comparison that
// is not lined up with the read latency is caught.
module tb_comparator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cmp_en = 1'b0;
  logic [7:0] exp_data = '0, out_data = '0;
  logic       fault;
  int checks = 0, failures = 0;
  int faults_seen = 0;

  comparator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit       prev_rd;
    bit [7:0] prev_exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_rd = 1'b0;
    prev_exp = '0;
    for (int t = 0; t < 500; t++) begin
      bit [7:0] rd_data;
      // Data returned for the previous cycle's command.
      rd_data = ($urandom % 3 == 0) ? prev_exp ^ (8'd1 << ($urandom % 8)) : prev_exp;
      if (!prev_rd) rd_data = 8'($urandom);
      out_data = rd_data;
      // The next command is presented in the same cycle, as the decoder does.
      cmp_en   = ($urandom % 2) == 1;
      exp_data = ($urandom % 2) ? 8'hFF : 8'h00;
      #1;
      checks++;
      if (fault !== (prev_rd && rd_data != prev_exp)) begin
        failures++;
        $display("FAIL t=%0d fault=%b rd=%b", t, fault, prev_rd);
      end
      if (fault) faults_seen++;
      prev_rd  = cmp_en;
      prev_exp = exp_data;
      @(negedge clk);
    end
    checks++;
    if (faults_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
