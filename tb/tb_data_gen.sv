// tb_data_gen: checks that the data generator gives the all-zeros word for
// Zero and the all-ones word for One, at the default 8-bit width.
module tb_data_gen;
  logic       zero_one;
  logic [7:0] data;
  int checks = 0, failures = 0;

  data_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      zero_one = t[0];
      #1;
      checks++;
      if (data !== (zero_one ? 8'hFF : 8'h00)) begin
        failures++;
        $display("FAIL zero_one=%b data=%h", zero_one, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
