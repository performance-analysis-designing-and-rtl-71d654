// comparator: checks the RAM's read data against the test data.
//
// On a read the decoder raises cmp_en together with the expected word
// exp_data (the word the data generator produces for that read). Both are
// registered for one cycle to line up with the RAM's synchronous read; fault
// is then 1 for that cycle if out_data differs from the expected word in any
// bit. With no read in flight (writes, idle) fault stays 0.
//
// The comparison and the fault detect output follow the design; the
// one-cycle alignment register matches this design's RAM read latency.
module comparator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_en,
  input  logic [DATA_W-1:0] exp_data,
  input  logic [DATA_W-1:0] out_data,
  output logic              fault
);

  logic              cmp_q;
  logic [DATA_W-1:0] exp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_q <= 1'b0;
      exp_q <= '0;
    end else begin
      cmp_q <= cmp_en;
      exp_q <= exp_data;
    end
  end

  assign fault = cmp_q && (out_data != exp_q);

endmodule
