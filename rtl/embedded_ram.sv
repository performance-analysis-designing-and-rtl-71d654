// embedded_ram: the 512-bit SRAM under test, 64 words of 8 bits.
//
// Single port. On a clock edge with en = 1 it writes din to word addr when
// we = 1, and otherwise reads word addr into dout, which holds until the next
// read: read data appears one cycle after the read. The contents are not
// reset, as in a real SRAM.
//
// Size and the 8-bit output word follow the design; the array stands for the
// 6T cell array and is written as a synthesizable memory. The synchronous
// read port is this design's choice.
module embedded_ram #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= din;
      else    dout      <= mem[addr];
    end
  end

endmodule
