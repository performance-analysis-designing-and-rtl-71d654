// addr_gen: address generator of the memory BIST.
//
// A counter runs from 0 to DEPTH-1 within each March element. In up
// addressing mode the address is the count itself, in down mode it is
// DEPTH-1 minus the count, so both orders visit every word exactly once and
// last is 1 at the element's final address in either order. The counter
// advances on inc and returns to 0 on clr (clr wins). Because up selects the
// order combinationally, the direction of a new element takes effect in its
// first cycle without a reload.
//
// The default of 64 words of 8 bits gives the 512-bit memory. One counter
// with a mirrored output is this design's choice; the design's waveforms show
// separate up and down counts, which this is equivalent to.
module addr_gen #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DEPTH  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  input  logic              up,
  output logic [ADDR_W-1:0] addr,
  output logic              last
);

  localparam logic [ADDR_W-1:0] MAX = ADDR_W'(DEPTH - 1);

  logic [ADDR_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (inc) cnt <= (cnt == MAX) ? '0 : cnt + 1'b1;
  end

  assign addr = up ? cnt : MAX - cnt;
  assign last = (cnt == MAX);

endmodule
