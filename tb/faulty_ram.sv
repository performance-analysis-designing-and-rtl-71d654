// faulty_ram: behavioural model of the 64 x 8 SRAM with one injected fault,
// for testing what the BIST detects. Same ports and timing as embedded_ram
// (synchronous write, read data one cycle after the read), plus fault_sel.
//
// fault_sel chooses the fault (cells are word/bit pairs):
//   0  none
//   1  stuck-at-0, cell (10,2)            2  stuck-at-1, cell (40,5)
//   3  rising transition fault, (20,1)    4  falling transition fault, (33,6)
//   5  address fault: address 12 selects word 45; word 12 is unreachable
//   6  inversion coupling, aggressor (5,0) rising inverts victim (50,0)
//   7  inversion coupling, aggressor (50,3) rising inverts victim (5,3)
//   8  inversion coupling, aggressor (5,4) falling inverts victim (50,4)
//   9  inversion coupling, aggressor (50,7) falling inverts victim (5,7)
//  10  idempotent coupling, aggressor (7,1) rising sets victim (30,1) to 1
//  11  idempotent coupling, aggressor (30,2) rising sets victim (7,2) to 0
//  12  idempotent coupling, aggressor (7,5) falling sets victim (30,5) to 0
//  13  idempotent coupling, aggressor (30,6) falling sets victim (7,6) to 1
module faulty_ram (
  input  logic       clk,
  input  logic       en,
  input  logic       we,
  input  logic [5:0] addr,
  input  logic [7:0] din,
  output logic [7:0] dout,
  input  int         fault_sel
);

  logic [7:0] mem [64];

  typedef struct {
    int  aw, ab;   // aggressor word, bit
    bit  rise;     // triggered by the aggressor's rising (1) or falling (0) transition
    int  vw, vb;   // victim word, bit
    bit  inv;      // inversion (1) or idempotent (0) coupling
    bit  val;      // value forced by an idempotent coupling
  } cf_t;

  function automatic bit cf_of(int f, output cf_t c);
    c = '{0, 0, 0, 0, 0, 0, 0};
    case (f)
      6:  c = '{5, 0, 1, 50, 0, 1, 0};
      7:  c = '{50, 3, 1, 5, 3, 1, 0};
      8:  c = '{5, 4, 0, 50, 4, 1, 0};
      9:  c = '{50, 7, 0, 5, 7, 1, 0};
      10: c = '{7, 1, 1, 30, 1, 0, 1};
      11: c = '{30, 2, 1, 7, 2, 0, 0};
      12: c = '{7, 5, 0, 30, 5, 0, 0};
      13: c = '{30, 6, 0, 7, 6, 0, 1};
      default: return 1'b0;
    endcase
    return 1'b1;
  endfunction

  function automatic int decode(logic [5:0] a);
    if (fault_sel == 5 && a == 6'd12) return 45;
    return int'(a);
  endfunction

  function automatic logic [7:0] stuck(int w, logic [7:0] v);
    logic [7:0] r;
    r = v;
    if (fault_sel == 1 && w == 10) r[2] = 1'b0;
    if (fault_sel == 2 && w == 40) r[5] = 1'b1;
    return r;
  endfunction

  always @(posedge clk) begin
    if (en) begin
      int w;
      w = decode(addr);
      if (we) begin
        logic [7:0] old, nw;
        cf_t c;
        old = mem[w];
        nw  = din;
        if (fault_sel == 3 && w == 20 && !old[1]) nw[1] = 1'b0;
        if (fault_sel == 4 && w == 33 &&  old[6]) nw[6] = 1'b1;
        mem[w] = stuck(w, nw);
        if (cf_of(fault_sel, c) && w == c.aw &&
            old[c.ab] != mem[w][c.ab] && mem[w][c.ab] == c.rise) begin
          if (c.inv) mem[c.vw][c.vb] = ~mem[c.vw][c.vb];
          else       mem[c.vw][c.vb] = c.val;
        end
      end else begin
        dout <= stuck(w, mem[w]);
      end
    end
  end

endmodule
