// microcode_pmbist: 512-bit SRAM with a microcoded memory built-in self test.
//
// The embedded RAM (64 x 8 bits) is tested without any path to the outside
// other than a start signal, an algorithm code and two result flags. A ROM
// bank holds eight March algorithms; alg_sel picks one through an 8:1
// selector; the algorithm decoder drives Read/Write to the RAM, Up/Down to the
// address generator and Zero/One to the data generator; the comparator checks
// every read against the data generator's word and raises fault_detect on a
// mismatch.
//
// Interface and timing:
//   bist_en       start (level). Raise it with alg_sel steady; the first
//                 operation is issued in the cycle after bist_en is seen.
//                 Dropping it aborts a test or clears the result.
//   alg_sel       3-bit algorithm code: 000 MATS+, 001 March X, 010 March C-,
//                 011 March A, 100 March B, 101 March U, 110 March LR,
//                 111 March SS.
//   end_o         End_: 1 once the whole algorithm has run, held while
//                 bist_en stays 1. A test of K operations per word takes
//                 K*64 + 1 cycles from the first operation to end_o.
//   fault_detect  1 in the cycle a read returns data that differs from the
//                 expected word.
//   fault_flag    sticky copy of fault_detect, cleared while bist_en is 0;
//                 final when end_o is 1.
//   addr_o, out_data  the RAM address and read data, for observation.
//
// The block structure and the signals between blocks follow the design's
// block diagram. The sticky fault_flag and the observation ports are this
// design's additions.
module microcode_pmbist
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bist_en,
  input  logic [2:0]        alg_sel,
  output logic              end_o,
  output logic              fault_detect,
  output logic              fault_flag,
  output logic [ADDR_W-1:0] addr_o,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned DEPTH = 2**ADDR_W;

  mc_word_t          words [NUM_ALGS];
  mc_word_t          word;
  logic              running;
  logic              mem_en, mem_we, cmp_en;
  logic              up, zero_one;
  logic              elem_last, alg_last;
  logic              addr_inc, addr_clr, addr_last;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] test_data;

  march_generator u_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .bist_en   (bist_en),
    .elem_last (elem_last),
    .alg_last  (alg_last),
    .addr_last (addr_last),
    .words     (words),
    .running   (running),
    .end_o     (end_o)
  );

  alg_mux8 u_mux (
    .words (words),
    .sel   (alg_sel),
    .word  (word)
  );

  alg_decoder u_dec (
    .word      (word),
    .running   (running),
    .addr_last (addr_last),
    .mem_en    (mem_en),
    .mem_we    (mem_we),
    .cmp_en    (cmp_en),
    .up        (up),
    .zero_one  (zero_one),
    .elem_last (elem_last),
    .alg_last  (alg_last),
    .addr_inc  (addr_inc),
    .addr_clr  (addr_clr)
  );

  addr_gen #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) u_addr (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (addr_clr),
    .inc   (addr_inc),
    .up    (up),
    .addr  (addr),
    .last  (addr_last)
  );

  data_gen #(.DATA_W(DATA_W)) u_data (
    .zero_one (zero_one),
    .data     (test_data)
  );

  embedded_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk  (clk),
    .en   (mem_en),
    .we   (mem_we),
    .addr (addr),
    .din  (test_data),
    .dout (out_data)
  );

  comparator #(.DATA_W(DATA_W)) u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmp_en   (cmp_en),
    .exp_data (test_data),
    .out_data (out_data),
    .fault    (fault_detect)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           fault_flag <= 1'b0;
    else if (!bist_en)    fault_flag <= 1'b0;
    else if (fault_detect) fault_flag <= 1'b1;
  end

  assign addr_o = addr;

  // The algorithm code must not change while a test runs.
  a_sel_stable: assert property (@(posedge clk) disable iff (!rst_n)
    running && $past(running) |-> alg_sel == $past(alg_sel));

endmodule
