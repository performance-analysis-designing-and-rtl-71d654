// bist_pkg: types and constants shared by the memory BIST blocks.
//
// The self test runs one of eight March algorithms on the embedded RAM. Each
// algorithm is stored as a short microcode program: one word per read or
// write operation of a March element, in the order the element performs them.
// A word says in which order the element walks the addresses (up or down),
// whether the operation is a read or a write, which data background it uses
// (all zeros or all ones), and whether it closes its element and the whole
// algorithm. The generator repeats the words of one element at every address
// before moving on to the next element.
//
// The eight algorithms, their 3-bit selection codes and their March elements
// follow the algorithm table of the design (MATS+ = 000 ... March SS = 111).
// The word layout, the program counter width and the order of the words are
// this design's own choices.
package bist_pkg;

  localparam int unsigned NUM_ALGS = 8;
  // Program counter width: the longest algorithm, March SS, has 22 operations.
  localparam int unsigned PC_W     = 5;

  // Selection codes of the eight algorithms.
  typedef enum logic [2:0] {
    ALG_MATS_PLUS = 3'b000,
    ALG_MARCH_X   = 3'b001,
    ALG_MARCH_CM  = 3'b010,
    ALG_MARCH_A   = 3'b011,
    ALG_MARCH_B   = 3'b100,
    ALG_MARCH_U   = 3'b101,
    ALG_MARCH_LR  = 3'b110,
    ALG_MARCH_SS  = 3'b111
  } alg_sel_e;

  // One microcode word.
  typedef struct packed {
    logic valid;      // word holds an operation
    logic up;         // addressing order of its element: 1 = up, 0 = down
    logic write;      // 1 = write, 0 = read
    logic data;       // data background: 0 = all zeros, 1 = all ones
    logic elem_last;  // last operation of its March element
    logic alg_last;   // belongs to the last March element of the algorithm
  } mc_word_t;

  // Operation codes {write, data} used to spell the programs below.
  localparam logic [1:0] R0 = 2'b00;
  localparam logic [1:0] R1 = 2'b01;
  localparam logic [1:0] W0 = 2'b10;
  localparam logic [1:0] W1 = 2'b11;
  localparam logic UP = 1'b1;
  localparam logic DN = 1'b0;

  function automatic mc_word_t mk(logic up, logic [1:0] op, logic elem_last, logic alg_last);
    mc_word_t w;
    w.valid     = 1'b1;
    w.up        = up;
    w.write     = op[1];
    w.data      = op[0];
    w.elem_last = elem_last;
    w.alg_last  = alg_last;
    return w;
  endfunction

  // Microcode ROM contents: word number pc of algorithm alg. One source line
  // per March element; only the last word of an element has elem_last set,
  // and every word of the final element has alg_last set.
  function automatic mc_word_t mc_rom(alg_sel_e alg, logic [PC_W-1:0] pc);
    mc_word_t w;
    w = '0;
    unique case (alg)
      // {up(w0); up(r0,w1); down(r1,w0)}
      ALG_MATS_PLUS: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 1, 0);
        5'd3:  w = mk(DN, R1, 0, 1);  5'd4:  w = mk(DN, W0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,w1); down(r1,w0); up(r0)}
      ALG_MARCH_X: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 1, 0);
        5'd3:  w = mk(DN, R1, 0, 0);  5'd4:  w = mk(DN, W0, 1, 0);
        5'd5:  w = mk(UP, R0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,w1); down(r1,w0); up(r0,w1); down(r1,w0); up(r0)}
      ALG_MARCH_CM: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 1, 0);
        5'd3:  w = mk(DN, R1, 0, 0);  5'd4:  w = mk(DN, W0, 1, 0);
        5'd5:  w = mk(UP, R0, 0, 0);  5'd6:  w = mk(UP, W1, 1, 0);
        5'd7:  w = mk(DN, R1, 0, 0);  5'd8:  w = mk(DN, W0, 1, 0);
        5'd9:  w = mk(UP, R0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,w1,w0,w1); up(r1,w0,w1); down(r1,w0,w1,w0); down(r0,w1,w0)}
      ALG_MARCH_A: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 0, 0);
        5'd3:  w = mk(UP, W0, 0, 0);  5'd4:  w = mk(UP, W1, 1, 0);
        5'd5:  w = mk(UP, R1, 0, 0);  5'd6:  w = mk(UP, W0, 0, 0);
        5'd7:  w = mk(UP, W1, 1, 0);
        5'd8:  w = mk(DN, R1, 0, 0);  5'd9:  w = mk(DN, W0, 0, 0);
        5'd10: w = mk(DN, W1, 0, 0);  5'd11: w = mk(DN, W0, 1, 0);
        5'd12: w = mk(DN, R0, 0, 1);  5'd13: w = mk(DN, W1, 0, 1);
        5'd14: w = mk(DN, W0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,w1,r1,w0,r0,w1); up(r1,w0,w1); down(r1,w0,w1,w0); down(r0,w1,w0)}
      ALG_MARCH_B: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 0, 0);
        5'd3:  w = mk(UP, R1, 0, 0);  5'd4:  w = mk(UP, W0, 0, 0);
        5'd5:  w = mk(UP, R0, 0, 0);  5'd6:  w = mk(UP, W1, 1, 0);
        5'd7:  w = mk(UP, R1, 0, 0);  5'd8:  w = mk(UP, W0, 0, 0);
        5'd9:  w = mk(UP, W1, 1, 0);
        5'd10: w = mk(DN, R1, 0, 0);  5'd11: w = mk(DN, W0, 0, 0);
        5'd12: w = mk(DN, W1, 0, 0);  5'd13: w = mk(DN, W0, 1, 0);
        5'd14: w = mk(DN, R0, 0, 1);  5'd15: w = mk(DN, W1, 0, 1);
        5'd16: w = mk(DN, W0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,w1,r1,w0); up(r0,w1); down(r1,w0,r0,w1); down(r1,w0)}
      ALG_MARCH_U: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, W1, 0, 0);
        5'd3:  w = mk(UP, R1, 0, 0);  5'd4:  w = mk(UP, W0, 1, 0);
        5'd5:  w = mk(UP, R0, 0, 0);  5'd6:  w = mk(UP, W1, 1, 0);
        5'd7:  w = mk(DN, R1, 0, 0);  5'd8:  w = mk(DN, W0, 0, 0);
        5'd9:  w = mk(DN, R0, 0, 0);  5'd10: w = mk(DN, W1, 1, 0);
        5'd11: w = mk(DN, R1, 0, 1);  5'd12: w = mk(DN, W0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); down(r0,w1); up(r1,w0,r0,w1); up(r1,w0); up(r0,w1,r1,w0); up(r0)}
      ALG_MARCH_LR: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(DN, R0, 0, 0);  5'd2:  w = mk(DN, W1, 1, 0);
        5'd3:  w = mk(UP, R1, 0, 0);  5'd4:  w = mk(UP, W0, 0, 0);
        5'd5:  w = mk(UP, R0, 0, 0);  5'd6:  w = mk(UP, W1, 1, 0);
        5'd7:  w = mk(UP, R1, 0, 0);  5'd8:  w = mk(UP, W0, 1, 0);
        5'd9:  w = mk(UP, R0, 0, 0);  5'd10: w = mk(UP, W1, 0, 0);
        5'd11: w = mk(UP, R1, 0, 0);  5'd12: w = mk(UP, W0, 1, 0);
        5'd13: w = mk(UP, R0, 1, 1);
        default: w = '0;
      endcase
      // {up(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0);
      //  down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); up(r0)}
      ALG_MARCH_SS: case (pc)
        5'd0:  w = mk(UP, W0, 1, 0);
        5'd1:  w = mk(UP, R0, 0, 0);  5'd2:  w = mk(UP, R0, 0, 0);
        5'd3:  w = mk(UP, W0, 0, 0);  5'd4:  w = mk(UP, R0, 0, 0);
        5'd5:  w = mk(UP, W1, 1, 0);
        5'd6:  w = mk(UP, R1, 0, 0);  5'd7:  w = mk(UP, R1, 0, 0);
        5'd8:  w = mk(UP, W1, 0, 0);  5'd9:  w = mk(UP, R1, 0, 0);
        5'd10: w = mk(UP, W0, 1, 0);
        5'd11: w = mk(DN, R0, 0, 0);  5'd12: w = mk(DN, R0, 0, 0);
        5'd13: w = mk(DN, W0, 0, 0);  5'd14: w = mk(DN, R0, 0, 0);
        5'd15: w = mk(DN, W1, 1, 0);
        5'd16: w = mk(DN, R1, 0, 0);  5'd17: w = mk(DN, R1, 0, 0);
        5'd18: w = mk(DN, W1, 0, 0);  5'd19: w = mk(DN, R1, 0, 0);
        5'd20: w = mk(DN, W0, 1, 0);
        5'd21: w = mk(UP, R0, 1, 1);
        default: w = '0;
      endcase
      default: w = '0;
    endcase
    return w;
  endfunction

endpackage
