// march_generator: ROM-based algorithm generator of the memory BIST.
//
// Holds the microcode of all eight March algorithms (see bist_pkg) and one
// program counter that steps through them. It offers the word at the program
// counter of every algorithm at once, one per ROM, so that the 8:1 selector
// behind it picks the algorithm.
//
// Sequencing: the generator waits in IDLE until bist_en is 1. It then runs one
// operation per clock. After the last operation of a March element it jumps
// back to the element's first word while the address generator has not reached
// the element's last address, and moves on to the next element when it has.
// After the last element it spends one FLUSH cycle, so that the RAM's last read
// reaches the comparator, and then holds end_o (End_) high in DONE until
// bist_en returns to 0. Clearing bist_en while the test runs aborts it.
//
// Interface: elem_last and alg_last come back from the algorithm decoder (the
// flags of the selected word), addr_last from the address generator. running
// is 1 while operations are issued.
//
// The ROM bank, the BIST_EN start and the End_ output follow the design's
// block diagram; the jump-back sequencing, the FLUSH cycle and the abort on
// bist_en = 0 are this design's own choices.
module march_generator
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     bist_en,
  input  logic     elem_last,
  input  logic     alg_last,
  input  logic     addr_last,
  output mc_word_t words [NUM_ALGS],
  output logic     running,
  output logic     end_o
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} gen_state_e;

  gen_state_e      state;
  logic [PC_W-1:0] pc;
  logic [PC_W-1:0] elem_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      elem_start <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          pc         <= '0;
          elem_start <= '0;
          if (bist_en) state <= S_RUN;
        end
        S_RUN: begin
          if (!bist_en) begin
            state      <= S_IDLE;
            pc         <= '0;
            elem_start <= '0;
          end else if (elem_last) begin
            if (!addr_last) begin
              pc <= elem_start;
            end else if (alg_last) begin
              state <= S_FLUSH;
            end else begin
              pc         <= pc + 1'b1;
              elem_start <= pc + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
        S_FLUSH: state <= bist_en ? S_DONE : S_IDLE;
        S_DONE:  if (!bist_en) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // One ROM per algorithm, all addressed by the same program counter.
  for (genvar a = 0; a < NUM_ALGS; a++) begin : g_rom
    assign words[a] = mc_rom(alg_sel_e'(a), pc);
  end

  assign running = (state == S_RUN);
  assign end_o   = (state == S_DONE);

endmodule
