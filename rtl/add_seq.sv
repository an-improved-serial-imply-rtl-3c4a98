// Step sequencer of the input-preserving serial IMPLY adder.
//
// For each bit i of an nbits-wide addition it issues the 20 operations below,
// one per clock cycle, on the cells a = a_base + i*a_step, b = b_base + i,
// the carry cell c and the work cells w1..w3 (Table I / flowchart order):
//    1 FALSE(w1,w2,w3)    6 FALSE(w1)     11 w1 = w3 -> w1   16 FALSE(b)
//    2 w1 = a  -> w1      7 w1 = c  -> w1 12 FALSE(w3)       17 b  = w1 -> b
//    3 w2 = b  -> w2      8 c  = w2 -> c  13 w3 = c  -> w3   18 b  = c  -> b  (Sum)
//    4 b  = w1 -> b  (X)  9 w3 = b  -> w3 14 w3 = b  -> w3   19 FALSE(c)
//    5 w2 = a  -> w2 (Y) 10 w3 = w2 -> w3 15 c  = b  -> c    20 c  = w3 -> c  (Cout)
// with X = a + b, Y = NAND(a, b), Z = Y -> c = ab + c. Sum replaces b, the
// carry-out replaces c and is the carry-in of the next bit; cell a is only
// read, so the a operand is preserved. The sequence is the document's.
//
// Choices of this design: with clr_carry set, step 1 of the first bit also
// resets c, giving a carry-in of 0 at no extra step; with clr_carry clear the
// carry left in c is added (used to ripple a carry on). a_step = 0 keeps the
// a cell fixed for every bit (a constant-0 cell gives b + c).
//
// Timing: `start` and all the other inputs are sampled while idle; the first operation is issued in the
// next cycle, and `last` is high together with operation 20 of the final
// bit, so one addition takes exactly 20*nbits issuing cycles. `op` is NOP
// while idle.
module add_seq
  import imply_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  cell_t     a_base,
  input  logic      a_step,
  input  cell_t     b_base,
  input  cell_t     nbits,      // number of bits, at least 1
  input  logic      clr_carry,
  output imply_op_t op,
  output logic      busy,
  output logic      last
);

  logic [4:0] step;     // 1..20 while busy
  cell_t      bit_cnt;  // bits still to do, including the current one
  cell_t      a_idx, b_idx;
  logic       first_bit, clr_c, a_inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= 5'd0;
      bit_cnt   <= '0;
      a_idx     <= '0;
      b_idx     <= '0;
      first_bit <= 1'b0;
      clr_c     <= 1'b0;
      a_inc     <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy      <= 1'b1;
        step      <= 5'd1;
        bit_cnt   <= nbits;
        a_idx     <= a_base;
        b_idx     <= b_base;
        first_bit <= 1'b1;
        clr_c     <= clr_carry;
        a_inc     <= a_step;
      end
    end else if (step == 5'(STEPS_PER_BIT)) begin
      step      <= 5'd1;
      first_bit <= 1'b0;
      bit_cnt   <= bit_cnt - 1'b1;
      a_idx     <= a_idx + cell_t'(a_inc);
      b_idx     <= b_idx + 1'b1;
      if (bit_cnt == cell_t'(1)) busy <= 1'b0;
    end else begin
      step <= step + 1'b1;
    end
  end

  assign last = busy && (step == 5'(STEPS_PER_BIT)) && (bit_cnt == cell_t'(1));

  always_comb begin
    op = NOP_OP;
    if (busy) begin
      unique case (step)
        5'd1:  op = op_false_work(CLR_W1 | CLR_W2 | CLR_W3 | ((first_bit && clr_c) ? CLR_C : 4'b0));
        5'd2:  op = op_imp(a_idx,   CELL_W1);
        5'd3:  op = op_imp(b_idx,   CELL_W2);
        5'd4:  op = op_imp(CELL_W1, b_idx);
        5'd5:  op = op_imp(a_idx,   CELL_W2);
        5'd6:  op = op_false_work(CLR_W1);
        5'd7:  op = op_imp(CELL_C,  CELL_W1);
        5'd8:  op = op_imp(CELL_W2, CELL_C);
        5'd9:  op = op_imp(b_idx,   CELL_W3);
        5'd10: op = op_imp(CELL_W2, CELL_W3);
        5'd11: op = op_imp(CELL_W3, CELL_W1);
        5'd12: op = op_false_work(CLR_W3);
        5'd13: op = op_imp(CELL_C,  CELL_W3);
        5'd14: op = op_imp(b_idx,   CELL_W3);
        5'd15: op = op_imp(b_idx,   CELL_C);
        5'd16: op = op_false_cell(b_idx);
        5'd17: op = op_imp(CELL_W1, b_idx);
        5'd18: op = op_imp(CELL_C,  b_idx);
        5'd19: op = op_false_work(CLR_C);
        5'd20: op = op_imp(CELL_W3, CELL_C);
        default: op = NOP_OP;
      endcase
    end
  end

  a_nbits: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> nbits != '0);

endmodule
