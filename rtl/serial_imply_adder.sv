// N-bit input-preserving serial IMPLY adder: one memristor row of 2N+4 cells
// driven by the 20-step-per-bit sequence of add_seq.
//
// Row layout: cells 0..3 are w1, w2, w3 and the carry c; cells 4..N+3 hold
// operand a (bit i at 4+i); cells N+4..2N+3 hold operand b, which is
// overwritten by the sum. The count of 2N+4 memristors and of 20N steps per
// addition, and the preservation of a, follow the document.
//
// Interface (choices of this design): `load` writes a_in, b_in and the
// carry-in cin into their cells in one cycle (standing for ordinary crossbar
// writes; it is not a logic step and is not counted). With load_a = 0 only b
// and c are written and the a cells keep what they hold, which is how a stored operand is reused
// without a COPY. `start` (while idle) runs one addition: the first step is
// issued in the next cycle and `done` pulses in the cycle after step 20N, when
// `sum` (the b cells) and `cout` (the c cell) are valid. `a_out` shows the a
// cells at any time. `steps` counts the logic steps issued since reset.
module serial_imply_adder
  import imply_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         load_a,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  input  logic         cin,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic [N-1:0] a_out,
  output logic [31:0]  steps
);

  localparam int unsigned NCELLS = 2*N + 4;
  localparam int unsigned A_BASE = FIRST_OPERAND_CELL;
  localparam int unsigned B_BASE = FIRST_OPERAND_CELL + N;

  imply_op_t         op;
  logic              last;
  logic [NCELLS-1:0] cells, load_mask, load_val;

  add_seq u_seq (
    .clk, .rst_n,
    .start     (start && !busy),
    .a_base    (cell_t'(A_BASE)),
    .a_step    (1'b1),
    .b_base    (cell_t'(B_BASE)),
    .nbits     (cell_t'(N)),
    .clr_carry (1'b0),          // carry-in is loaded into c
    .op, .busy, .last
  );

  always_comb begin
    load_mask = '0;
    load_val  = '0;
    load_mask[B_BASE +: N] = '1;
    load_val [B_BASE +: N] = b_in;
    load_mask[int'(CELL_C)] = 1'b1;
    load_val [int'(CELL_C)] = cin;
    load_mask[A_BASE +: N] = {N{load_a}};
    load_val [A_BASE +: N] = a_in;
  end

  imply_array #(.NCELLS(NCELLS)) u_row (
    .clk, .rst_n, .op,
    .load_en (load && !busy),
    .load_mask, .load_val, .cells
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      steps <= '0;
    end else begin
      done <= last;
      if (op.kind != OP_NOP) steps <= steps + 1'b1;
    end
  end

  assign sum   = cells[B_BASE +: N];
  assign a_out = cells[A_BASE +: N];
  assign cout  = cells[int'(CELL_C)];

endmodule
