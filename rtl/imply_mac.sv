// In-memory multiply-accumulate unit for 8-bit quantised neural networks:
// acc <= acc + w * x, with an N-bit weight w kept in the array (never
// overwritten, so it need not be reloaded between operations) and an ACC_W
// bit accumulator, by default 8 x 8 bits into 32 bits.
//
// One memristor row of N+ACC_W+5 cells: w1, w2, w3 and c at 0..3, a constant
// 0 cell at 4, the weight at 5..N+4 and the accumulator at N+5 upwards.
// `load` writes the weight (with load_w) and/or sets the accumulator to
// acc_in (with load_acc; 0 clears it, a 32-bit bias may be preloaded), as
// ordinary crossbar writes; it also resets the 0 cell. `start`
// (while idle) adds w * x: for every x_k = 1 the weight is added into
// acc[k+N-1:k] with the serial IMPLY adder and its carry is rippled through
// acc[ACC_W-1:k+N] (mult_seq with MAC = 1); overflow wraps modulo 2^ACC_W.
// `done` pulses when `acc` holds the new sum; `steps` counts logic steps.
//
// The adder, the shift-and-add scheme, the 8-bit operands and the 32-bit
// result follow the document. How the carry of each addition enters the
// upper accumulator bits (the ripple with a constant-0 operand cell) is this
// design's choice, and so are the layout and the interface.
module imply_mac
  import imply_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             load_w,
  input  logic             load_acc,
  input  logic [N-1:0]     w_in,
  input  logic [ACC_W-1:0] acc_in,
  input  logic             start,
  input  logic [N-1:0]     x,
  output logic             busy,
  output logic             done,
  output logic [ACC_W-1:0] acc,
  output logic [N-1:0]     w_out,
  output logic [31:0]      steps,
  output logic             ev_add,
  output logic             ev_ripple,
  output logic             ev_skip
);

  localparam int unsigned ZERO   = FIRST_OPERAND_CELL;
  localparam int unsigned A_BASE = FIRST_OPERAND_CELL + 1;
  localparam int unsigned B_BASE = FIRST_OPERAND_CELL + 1 + N;
  localparam int unsigned NCELLS = B_BASE + ACC_W;

  imply_op_t         op;
  logic              ev_xfer;
  logic [NCELLS-1:0] cells, load_mask, load_val;

  mult_seq #(.N(N), .ACC_W(ACC_W), .MAC(1'b1)) u_seq (
    .clk, .rst_n,
    .start     (start && !busy),
    .x,
    .a_base    (cell_t'(A_BASE)),
    .b_base    (cell_t'(B_BASE)),
    .zero_cell (cell_t'(ZERO)),
    .op, .busy, .done,
    .ev_add, .ev_xfer, .ev_ripple, .ev_skip
  );

  always_comb begin
    load_mask = '0;
    load_val  = '0;
    load_mask[ZERO]              = 1'b1;
    load_mask[B_BASE +: ACC_W]   = {ACC_W{load_acc}};
    load_val [B_BASE +: ACC_W]   = acc_in;
    load_mask[A_BASE +: N]       = {N{load_w}};
    load_val [A_BASE +: N]       = w_in;
  end

  imply_array #(.NCELLS(NCELLS)) u_row (
    .clk, .rst_n, .op,
    .load_en (load && !busy),
    .load_mask, .load_val, .cells
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                steps <= '0;
    else if (op.kind != OP_NOP) steps <= steps + 1'b1;
  end

  assign acc   = cells[B_BASE +: ACC_W];
  assign w_out = cells[A_BASE +: N];

  // The 0 cell is only ever read.
  a_zero_cell: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !cells[ZERO]);

endmodule
