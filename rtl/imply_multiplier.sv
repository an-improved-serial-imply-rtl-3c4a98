// N x N-bit in-memory shift-and-add multiplier built on the input-preserving
// serial IMPLY adder.
//
// One memristor row of 3N+4 cells: w1, w2, w3 and c at 0..3, the multiplicand
// A at 4..N+3 and the 2N-bit product B at N+4..3N+3. `load` writes A (when
// load_a is set; otherwise the stored A is reused) and clears B, as ordinary
// crossbar writes. `start` (while idle) multiplies by `x`, whose bits are
// read by the controller: B accumulates A at offset k for every x_k = 1 and
// the carry of each addition is moved into B[k+N] (see mult_seq). A is never
// overwritten, so the same multiplicand serves any number of products
// without a COPY. `done` pulses when `product` is valid; `steps` counts the
// logic steps issued since reset (20N+3 per 1 bit of x).
//
// The adder algorithm, the 2N-cell product and the moving-window recursion
// follow the document; the carry hand-over, the row layout and the interface
// are choices of this design.
module imply_multiplier
  import imply_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           load_a,
  input  logic [N-1:0]   a_in,
  input  logic           start,
  input  logic [N-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic [N-1:0]   a_out,
  output logic [31:0]    steps,
  output logic           ev_add,
  output logic           ev_xfer,
  output logic           ev_skip
);

  localparam int unsigned NCELLS = 3*N + 4;
  localparam int unsigned A_BASE = FIRST_OPERAND_CELL;
  localparam int unsigned B_BASE = FIRST_OPERAND_CELL + N;

  imply_op_t         op;
  logic              ev_ripple;
  logic [NCELLS-1:0] cells, load_mask, load_val;

  mult_seq #(.N(N), .ACC_W(2*N), .MAC(1'b0)) u_seq (
    .clk, .rst_n,
    .start     (start && !busy),
    .x,
    .a_base    (cell_t'(A_BASE)),
    .b_base    (cell_t'(B_BASE)),
    .zero_cell (cell_t'(0)),
    .op, .busy, .done,
    .ev_add, .ev_xfer, .ev_ripple, .ev_skip
  );

  always_comb begin
    load_mask = '0;
    load_val  = '0;
    load_mask[B_BASE +: 2*N] = '1;
    load_mask[A_BASE +: N]   = {N{load_a}};
    load_val [A_BASE +: N]   = a_in;
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

  assign product = cells[B_BASE +: 2*N];
  assign a_out   = cells[A_BASE +: N];

endmodule
