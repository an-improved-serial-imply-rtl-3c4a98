// Shared types and constants for the serial IMPLY (material implication)
// in-memory arithmetic.
//
// A serial IMPLY row has a single computational section, so at every step it
// executes exactly one operation: either IMPLY (q' = p -> q, the state of
// cell q is overwritten) or FALSE (the selected cells are reset to logic 0).
// Controllers describe each step with an imply_op_t; the row model
// (imply_array) carries it out on the rising clock edge, one step per cycle.
//
// Cell map: every row places its three work cells (w1, w2, w3) and the carry
// cell (c) at fixed indices 0..3, so that a multi-cell FALSE can name them by
// a 4-bit mask. Operand cells follow from index 4 upwards; each unit chooses
// its own operand layout. The index width (8 bits, up to 256 cells per row)
// is a choice of this design.
package imply_pkg;

  localparam int unsigned CELL_AW = 8;
  typedef logic [CELL_AW-1:0] cell_t;

  // Fixed work/carry cells.
  localparam cell_t CELL_W1 = cell_t'(0);
  localparam cell_t CELL_W2 = cell_t'(1);
  localparam cell_t CELL_W3 = cell_t'(2);
  localparam cell_t CELL_C  = cell_t'(3);
  localparam int unsigned FIRST_OPERAND_CELL = 4;

  // Bits of the FALSE mask; bit i clears cell i.
  localparam logic [3:0] CLR_W1 = 4'b0001;
  localparam logic [3:0] CLR_W2 = 4'b0010;
  localparam logic [3:0] CLR_W3 = 4'b0100;
  localparam logic [3:0] CLR_C  = 4'b1000;

  // Steps of the proposed full-adder algorithm per bit.
  localparam int unsigned STEPS_PER_BIT = 20;

  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,  // no voltage applied, all cells keep their state
    OP_FALSE = 2'd1,  // reset: cell q (if q_en) and the cells in clr
    OP_IMP   = 2'd2   // q' = p -> q = !p | q
  } op_e;

  typedef struct packed {
    op_e        kind;
    cell_t      p;     // implying cell (IMP only)
    cell_t      q;     // implied / reset cell
    logic       q_en;  // FALSE: also reset cell q
    logic [3:0] clr;   // FALSE: also reset work/carry cells 0..3
  } imply_op_t;

  localparam imply_op_t NOP_OP = '{kind: OP_NOP, p: '0, q: '0, q_en: 1'b0, clr: 4'b0};

  function automatic imply_op_t op_imp(cell_t p, cell_t q);
    return '{kind: OP_IMP, p: p, q: q, q_en: 1'b0, clr: 4'b0};
  endfunction

  function automatic imply_op_t op_false_cell(cell_t q);
    return '{kind: OP_FALSE, p: '0, q: q, q_en: 1'b1, clr: 4'b0};
  endfunction

  function automatic imply_op_t op_false_work(logic [3:0] clr);
    return '{kind: OP_FALSE, p: '0, q: '0, q_en: 1'b0, clr: clr};
  endfunction

endpackage
