// Logic-level model of a serial IMPLY memristor row.
//
// Each of the NCELLS cells holds one bit, standing for the resistive state of
// one memristor (low resistance R_on = 1, high resistance R_off = 0). The row
// has one computational section: per clock cycle it applies one operation
// from imply_pkg::imply_op_t:
//   OP_IMP   : cell[q] <= !cell[p] | cell[q]   (V_COND on p, V_SET on q;
//              the truth table of material implication, p keeps its state)
//   OP_FALSE : cell[q] (if q_en) and the work/carry cells named in clr <= 0
//   OP_NOP   : nothing changes.
// Besides the logic operations the row can be written from outside (the
// ordinary crossbar write used to place operands): in a cycle with load_en,
// every cell whose load_mask bit is set takes load_val; a load takes
// precedence over an operation in the same cycle. The full state is visible
// on `cells` (the crossbar read-out).
//
// The IMPLY truth table and the one-operation-per-step rule follow the
// document; the analog behaviour (thresholds, R_G, pulse width of 30 us per
// step) is not modelled, one step is one clock cycle. Reset clears all cells;
// the load port and reset are choices of this design.
module imply_array
  import imply_pkg::*;
#(
  parameter int unsigned NCELLS = 68
) (
  input  logic              clk,
  input  logic              rst_n,
  input  imply_op_t         op,
  input  logic              load_en,
  input  logic [NCELLS-1:0] load_mask,
  input  logic [NCELLS-1:0] load_val,
  output logic [NCELLS-1:0] cells
);

  localparam int unsigned IW = (NCELLS > 1) ? $clog2(NCELLS) : 1;

  logic [NCELLS-1:0] nxt;
  logic [IW-1:0]     pi, qi;

  assign pi = op.p[IW-1:0];
  assign qi = op.q[IW-1:0];

  always_comb begin
    nxt = cells;
    unique case (op.kind)
      OP_IMP:   nxt[qi] = ~cells[pi] | cells[qi];
      OP_FALSE: begin
        if (op.q_en) nxt[qi] = 1'b0;
        for (int i = 0; i < 4; i++)
          if (op.clr[i]) nxt[i] = 1'b0;
      end
      default: ;
    endcase
    if (load_en) nxt = (nxt & ~load_mask) | (load_val & load_mask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cells <= '0;
    else        cells <= nxt;
  end

  // An IMPLY needs two distinct memristors, and both must exist.
  a_imp_cells: assert property (@(posedge clk) disable iff (!rst_n)
    op.kind == OP_IMP |-> (op.p != op.q) && (32'(op.p) < NCELLS) && (32'(op.q) < NCELLS));
  a_false_cell: assert property (@(posedge clk) disable iff (!rst_n)
    (op.kind == OP_FALSE && op.q_en) |-> (32'(op.q) < NCELLS));

endmodule
