// Self-checking testbench for imply_array: drives random IMPLY, FALSE, NOP
// and load operations on a 20-cell row and compares every cell, every cycle,
// with a reference row updated by the IMPLY truth table (p -> q = !p | q).
// Also checks the truth table itself on all four input pairs.
module tb_imply_array;
  import imply_pkg::*;

  localparam int unsigned NC = 20;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  imply_op_t     op = NOP_OP;
  logic          load_en = 1'b0;
  logic [NC-1:0] load_mask = '0, load_val = '0;
  logic [NC-1:0] cells;
  logic [NC-1:0] ref_cells;
  int checks = 0, failures = 0;

  imply_array #(.NCELLS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check(string what);
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (cells !== ref_cells) begin
      failures++;
      $display("FAIL %s: cells=%b expected=%b", what, cells, ref_cells);
    end
  endtask

  initial begin
    ref_cells = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Truth table of Fig. 1(b) on cells 5 (a) and 6 (b).
    for (int v = 0; v < 4; v++) begin
      op = NOP_OP;
      load_en = 1'b1; load_mask = '0; load_val = '0;
      load_mask[5] = 1'b1; load_mask[6] = 1'b1;
      load_val[5] = v[1]; load_val[6] = v[0];
      ref_cells[5] = v[1]; ref_cells[6] = v[0];
      step_and_check("load");
      load_en = 1'b0;
      op = op_imp(cell_t'(5), cell_t'(6));
      ref_cells[6] = (v == 2) ? 1'b0 : 1'b1;   // only a=1, b=0 gives 0
      step_and_check("truth table");
      op = NOP_OP;
    end
    // Random operations.
    for (int n = 0; n < 3000; n++) begin
      int unsigned r, p, q;
      r = $urandom_range(0, 9);
      p = $urandom_range(0, NC-1);
      q = $urandom_range(0, NC-1);
      if (q == p) q = (p + 1) % NC;
      load_en = 1'b0;
      op = NOP_OP;
      if (r < 5) begin
        op = op_imp(cell_t'(p), cell_t'(q));
        ref_cells[q] = ~ref_cells[p] | ref_cells[q];
      end else if (r < 7) begin
        logic [3:0] m;
        logic       qe;
        m  = 4'($urandom);
        qe = 1'($urandom);
        op = '{kind: OP_FALSE, p: '0, q: cell_t'(q), q_en: qe, clr: m};
        if (qe) ref_cells[q] = 1'b0;
        for (int i = 0; i < 4; i++) if (m[i]) ref_cells[i] = 1'b0;
      end else if (r < 9) begin
        load_en   = 1'b1;
        load_mask = NC'($urandom);
        load_val  = NC'($urandom);
        op        = op_imp(cell_t'(p), cell_t'(q));   // load wins over the op
        ref_cells = (ref_cells & ~load_mask) | (load_val & load_mask);
        if (!load_mask[q]) ref_cells[q] = ~cells[p] | cells[q];
      end
      step_and_check("random op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
