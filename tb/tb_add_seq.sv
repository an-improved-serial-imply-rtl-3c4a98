// Self-checking testbench for add_seq. The operations it issues are applied
// to a behavioural cell row kept in this testbench. Checks:
//  * the first bit's 20 operations against the step table of the algorithm
//    (kind, p, q), written here independently;
//  * random 6-bit additions: sum in the b cells, carry-out in c, a cells
//    unchanged, exactly 20 operations per bit and `last` on the final one;
//  * that the inputs are captured at start;
//  * a carry ripple with a_step = 0 over a constant-0 cell and clr_carry = 0.
module tb_add_seq;
  import imply_pkg::*;

  localparam int unsigned NB = 6;
  localparam int unsigned AB = 4, BB = 4 + NB, ZC = 4 + 2*NB, NC = 4 + 2*NB + 1;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      start = 1'b0, a_step = 1'b1, clr_carry = 1'b1;
  cell_t     a_base = cell_t'(AB), b_base = cell_t'(BB), nbits = cell_t'(NB);
  imply_op_t op;
  logic      busy, last;
  logic [NC-1:0] row;
  int checks = 0, failures = 0;

  add_seq dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural row: applies each issued operation at the clock edge.
  always @(posedge clk) begin
    if (op.kind == OP_IMP) row[op.q] <= ~row[op.p] | row[op.q];
    else if (op.kind == OP_FALSE) begin
      for (int i = 0; i < 4; i++) if (op.clr[i]) row[i] <= 1'b0;
      if (op.q_en) row[op.q] <= 1'b0;
    end
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Expected step table for bit 0 (a = AB, b = BB): kind, p, q, clr.
  // 0 = w1, 1 = w2, 2 = w3, 3 = c.
  int exp_kind [20] = '{1,2,2,2,2, 1,2,2,2,2, 2,1,2,2,2, 1,2,2,1,2};
  int exp_p    [20] = '{0,AB,BB,0,AB, 0,3,1,BB,1, 2,0,3,BB,BB, 0,0,3,0,2};
  int exp_q    [20] = '{0,0,1,BB,1, 0,0,3,2,2, 0,0,2,2,3, BB,BB,BB,0,3};

  task automatic run_add(input logic [NB-1:0] a, input logic [NB-1:0] b,
                         input bit table_check);
    int n_ops = 0;
    bit saw_last = 0;
    logic [NB:0] expect_sum;
    @(negedge clk);
    row = '0;
    row[AB +: NB] = a;
    row[BB +: NB] = b;
    row[3] = 1'b1;              // stale carry, must be cleared in step 1
    a_step = 1'b1; clr_carry = 1'b1; a_base = cell_t'(AB); b_base = cell_t'(BB); nbits = cell_t'(NB);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a_step = 1'b0; b_base = '0; a_base = '0; nbits = '0;   // must have been captured
    while (busy) begin
      if (table_check && n_ops < 20) begin
        check(int'(op.kind) == exp_kind[n_ops], $sformatf("step %0d kind", n_ops+1));
        if (op.kind == OP_IMP) begin
          check(int'(op.p) == exp_p[n_ops], $sformatf("step %0d p", n_ops+1));
          check(int'(op.q) == exp_q[n_ops], $sformatf("step %0d q", n_ops+1));
        end
      end
      if (op.kind != OP_NOP) n_ops++;
      if (last) saw_last = (n_ops == 20*NB);
      @(negedge clk);
    end
    expect_sum = {1'b0, a} + {1'b0, b};
    check(n_ops == 20*NB, $sformatf("op count %0d", n_ops));
    check(saw_last, "last with final op");
    check(row[BB +: NB] == expect_sum[NB-1:0], $sformatf("sum %h+%h got %h", a, b, row[BB +: NB]));
    check(row[3] == expect_sum[NB], "carry out");
    check(row[AB +: NB] == a, "a preserved");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_add(6'h2A, 6'h15, 1'b1);
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) run_add(NB'(a * 9), NB'(b * 7 + 1), 1'b0);
    for (int n = 0; n < 50; n++) run_add(NB'($urandom), NB'($urandom), 1'b0);
    // Ripple: c = 1 added to b through the 0 cell, carry kept.
    for (int n = 0; n < 8; n++) begin
      logic [NB-1:0] b;
      logic [NB:0]   e;
      b = (n == 0) ? '1 : NB'($urandom);
      @(negedge clk);
      row = '0;
      row[BB +: NB] = b;
      row[3] = 1'b1;
      a_base = cell_t'(ZC); a_step = 1'b0; clr_carry = 1'b0; b_base = cell_t'(BB); nbits = cell_t'(NB);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a_step = 1'b1;                                   // must have been captured
      while (busy) @(negedge clk);
      e = {1'b0, b} + 1'b1;
      check(row[BB +: NB] == e[NB-1:0], "ripple sum");
      check(row[3] == e[NB], "ripple carry");
      check(row[ZC] == 1'b0, "zero cell kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
