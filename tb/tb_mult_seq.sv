// Self-checking testbench for mult_seq. Two instances with N = 4 drive
// behavioural cell rows kept in this testbench: one as a plain multiplier
// (MAC = 0, 8-bit product, carry moved into B[k+N]) and one as a
// multiply-accumulate sequencer (MAC = 1, 12-bit accumulator, carry rippled
// through the upper bits over a constant-0 cell). All 256 operand pairs are
// run on each; the results, the preserved multiplicand, the operation counts
// and the event pulses (additions, transfers, ripples, skipped bits) are
// compared with values computed here.
module tb_mult_seq;
  import imply_pkg::*;

  localparam int unsigned N = 4, ACC = 12;
  localparam int unsigned ZC = 4, AB = 5, BB = 5 + N;
  localparam int unsigned NC = BB + ACC;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      start0 = 1'b0, start1 = 1'b0;
  logic [N-1:0] x = '0;
  imply_op_t op0, op1;
  logic      busy0, done0, add0, xfer0, rip0, skip0;
  logic      busy1, done1, add1, xfer1, rip1, skip1;
  logic [NC-1:0] row0, row1;
  int checks = 0, failures = 0;
  int n_add0, n_xfer0, n_skip0, n_ops0, n_add1, n_rip1, n_skip1, n_ops1;

  mult_seq #(.N(N), .ACC_W(2*N), .MAC(1'b0)) dut0 (
    .clk, .rst_n, .start(start0), .x,
    .a_base(cell_t'(AB)), .b_base(cell_t'(BB)), .zero_cell(cell_t'(ZC)),
    .op(op0), .busy(busy0), .done(done0),
    .ev_add(add0), .ev_xfer(xfer0), .ev_ripple(rip0), .ev_skip(skip0));

  mult_seq #(.N(N), .ACC_W(ACC), .MAC(1'b1)) dut1 (
    .clk, .rst_n, .start(start1), .x,
    .a_base(cell_t'(AB)), .b_base(cell_t'(BB)), .zero_cell(cell_t'(ZC)),
    .op(op1), .busy(busy1), .done(done1),
    .ev_add(add1), .ev_xfer(xfer1), .ev_ripple(rip1), .ev_skip(skip1));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NC-1:0] apply(logic [NC-1:0] r, imply_op_t o);
    if (o.kind == OP_IMP) r[o.q] = ~r[o.p] | r[o.q];
    else if (o.kind == OP_FALSE) begin
      for (int i = 0; i < 4; i++) if (o.clr[i]) r[i] = 1'b0;
      if (o.q_en) r[o.q] = 1'b0;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    row0 <= apply(row0, op0);
    row1 <= apply(row1, op1);
    if (op0.kind != OP_NOP) n_ops0++;
    if (op1.kind != OP_NOP) n_ops1++;
    n_add0 += int'(add0); n_xfer0 += int'(xfer0); n_skip0 += int'(skip0);
    n_add1 += int'(add1); n_rip1 += int'(rip1); n_skip1 += int'(skip1);
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  initial begin
    logic [ACC-1:0] bias, e1;
    int ones, e_ops1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++) begin
      for (int xv = 0; xv < 16; xv++) begin
        @(negedge clk);
        bias = ACC'($urandom);
        row0 = '1;                      // work cells hold junk
        row0[BB +: ACC] = '0;
        row0[ZC] = 1'b0;
        row0[AB +: N] = N'(a);
        row1 = row0;
        row1[BB +: ACC] = bias;
        n_ops0 = 0; n_add0 = 0; n_xfer0 = 0; n_skip0 = 0;
        n_ops1 = 0; n_add1 = 0; n_rip1 = 0; n_skip1 = 0;
        x = N'(xv);
        start0 = 1'b1; start1 = 1'b1;
        @(negedge clk);
        start0 = 1'b0; start1 = 1'b0;
        x = '0;
        while (busy0 || busy1) @(negedge clk);
        ones = $countones(N'(xv));
        e1 = bias + ACC'(a * xv);
        e_ops1 = 0;
        for (int k = 0; k < N; k++) if (xv[k]) e_ops1 += 20 * (ACC - k);
        check(row0[BB +: 2*N] == (2*N)'(a * xv), $sformatf("mult %0d*%0d got %0d", a, xv, row0[BB +: 2*N]));
        check(row0[AB +: N] == N'(a) && row1[AB +: N] == N'(a), "multiplicand preserved");
        check(row1[BB +: ACC] == e1, $sformatf("mac %0d+%0d*%0d got %0d", bias, a, xv, row1[BB +: ACC]));
        check(n_ops0 == ones * (20*N + 3), "mult op count");
        check(n_ops1 == e_ops1, "mac op count");
        check(n_add0 == ones && n_xfer0 == ones && n_skip0 == N - ones, "mult events");
        check(n_add1 == ones && n_rip1 == ones && n_skip1 == N - ones, "mac events");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
