// Workload testbench: the single-bit full adder on all eight input
// combinations (a, b, c), using serial_imply_adder with N = 1 (six cells: a,
// b, c, w1, w2, w3). The cell states are followed step by step:
//  * a never changes (input preservation);
//  * after step 4 b holds X = a | b, after step 5 w2 holds Y = NAND(a, b),
//    after step 8 c holds Z = ab + c;
//  * after step 18 b holds the sum and keeps it; after step 20 c holds the
//    carry-out;
//  * the whole addition takes 20 steps.
// The expected values are the integer sum and carry of a + b + c.
module tb_full_adder_cases;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0, load_a = 1'b0, start = 1'b0, cin = 1'b0;
  logic [0:0] a_in = '0, b_in = '0;
  logic       busy, done, cout;
  logic [0:0] sum, a_out;
  logic [31:0] steps;
  int checks = 0, failures = 0;

  serial_imply_adder #(.N(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 8; v++) begin
      logic a, b, c, s, co;
      int   st;
      a = v[2]; b = v[1]; c = v[0];
      {co, s} = 2'(a) + 2'(b) + 2'(c);
      @(negedge clk);
      load = 1'b1; load_a = 1'b1; a_in = a; b_in = b; cin = c;
      @(negedge clk);
      load = 1'b0;
      start = 1'b1;
      @(negedge clk);              // step 1 executes at the next edge
      start = 1'b0;
      for (st = 1; st <= 20; st++) begin
        @(negedge clk);            // state after step st
        check(a_out == a, $sformatf("abc=%0d%0d%0d step %0d: a changed", a, b, c, st));
        if (st == 4) check(sum == (a | b), "X in b after step 4");
        if (st == 5) check(dut.u_row.cells[1] == ~(a & b), "Y in w2 after step 5");
        if (st == 8) check(cout == ((a & b) | c), "Z in c after step 8");
        if (st >= 18) check(sum == s, $sformatf("abc=%0d%0d%0d sum after step %0d", a, b, c, st));
      end
      check(done, "done after 20 steps");
      check(cout == co, $sformatf("abc=%0d%0d%0d carry-out", a, b, c));
    end
    check(steps == 32'(8 * 20), "20 steps per full addition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
