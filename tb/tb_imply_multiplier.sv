// Self-checking testbench for imply_multiplier at its default size (8 x 8
// into 16 bits). Checks every product against the integer product, that the
// multiplicand A is unchanged, the step count (20N+3 per 1 bit of x) and the
// latency (one decision cycle per bit of x, plus 20N+4 cycles per 1 bit, plus
// one). Several products reuse the stored A without reloading it.
module tb_imply_multiplier;
  localparam int unsigned N = 8;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           load = 1'b0, load_a = 1'b0, start = 1'b0;
  logic [N-1:0]   a_in = '0, x = '0;
  logic           busy, done, ev_add, ev_xfer, ev_skip;
  logic [2*N-1:0] product;
  logic [N-1:0]   a_out;
  logic [31:0]    steps;
  int checks = 0, failures = 0;

  imply_multiplier dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  task automatic mul_once(input logic [N-1:0] a, input logic [N-1:0] xv, input bit new_a);
    logic [31:0] s0;
    int cyc, ones, e_cyc;
    logic [N-1:0] av;
    @(negedge clk);
    load = 1'b1; load_a = new_a; a_in = a;
    @(negedge clk);
    load = 1'b0;
    av = a_out;
    s0 = steps;
    x = xv;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = ~xv;                         // x is captured at start
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    ones = $countones(xv);
    e_cyc = 1 + N + ones * (20*N + 4);
    check(!new_a || av == a, "a loaded");
    check(product == (2*N)'(av) * (2*N)'(xv), $sformatf("%0d * %0d got %0d", av, xv, product));
    check(a_out == av, "multiplicand preserved");
    check(steps - s0 == 32'(ones * (20*N + 3)), $sformatf("steps %0d", steps - s0));
    check(cyc == e_cyc, $sformatf("latency %0d, expected %0d", cyc, e_cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mul_once(8'd0, 8'd0, 1'b1);
    mul_once(8'd255, 8'd255, 1'b1);
    mul_once(8'd1, 8'd128, 1'b1);
    mul_once(8'd200, 8'd1, 1'b1);
    for (int n = 0; n < 60; n++) mul_once(N'($urandom), N'($urandom), 1'b1);
    mul_once(8'd173, 8'd3, 1'b1);
    for (int n = 0; n < 10; n++) mul_once(8'd0, N'($urandom), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
