// Self-checking testbench for serial_imply_adder at its default width
// (32 bits). Random and corner-case additions check the sum, the carry-out,
// that operand a is unchanged, that one addition issues exactly 20*N logic
// steps and that `done` comes 20*N+1 cycles after `start`. A second series
// reuses the stored a (load_a = 0) for repeated additions, as in a
// multiplier, and checks the running sum.
module tb_serial_imply_adder;
  localparam int unsigned N = 32;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load = 1'b0, load_a = 1'b0, start = 1'b0, cin = 1'b0;
  logic [N-1:0] a_in = '0, b_in = '0;
  logic         busy, done, cout;
  logic [N-1:0] sum, a_out;
  logic [31:0]  steps;
  int checks = 0, failures = 0;

  serial_imply_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  task automatic add_once(input logic [N-1:0] a, input logic [N-1:0] b, input bit new_a,
                         input logic ci = 1'b0);
    logic [N:0]  e;
    logic [31:0] s0;
    int          cyc;
    @(negedge clk);
    load = 1'b1; load_a = new_a; a_in = a; b_in = b; cin = ci;
    @(negedge clk);
    load = 1'b0;
    s0 = steps;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    e = {1'b0, a_out} + {1'b0, b} + (N+1)'(ci);
    check(!new_a || a_out == a, "a loaded");
    check(sum == e[N-1:0], $sformatf("sum %h + %h = %h, got %h", a_out, b, e[N-1:0], sum));
    check(cout == e[N], "carry out");
    check(steps - s0 == 20*N, $sformatf("steps %0d", steps - s0));
    check(cyc == 20*N + 1, $sformatf("latency %0d", cyc));
  endtask

  initial begin
    logic [N-1:0] acc, a;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    add_once('0, '0, 1'b1);
    add_once('1, 32'd1, 1'b1);
    add_once('1, '1, 1'b1);
    add_once(32'h8000_0000, 32'h8000_0000, 1'b1);
    add_once(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int n = 0; n < 100; n++) add_once($urandom, $urandom, 1'b1, 1'($urandom));
    add_once('1, '0, 1'b1, 1'b1);
    // Reuse a without reloading it: a is written once, b takes the sum back.
    a = 32'h0123_4567;
    add_once(a, '0, 1'b1);
    acc = a;
    for (int n = 0; n < 10; n++) begin
      add_once('0, acc, 1'b0);      // a_in is ignored
      check(a_out == a, "a kept between additions");
      acc = acc + a;
      check(sum == acc, "running sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
