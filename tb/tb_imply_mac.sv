// Self-checking testbench for imply_mac at its default size (8-bit weight
// and input, 32-bit accumulator). Runs chains of multiply-accumulates with one
// stored weight, compares the accumulator with an integer model (modulo
// 2^32), checks the weight is never changed, and checks the step count:
// for every 1 bit k of x, 20*N steps of addition plus 20*(32-k-N) steps of
// carry ripple. Some chains start from a preset (bias) value, one just
// below 2^32 to exercise the wrap-around.
module tb_imply_mac;
  localparam int unsigned N = 8, ACC_W = 32;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             load = 1'b0, load_w = 1'b0, load_acc = 1'b0, start = 1'b0;
  logic [ACC_W-1:0] acc_in = '0;
  logic [N-1:0]     w_in = '0, x = '0;
  logic             busy, done, ev_add, ev_ripple, ev_skip;
  logic [ACC_W-1:0] acc;
  logic [N-1:0]     w_out;
  logic [31:0]      steps;
  logic [ACC_W-1:0] model;
  int checks = 0, failures = 0;

  imply_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
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

  task automatic new_weight(input logic [N-1:0] w, input logic [ACC_W-1:0] bias);
    @(negedge clk);
    load = 1'b1; load_w = 1'b1; load_acc = 1'b1; w_in = w; acc_in = bias;
    @(negedge clk);
    load = 1'b0; load_w = 1'b0; load_acc = 1'b0;
    model = bias;
    check(w_out == w && acc == bias, "weight loaded, accumulator preset");
  endtask

  task automatic mac_once(input logic [N-1:0] xv);
    logic [31:0] s0;
    int e_steps;
    s0 = steps;
    @(negedge clk);
    x = xv;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    e_steps = 0;
    for (int k = 0; k < N; k++)
      if (xv[k]) e_steps += 20*N + 20*(ACC_W - k - N);
    model = model + ACC_W'(w_out) * ACC_W'(xv);
    check(acc == model, $sformatf("acc %h expected %h", acc, model));
    check(steps - s0 == 32'(e_steps), $sformatf("steps %0d expected %0d", steps - s0, e_steps));
  endtask

  initial begin
    logic [N-1:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int chain = 0; chain < 4; chain++) begin
      w = (chain == 0) ? 8'd255 : N'($urandom);
      new_weight(w, (chain < 2) ? '0 : ACC_W'($urandom));
      for (int n = 0; n < 6; n++) begin
        mac_once((chain == 0 && n < 2) ? 8'd255 : N'($urandom));
        check(w_out == w, "weight preserved");
      end
    end
    // Wrap-around: start just below 2^32 so that the carry ripples out of
    // the top bit.
    new_weight(8'd255, 32'hFFFF_FFF0);
    for (int n = 0; n < 3; n++) mac_once(8'd255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
