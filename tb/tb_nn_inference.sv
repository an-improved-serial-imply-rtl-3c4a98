// Workload testbench: repeated 8-bit quantised inference of one neuron,
// y = bias + sum_i w_i * x_i, with K = 4 weight-stationary MAC rows
// (imply_mac, 8 x 8 into 32 bits). The weights are written once; for each of
// five inferences only the accumulators are preset (row 0 with the bias, the
// others with 0) and every row accumulates w_i * x_i for its input, all rows
// working in parallel. The partial sums are added here, standing for the
// control logic outside the array. Checks: every row's accumulator, the
// neuron output, the weights unchanged after every inference (no reload),
// and the step count of each row against 20*(32-k) per 1 bit k of x_i.
module tb_nn_inference;
  localparam int unsigned K = 4, N = 8, W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [K-1:0] load = '0, load_w = '0, load_acc = '0, start = '0;
  logic [N-1:0] w_in [K], x [K];
  logic [W-1:0] acc_in [K];
  logic [K-1:0] busy, done, ev_add, ev_ripple, ev_skip;
  logic [W-1:0] acc [K];
  logic [N-1:0] w_out [K];
  logic [31:0]  steps [K];
  logic [N-1:0] weights [K];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < K; i++) begin : g_row
    imply_mac u_mac (
      .clk, .rst_n,
      .load (load[i]), .load_w (load_w[i]), .load_acc (load_acc[i]),
      .w_in (w_in[i]), .acc_in (acc_in[i]),
      .start (start[i]), .x (x[i]),
      .busy (busy[i]), .done (done[i]), .acc (acc[i]), .w_out (w_out[i]),
      .steps (steps[i]), .ev_add (ev_add[i]), .ev_ripple (ev_ripple[i]),
      .ev_skip (ev_skip[i]));
  end

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

  initial begin
    logic [W-1:0] bias, y, y_model;
    logic [31:0]  s0 [K];
    for (int i = 0; i < K; i++) begin
      w_in[i] = '0; x[i] = '0; acc_in[i] = '0;
      weights[i] = N'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Write the weights once.
    @(negedge clk);
    for (int i = 0; i < K; i++) w_in[i] = weights[i];
    load = '1; load_w = '1; load_acc = '1;
    @(negedge clk);
    load = '0; load_w = '0; load_acc = '0;
    for (int inf = 0; inf < 5; inf++) begin
      bias = W'($urandom_range(0, 100000));
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        acc_in[i] = (i == 0) ? bias : '0;
        w_in[i]   = ~weights[i];         // must not be written
      end
      load = '1; load_acc = '1;
      @(negedge clk);
      load = '0; load_acc = '0;
      for (int i = 0; i < K; i++) begin
        x[i]  = (inf == 0) ? 8'd255 : N'($urandom);
        s0[i] = steps[i];
      end
      start = '1;
      @(negedge clk);
      start = '0;
      while (busy != '0) @(negedge clk);
      y = '0;
      y_model = bias;
      for (int i = 0; i < K; i++) begin
        int e_steps;
        e_steps = 0;
        for (int k = 0; k < N; k++) if (x[i][k]) e_steps += 20 * (W - k);
        check(acc[i] == ((i == 0) ? bias : '0) + W'(weights[i]) * W'(x[i]),
              $sformatf("inference %0d row %0d accumulator", inf, i));
        check(w_out[i] == weights[i], $sformatf("inference %0d row %0d weight kept", inf, i));
        check(steps[i] - s0[i] == 32'(e_steps), $sformatf("inference %0d row %0d steps", inf, i));
        y += acc[i];
        y_model += W'(weights[i]) * W'(x[i]);
      end
      check(y == y_model, $sformatf("inference %0d neuron output %0d expected %0d", inf, y, y_model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
