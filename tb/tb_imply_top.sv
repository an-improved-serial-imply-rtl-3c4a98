// End-to-end testbench for imply_top at its default parameters (32-bit
// adder, 8 x 8 multiplier, 8 x 8 into 32-bit MAC). All three units run
// concurrently:
//  * adder: random additions, then a chain that reuses the stored a operand
//    without reloading it; checks sum, carry, a and the 20*32-step cost;
//  * multiplier: products with fresh and reused multiplicands; checks the
//    product, the multiplicand and the 20*8+3 steps per 1 bit of x;
//  * MAC: a 16-term dot-product-like chain per weight (the weight is loaded
//    once), one chain from a bias just below 2^32 so it wraps; checks the
//    accumulator, the weight and the step count.
// Each mechanism is counted and must occur at least once: adder carry-out,
// adder operand reuse, multiplier addition / carry transfer / skipped bit /
// operand reuse, MAC addition / carry ripple / skipped bit / wrap-around /
// weight reuse.
module tb_imply_top;
  localparam int unsigned AN = 32, MN = 8, CN = 8, CW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          add_load = 0, add_load_a = 0, add_start = 0, add_cin = 0;
  logic [AN-1:0] add_a = '0, add_b = '0;
  logic          add_busy, add_done, add_cout;
  logic [AN-1:0] add_sum, add_a_out;
  logic [31:0]   add_steps;
  logic          mul_load = 0, mul_load_a = 0, mul_start = 0;
  logic [MN-1:0] mul_a = '0, mul_x = '0;
  logic          mul_busy, mul_done, mul_ev_add, mul_ev_xfer, mul_ev_skip;
  logic [2*MN-1:0] mul_product;
  logic [MN-1:0] mul_a_out;
  logic [31:0]   mul_steps;
  logic          mac_load = 0, mac_load_w = 0, mac_load_acc = 0, mac_start = 0;
  logic [CN-1:0] mac_w = '0, mac_x = '0;
  logic [CW-1:0] mac_acc_in = '0;
  logic          mac_busy, mac_done, mac_ev_add, mac_ev_ripple, mac_ev_skip;
  logic [CW-1:0] mac_acc;
  logic [CN-1:0] mac_w_out;
  logic [31:0]   mac_steps;

  int checks = 0, failures = 0;
  int n_add_carry = 0, n_add_reuse = 0;
  int n_mul_add = 0, n_mul_xfer = 0, n_mul_skip = 0, n_mul_reuse = 0;
  int n_mac_add = 0, n_mac_ripple = 0, n_mac_skip = 0, n_mac_wrap = 0, n_mac_reuse = 0;
  bit add_fin = 0, mul_fin = 0, mac_fin = 0;

  imply_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_mul_add    += int'(mul_ev_add);
    n_mul_xfer   += int'(mul_ev_xfer);
    n_mul_skip   += int'(mul_ev_skip);
    n_mac_add    += int'(mac_ev_add);
    n_mac_ripple += int'(mac_ev_ripple);
    n_mac_skip   += int'(mac_ev_skip);
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // ---------------- adder ----------------
  task automatic do_add(input logic [AN-1:0] a, input logic [AN-1:0] b, input bit new_a,
                       input logic ci = 1'b0);
    logic [AN:0] e;
    logic [31:0] s0;
    @(negedge clk);
    add_load = 1; add_load_a = new_a; add_a = a; add_b = b; add_cin = ci;
    @(negedge clk);
    add_load = 0;
    s0 = add_steps;
    add_start = 1;
    @(negedge clk);
    add_start = 0;
    while (!add_done) @(negedge clk);
    e = {1'b0, add_a_out} + {1'b0, b} + (AN+1)'(ci);
    check(add_sum == e[AN-1:0] && add_cout == e[AN], "adder result");
    check(new_a ? add_a_out == a : 1'b1, "adder a");
    check(add_steps - s0 == 20*AN, "adder steps");
    if (add_cout) n_add_carry++;
  endtask

  initial begin : adder_thread
    logic [AN-1:0] a, run;
    wait (rst_n);
    for (int n = 0; n < 8; n++) do_add($urandom, $urandom, 1'b1, 1'(n));
    do_add('1, 32'd1, 1'b1);
    a = $urandom;
    do_add(a, '0, 1'b1);
    run = a;
    for (int n = 0; n < 6; n++) begin
      do_add('0, run, 1'b0);
      check(add_a_out == a, "adder a reused");
      run = run + a;
      check(add_sum == run, "adder chain");
      n_add_reuse++;
    end
    add_fin = 1;
  end

  // ---------------- multiplier ----------------
  task automatic do_mul(input logic [MN-1:0] a, input logic [MN-1:0] xv, input bit new_a);
    logic [31:0]   s0;
    logic [MN-1:0] av;
    @(negedge clk);
    mul_load = 1; mul_load_a = new_a; mul_a = a;
    @(negedge clk);
    mul_load = 0;
    av = mul_a_out;
    s0 = mul_steps;
    mul_x = xv;
    mul_start = 1;
    @(negedge clk);
    mul_start = 0;
    while (!mul_done) @(negedge clk);
    check(mul_product == (2*MN)'(av) * (2*MN)'(xv), "product");
    check(mul_a_out == av, "multiplicand preserved");
    check(mul_steps - s0 == 32'($countones(xv) * (20*MN + 3)), "multiplier steps");
    if (!new_a) n_mul_reuse++;
  endtask

  initial begin : mult_thread
    wait (rst_n);
    do_mul(8'd255, 8'd255, 1'b1);
    do_mul(8'd77, 8'b1010_0101, 1'b1);
    for (int n = 0; n < 8; n++) do_mul($urandom, $urandom, 1'b1);
    for (int n = 0; n < 6; n++) do_mul('0, $urandom, 1'b0);
    mul_fin = 1;
  end

  // ---------------- MAC ----------------
  initial begin : mac_thread
    logic [CW-1:0] model, prev_acc;
    logic [CN-1:0] w, xv;
    logic [31:0]   s0;
    int            e_steps;
    wait (rst_n);
    for (int chain = 0; chain < 3; chain++) begin
      w = (chain == 0) ? 8'd255 : CN'($urandom);
      model = (chain == 2) ? 32'hFFFF_8000 : '0;
      @(negedge clk);
      mac_load = 1; mac_load_w = 1; mac_load_acc = 1; mac_w = w; mac_acc_in = model;
      @(negedge clk);
      mac_load = 0; mac_load_w = 0; mac_load_acc = 0;
      for (int n = 0; n < 16; n++) begin
        xv = (chain == 0 && n == 0) ? 8'd255 : CN'($urandom);
        s0 = mac_steps;
        prev_acc = model;
        @(negedge clk);
        mac_x = xv;
        mac_start = 1;
        @(negedge clk);
        mac_start = 0;
        while (!mac_done) @(negedge clk);
        model = model + CW'(w) * CW'(xv);
        e_steps = 0;
        for (int k = 0; k < CN; k++) if (xv[k]) e_steps += 20*CN + 20*(CW - k - CN);
        check(mac_acc == model, $sformatf("mac acc %h expected %h", mac_acc, model));
        check(mac_w_out == w, "weight preserved");
        check(mac_steps - s0 == 32'(e_steps), "mac steps");
        if (model < prev_acc) n_mac_wrap++;
        if (n > 0) n_mac_reuse++;
      end
    end
    mac_fin = 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (add_fin && mul_fin && mac_fin);
    check(n_add_carry > 0,  "mechanism: adder carry-out");
    check(n_add_reuse > 0,  "mechanism: adder operand reuse");
    check(n_mul_add > 0,    "mechanism: multiplier addition");
    check(n_mul_xfer > 0,   "mechanism: multiplier carry transfer");
    check(n_mul_skip > 0,   "mechanism: multiplier skipped bit");
    check(n_mul_reuse > 0,  "mechanism: multiplicand reuse");
    check(n_mac_add > 0,    "mechanism: MAC addition");
    check(n_mac_ripple > 0, "mechanism: MAC carry ripple");
    check(n_mac_skip > 0,   "mechanism: MAC skipped bit");
    check(n_mac_wrap > 0,   "mechanism: MAC wrap-around");
    check(n_mac_reuse > 0,  "mechanism: weight reuse");
    $display("mechanisms: add_carry=%0d add_reuse=%0d mul_add=%0d mul_xfer=%0d mul_skip=%0d mul_reuse=%0d mac_add=%0d mac_ripple=%0d mac_skip=%0d mac_wrap=%0d mac_reuse=%0d",
             n_add_carry, n_add_reuse, n_mul_add, n_mul_xfer, n_mul_skip, n_mul_reuse,
             n_mac_add, n_mac_ripple, n_mac_skip, n_mac_wrap, n_mac_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
