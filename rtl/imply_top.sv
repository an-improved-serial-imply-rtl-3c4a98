// Serial IMPLY in-memory arithmetic: the three units built from the
// input-preserving serial IMPLY full adder, side by side, each on its own
// memristor row and with its own ports:
//  * add_* : the ADD_N-bit adder (32 bits by default, 2*ADD_N+4 cells,
//            20*ADD_N steps per addition, operand a preserved);
//  * mul_* : the MUL_N x MUL_N shift-and-add multiplier (8 bits by default);
//  * mac_* : the MAC_N x MAC_N into MAC_ACC_W multiply-accumulate unit for
//            8-bit quantised neural-network inference (8 x 8 into 32 bits),
//            whose weight stays in memory between operations.
// All three share the clock and the active-low asynchronous reset; their
// interfaces and timing are described in serial_imply_adder, imply_multiplier
// and imply_mac. The sizes are the ones the document evaluates; grouping the
// units in one top is this design's choice.
module imply_top
  import imply_pkg::*;
#(
  parameter int unsigned ADD_N     = 32,
  parameter int unsigned MUL_N     = 8,
  parameter int unsigned MAC_N     = 8,
  parameter int unsigned MAC_ACC_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // adder
  input  logic                 add_load,
  input  logic                 add_load_a,
  input  logic [ADD_N-1:0]     add_a,
  input  logic [ADD_N-1:0]     add_b,
  input  logic                 add_cin,
  input  logic                 add_start,
  output logic                 add_busy,
  output logic                 add_done,
  output logic [ADD_N-1:0]     add_sum,
  output logic                 add_cout,
  output logic [ADD_N-1:0]     add_a_out,
  output logic [31:0]          add_steps,
  // multiplier
  input  logic                 mul_load,
  input  logic                 mul_load_a,
  input  logic [MUL_N-1:0]     mul_a,
  input  logic                 mul_start,
  input  logic [MUL_N-1:0]     mul_x,
  output logic                 mul_busy,
  output logic                 mul_done,
  output logic [2*MUL_N-1:0]   mul_product,
  output logic [MUL_N-1:0]     mul_a_out,
  output logic [31:0]          mul_steps,
  output logic                 mul_ev_add,
  output logic                 mul_ev_xfer,
  output logic                 mul_ev_skip,
  // multiply-accumulate
  input  logic                 mac_load,
  input  logic                 mac_load_w,
  input  logic                 mac_load_acc,
  input  logic [MAC_N-1:0]     mac_w,
  input  logic [MAC_ACC_W-1:0] mac_acc_in,
  input  logic                 mac_start,
  input  logic [MAC_N-1:0]     mac_x,
  output logic                 mac_busy,
  output logic                 mac_done,
  output logic [MAC_ACC_W-1:0] mac_acc,
  output logic [MAC_N-1:0]     mac_w_out,
  output logic [31:0]          mac_steps,
  output logic                 mac_ev_add,
  output logic                 mac_ev_ripple,
  output logic                 mac_ev_skip
);

  serial_imply_adder #(.N(ADD_N)) u_adder (
    .clk, .rst_n,
    .load   (add_load),
    .load_a (add_load_a),
    .a_in   (add_a),
    .b_in   (add_b),
    .cin    (add_cin),
    .start  (add_start),
    .busy   (add_busy),
    .done   (add_done),
    .sum    (add_sum),
    .cout   (add_cout),
    .a_out  (add_a_out),
    .steps  (add_steps)
  );

  imply_multiplier #(.N(MUL_N)) u_mult (
    .clk, .rst_n,
    .load    (mul_load),
    .load_a  (mul_load_a),
    .a_in    (mul_a),
    .start   (mul_start),
    .x       (mul_x),
    .busy    (mul_busy),
    .done    (mul_done),
    .product (mul_product),
    .a_out   (mul_a_out),
    .steps   (mul_steps),
    .ev_add  (mul_ev_add),
    .ev_xfer (mul_ev_xfer),
    .ev_skip (mul_ev_skip)
  );

  imply_mac #(.N(MAC_N), .ACC_W(MAC_ACC_W)) u_mac (
    .clk, .rst_n,
    .load      (mac_load),
    .load_w    (mac_load_w),
    .load_acc  (mac_load_acc),
    .w_in      (mac_w),
    .acc_in    (mac_acc_in),
    .start     (mac_start),
    .x         (mac_x),
    .busy      (mac_busy),
    .done      (mac_done),
    .acc       (mac_acc),
    .w_out     (mac_w_out),
    .steps     (mac_steps),
    .ev_add    (mac_ev_add),
    .ev_ripple (mac_ev_ripple),
    .ev_skip   (mac_ev_skip)
  );

endmodule
