// Shift-and-add sequencer for in-memory multiplication with the serial IMPLY
// adder.
//
// The multiplicand A (N cells from a_base, bit i at a_base+i) is preserved
// throughout; the multiplier bits x_k are held by this controller (control
// logic outside the array). For k = 0..N-1 the controller looks at x_k and,
// if it is 1, has add_seq add A into the window of B cells that starts at
// b_base+k (B[k+N-1:k] += A, carry-in 0, N bits of 20 steps each); a 0 bit
// adds nothing. This is the recursion B_{k+1} = [0, B_k >> 1] + A*b_k of the
// document, written with a moving window instead of a shift.
//
// The carry out of each addition is left in cell c. Two ways of placing it
// are provided, both choices of this design:
//  * MAC = 0 (plain multiplier, B starts at 0): B[k+N] is still 0, so the
//    carry is moved there in three steps, FALSE(w1); w1 = c -> w1;
//    B[k+N] = w1 -> B[k+N].
//  * MAC = 1 (accumulate into an ACC_W-bit B that may hold any value): the
//    carry is rippled through B[ACC_W-1:k+N] by running the same 20-step
//    adder with its a operand fixed to the constant-0 cell zero_cell and the
//    carry kept; a carry out of the top bit is dropped (modulo 2^ACC_W).
//
// Timing: `start` is sampled while idle. Each multiplier bit costs one
// decision cycle, plus for a 1 bit 20N adder cycles, one hand-over cycle and
// either 3 transfer cycles (MAC = 0) or 20*(ACC_W-k-N) ripple cycles
// (MAC = 1). `done` is high for one cycle, after the last bit's decision
// cycle, and the result is then in the array. Event pulses report each
// addition, carry transfer and ripple, and each skipped zero bit.
module mult_seq
  import imply_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 2*N,
  parameter bit          MAC   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  cell_t        a_base,
  input  cell_t        b_base,
  input  cell_t        zero_cell,
  output imply_op_t    op,
  output logic         busy,
  output logic         done,
  output logic         ev_add,
  output logic         ev_xfer,
  output logic         ev_ripple,
  output logic         ev_skip
);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_ADD, S_POST, S_RIPPLE, S_XFER1, S_XFER2, S_XFER3
  } state_e;

  localparam int unsigned KW = $clog2(N + 1);

  state_e        state;
  logic [N-1:0]  xr;
  logic [KW-1:0] k;

  // add_seq interface
  logic      add_start, add_busy, add_last, add_astep, add_clr;
  cell_t     add_abase, add_bbase, add_nbits;
  imply_op_t add_op;

  cell_t k_cell, top_cell, ripple_bits;
  assign k_cell      = cell_t'(k);
  assign top_cell    = b_base + k_cell + cell_t'(N);               // B[k+N]
  assign ripple_bits = cell_t'(ACC_W) - cell_t'(N) - k_cell;       // bits above the window
  logic  ripple_needed;
  assign ripple_needed = (32'(k) + N) < ACC_W;

  add_seq u_add (
    .clk, .rst_n,
    .start     (add_start),
    .a_base    (add_abase),
    .a_step    (add_astep),
    .b_base    (add_bbase),
    .nbits     (add_nbits),
    .clr_carry (add_clr),
    .op        (add_op),
    .busy      (add_busy),
    .last      (add_last)
  );

  logic scan_set, scan_end;
  assign scan_end = (state == S_SCAN) && (32'(k) == N);
  assign scan_set = (state == S_SCAN) && !scan_end && xr[k[$clog2(N > 1 ? N : 2)-1:0]];

  always_comb begin
    add_start = 1'b0;
    add_abase = a_base;
    add_astep = 1'b1;
    add_bbase = b_base + k_cell;
    add_nbits = cell_t'(N);
    add_clr   = 1'b1;
    if (scan_set) begin
      add_start = 1'b1;
    end else if (state == S_POST && MAC && ripple_needed) begin
      add_start = 1'b1;
      add_abase = zero_cell;
      add_astep = 1'b0;
      add_bbase = top_cell;
      add_nbits = ripple_bits;
      add_clr   = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xr    <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          xr    <= x;
          k     <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (scan_end)      state <= S_IDLE;
          else if (scan_set) state <= S_ADD;
          else               k     <= k + 1'b1;
        end
        S_ADD:    if (add_last) state <= S_POST;
        S_POST: begin
          if (!MAC)               state <= S_XFER1;
          else if (ripple_needed) state <= S_RIPPLE;
          else begin
            k     <= k + 1'b1;
            state <= S_SCAN;
          end
        end
        S_RIPPLE: if (add_last) begin
          k     <= k + 1'b1;
          state <= S_SCAN;
        end
        S_XFER1: state <= S_XFER2;
        S_XFER2: state <= S_XFER3;
        S_XFER3: begin
          k     <= k + 1'b1;
          state <= S_SCAN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      S_XFER1: op = op_false_work(CLR_W1);
      S_XFER2: op = op_imp(CELL_C, CELL_W1);
      S_XFER3: op = op_imp(CELL_W1, top_cell);
      default: op = add_op;
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign done      = scan_end;
  assign ev_add    = scan_set;
  assign ev_xfer   = (state == S_XFER3);
  assign ev_ripple = (state == S_POST) && MAC && ripple_needed;
  assign ev_skip   = (state == S_SCAN) && !scan_end && !scan_set;

  // Only the adder issues operations while it is busy.
  a_ops_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    add_busy |-> (state == S_ADD || state == S_RIPPLE));

endmodule
