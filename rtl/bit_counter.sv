// bit_counter: one cell of the constant-time counter stack.
//
// The cell keeps its data bit x and its sticky-zero bit sz. sz says whether
// every cell above this one (towards the MSB) holds zero. On an increment or
// decrement command the cell, in the same cycle that it accepts the command:
//   * reports on its Zero output whether this bit and all bits above will be
//     zero afterwards: always 0 for an increment, sz AND x (old x) for a
//     decrement;
//   * flips x;
//   * loads a carry (increment when old x = 1) or a borrow (decrement when
//     old x = 0) into its carry register, which the next cell takes later.
// A separate part of the cell copies every Zero report from the cell above
// (zero_up_*) into sz; that channel has no ready, its receiver is always
// waiting.
//
// Interface (all valid/ready, transfer on clk edge when both high):
//   cmd_*   : update from the cell below (or from the controller at the LSB).
//   up_*    : carry / borrow to the cell above.
//   zero_*  : Zero report to the cell below, valid in the cycle cmd is taken.
//   zero_up_*: Zero report from the cell above.
// Timing: the Zero report is combinational from registers and the accepting
// handshake, so it never depends on the number of cells. cmd_ready is low
// while a carry is still waiting in the carry register; this keeps the cell
// from reading a sticky-zero bit that the cell above is about to change.
//
// Follows the document: Zero is sent first, sz AND x on decrement, false on
// increment, carry only when needed. Own choices: the clocked handshake, the
// one-entry carry register, reset values (x = 0, sz = 1: counter empty).
module bit_counter
  import ectr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // command from below
  input  logic    cmd_valid,
  input  cnt_op_e cmd_op,
  output logic    cmd_ready,
  // carry / borrow to the cell above
  output logic    up_valid,
  output cnt_op_e up_op,
  input  logic    up_ready,
  // Zero report to the cell below
  output logic    zero_valid,
  output logic    zero,
  // Zero report from the cell above (ZeroU)
  input  logic    zero_up_valid,
  input  logic    zero_up,
  // state, for observation
  output logic    x,
  output logic    sz
);

  logic    cmd_fire;
  logic    need_carry;
  logic    up_valid_q;
  cnt_op_e up_op_q;

  assign cmd_ready  = !up_valid_q;
  assign cmd_fire   = cmd_valid && cmd_ready;
  // increment carries out of a 1, decrement borrows out of a 0
  assign need_carry = (cmd_op == OP_INC) ? x : !x;

  assign zero_valid = cmd_fire;
  assign zero       = (cmd_op == OP_INC) ? 1'b0 : (sz && x);

  assign up_valid = up_valid_q;
  assign up_op    = up_op_q;

  // counting process: flip x, post the carry
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x          <= 1'b0;
      up_valid_q <= 1'b0;
      up_op_q    <= OP_INC;
    end else begin
      if (up_valid_q && up_ready)
        up_valid_q <= 1'b0;
      if (cmd_fire) begin
        x <= !x;
        if (need_carry) begin
          up_valid_q <= 1'b1;
          up_op_q    <= cmd_op;
        end
      end
    end
  end

  // sticky-zero process: *[ZeroU?sz]
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sz <= 1'b1;
    else if (zero_up_valid)
      sz <= zero_up;
  end

  // a carry must stay offered until it is taken
  a_up_stable : assert property (@(posedge clk) disable iff (!rst_n)
    up_valid && !up_ready |=> up_valid && $stable(up_op));

endmodule
