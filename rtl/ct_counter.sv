// ct_counter: constant-time up/down counter with a sticky-zero chain.
//
// WIDTH bit_counter cells are chained LSB to MSB: carries and borrows move up
// one cell per handshake, Zero reports move down one cell per handshake. The
// controller only ever talks to the LSB cell, so the time to accept an update
// and to learn whether the counter is now zero does not grow with WIDTH.
// The LSB cell's Zero report (its sz AND x on a decrement, 0 on an
// increment) is held in the zero register; after reset the counter holds 0
// and zero = 1.
//
// Interface: cmd_valid/cmd_op/cmd_ready is the update channel (C_Inc, C_Dec)
// from the controller. zero is the registered empty status, valid from the
// clock edge that takes an update. value shows the data bits; while a carry
// is still travelling it can lag the true count, zero never does. sticky
// shows the sticky-zero bits.
// overflow pulses when the MSB cell produces a carry or borrow; that carry is
// dropped, so the count wraps modulo 2**WIDTH.
//
// Follows the document: the cell chain, sticky-zero bits, zero read at the
// LSB (Fig. 2). Own choices: WIDTH = 5 (enough for a 25-stage pipeline), the
// MSB's sticky-zero input is never written and stays 1, the wrap on
// overflow.
module ct_counter
  import ectr_pkg::*;
#(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  cnt_op_e          cmd_op,
  output logic             cmd_ready,
  output logic             zero,
  output logic [WIDTH-1:0] value,
  output logic [WIDTH-1:0] sticky,
  output logic             overflow
);

  // chain signals: index i is the command into cell i; index WIDTH is the
  // carry out of the MSB
  logic    c_valid [WIDTH+1];
  cnt_op_e c_op    [WIDTH+1];
  logic    c_ready [WIDTH+1];
  // z_valid[i]/z[i]: Zero report sent by cell i to cell i-1 (i = 0: to the
  // zero register); index WIDTH is the never-driven input of the MSB
  logic    z_valid [WIDTH+1];
  logic    z       [WIDTH+1];

  assign c_valid[0] = cmd_valid;
  assign c_op[0]    = cmd_op;
  assign cmd_ready  = c_ready[0];

  assign c_ready[WIDTH] = 1'b1;
  assign z_valid[WIDTH] = 1'b0;
  assign z[WIDTH]       = 1'b1;
  assign overflow       = c_valid[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    bit_counter u_cell (
      .clk          (clk),
      .rst_n        (rst_n),
      .cmd_valid    (c_valid[i]),
      .cmd_op       (c_op[i]),
      .cmd_ready    (c_ready[i]),
      .up_valid     (c_valid[i+1]),
      .up_op        (c_op[i+1]),
      .up_ready     (c_ready[i+1]),
      .zero_valid   (z_valid[i]),
      .zero         (z[i]),
      .zero_up_valid(z_valid[i+1]),
      .zero_up      (z[i+1]),
      .x            (value[i]),
      .sz           (sticky[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      zero <= 1'b1;
    else if (z_valid[0])
      zero <= z[0];
  end

endmodule
