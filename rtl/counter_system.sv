// counter_system: one complete empty-detection counter (non-interleaved).
//
// Two negated_probe observers watch the Inc (token entered) and Dec (token
// left) request channels, a counter_controller turns them into atomic
// updates (or cancels a simultaneous pair) and a ct_counter keeps the count
// with its sticky-zero chain. empty is high when the count is zero and no
// update is pending.
//
// Interface: inc_valid/inc_ready and dec_valid/dec_ready are dataless
// request channels from the pipeline gates; empty is the zero status; skip
// pulses for each cancelled pair; value and overflow come from the counter.
// Timing: a request is acknowledged the cycle after it appears (the
// observer's snapshot), provided the controller's update register is free;
// empty follows on the edge the counter takes the update.
//
// Follows the document's system of Fig. 1. WIDTH is this design's choice.
module counter_system
  import ectr_pkg::*;
#(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc_valid,
  output logic             inc_ready,
  input  logic             dec_valid,
  output logic             dec_ready,
  output logic             empty,
  output logic             skip,
  output logic [WIDTH-1:0] value,
  output logic             overflow
);

  logic    incp, decp, incp_read, decp_read;
  logic    upd_valid, upd_ready, zero;
  logic [WIDTH-1:0] sticky;
  cnt_op_e upd_op;

  negated_probe u_inc_probe (
    .clk(clk), .rst_n(rst_n),
    .a_valid(inc_valid), .a_ready(inc_ready),
    .pa(incp), .pa_read(incp_read)
  );

  negated_probe u_dec_probe (
    .clk(clk), .rst_n(rst_n),
    .a_valid(dec_valid), .a_ready(dec_ready),
    .pa(decp), .pa_read(decp_read)
  );

  counter_controller u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .inc_probe(inc_valid), .dec_probe(dec_valid),
    .incp(incp), .decp(decp),
    .incp_read(incp_read), .decp_read(decp_read),
    .upd_valid(upd_valid), .upd_op(upd_op), .upd_ready(upd_ready),
    .zero_in(zero), .empty(empty), .skip(skip)
  );

  ct_counter #(.WIDTH(WIDTH)) u_counter (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(upd_valid), .cmd_op(upd_op), .cmd_ready(upd_ready),
    .zero(zero), .value(value), .sticky(sticky), .overflow(overflow)
  );

endmodule
