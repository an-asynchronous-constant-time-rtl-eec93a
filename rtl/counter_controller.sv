// counter_controller: serialises increment and decrement requests into
// atomic counter updates, cancelling simultaneous pairs.
//
// Whenever either raw request (inc_probe, dec_probe) is present and the
// update register is free, the controller reads both negated-probe proxies
// in one step, giving x (increment pending) and y (decrement pending):
//   x and y      : both requests are acknowledged, the counter is left alone
//                  (skip pulses);
//   x only       : an increment is posted to the counter;
//   y only       : a decrement is posted to the counter;
//   neither      : the proxies were not yet up to date; nothing happens and
//                  the controller tries again next cycle.
// Reading a true proxy is what acknowledges that request (see
// negated_probe). Only one update is in flight at a time, so the counter
// never gets an increment while a decrement is being taken, or the reverse.
//
// Interface: inc_probe/dec_probe are the raw request valids; incp/decp the
// proxies, incp_read/decp_read their take strobes; upd_* the update channel
// to the counter; zero_in the counter's zero flag. empty is high when the
// counter reads zero and no update is waiting, i.e. every acknowledged
// request has been applied.
// Timing: an update is posted on the edge after the proxies are read and
// leaves on the edge the counter takes it.
//
// Follows the document: the controller's guard, the proxy reads, the
// three-way selection with skip. Own choices: the one-entry update register,
// the retry when both proxies read false, the empty output that masks a
// pending update.
module counter_controller
  import ectr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    inc_probe,
  input  logic    dec_probe,
  input  logic    incp,
  input  logic    decp,
  output logic    incp_read,
  output logic    decp_read,
  output logic    upd_valid,
  output cnt_op_e upd_op,
  input  logic    upd_ready,
  input  logic    zero_in,
  output logic    empty,
  output logic    skip
);

  logic    go;
  logic    upd_valid_q;
  cnt_op_e upd_op_q;

  assign go        = (inc_probe || dec_probe) && (!upd_valid_q || upd_ready);
  assign incp_read = go;
  assign decp_read = go;
  assign skip      = go && incp && decp;

  assign upd_valid = upd_valid_q;
  assign upd_op    = upd_op_q;
  assign empty     = zero_in && !upd_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_valid_q <= 1'b0;
      upd_op_q    <= OP_INC;
    end else begin
      if (upd_valid_q && upd_ready)
        upd_valid_q <= 1'b0;
      if (go && (incp != decp)) begin
        upd_valid_q <= 1'b1;
        upd_op_q    <= incp ? OP_INC : OP_DEC;
      end
    end
  end

  a_upd_stable : assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid && !upd_ready |=> upd_valid && $stable(upd_op));

endmodule
