// negated_probe: stable proxy for the probe of a dataless channel.
//
// The probe of an incoming request (a_valid) can rise at any moment, so a
// process that must also act on its *absence* cannot test it directly.
// This observer keeps a registered snapshot of the probe and offers it as a
// one-bit proxy value pa. A reader takes the value by raising pa_read:
//   * snapshot 1: the reader gets true and, in the same handshake, the
//     request on A is completed (a_ready = 1);
//   * snapshot 0: the reader gets false and A is left alone.
// The snapshot follows a_valid one cycle late and is cleared by the edge
// that completes A, so a request is reported true exactly once.
//
// Interface: a_valid/a_ready is the observed channel; pa is the proxy value,
// always offered; pa_read is the reader's take strobe.
// Timing: a request is visible on pa one cycle after a_valid rises.
//
// Follows the document: the negated-probe process that sends true and
// completes A, or sends false. Own choices: the one-cycle snapshot register.
module negated_probe (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  output logic pa,
  input  logic pa_read
);

  logic seen_q;

  assign pa      = seen_q;
  assign a_ready = pa_read && seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      seen_q <= 1'b0;
    else
      seen_q <= a_valid && !a_ready;
  end

  // the snapshot may only claim a request that is really there
  a_seen_real : assert property (@(posedge clk) disable iff (!rst_n)
    seen_q |-> a_valid);

endmodule
