// token_gate: entrance or exit gate of the observed pipeline.
//
// A token arriving at the gate first raises a dataless count request
// (cnt_valid): Inc at the entrance, Dec at the exit. The token is passed on
// only once that request has been acknowledged, so no token is inside the
// pipeline without having been counted and none leaves before the count has
// been lowered. A counted flag remembers an acknowledged request while the
// downstream side is not ready.
//
// Interface: in_* token input, out_* token output (valid/ready with
// DATA_W-bit data), cnt_valid/cnt_ready the count request. held is high
// while a token whose request was acknowledged still waits for the
// downstream side; at the exit that token is already counted out but has
// not left, so an empty test must treat it as still inside.
// Timing: the token may pass in the same cycle its request is acknowledged;
// back-to-back tokens are limited by how fast the counter side acknowledges.
//
// Follows the document: Inc on entrance, Dec on exit, and a token waits for
// the controller before entering or leaving. Own choices: the handshake
// details and the data width.
module token_gate #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              cnt_valid,
  input  logic              cnt_ready,
  output logic              held
);

  logic counted_q;
  logic counted;
  logic out_fire;

  // counted now: earlier, or acknowledged in this very cycle
  assign counted   = counted_q || (cnt_valid && cnt_ready);
  assign cnt_valid = in_valid && !counted_q;
  assign out_valid = in_valid && counted;
  assign out_data  = in_data;
  assign in_ready  = out_ready && counted;
  assign out_fire  = out_valid && out_ready;
  assign held      = counted_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      counted_q <= 1'b0;
    else if (out_fire)
      counted_q <= 1'b0;
    else if (cnt_valid && cnt_ready)
      counted_q <= 1'b1;
  end

endmodule
