// det_split: deterministic split of a dataless request channel.
//
// A toggle bit t, 0 after reset, picks the output for each request: t = 0
// sends it to the odd output, t = 1 to the even output; t flips with every
// request taken. Each output has a one-entry register, so a request is
// taken as soon as the register of its side is free or being emptied, and
// the two sides can work in parallel. Successive requests (1st, 2nd, 3rd,
// ...) therefore go odd, even, odd, ...
//
// Interface: in_valid/in_ready in; odd_* and even_* out (valid/ready);
// pending is high while either output register holds a request, which an
// empty test must treat as a token not yet counted.
// Timing: one cycle from input to output; one request per cycle when the
// downstream sides keep up.
//
// Follows the document's deterministic-split process (first request to the
// odd side). Own choice: the output registers. In the document the input
// handshake finishes only after the chosen output's handshake; here it
// finishes when the request is captured, which lets a new request in every
// cycle while each side takes one every other cycle.
module det_split (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic odd_valid,
  input  logic odd_ready,
  output logic even_valid,
  input  logic even_ready,
  output logic pending
);

  logic t_q;
  logic odd_q, even_q;
  logic odd_free, even_free;
  logic in_fire;

  assign odd_free  = !odd_q  || odd_ready;
  assign even_free = !even_q || even_ready;
  assign in_ready  = t_q ? even_free : odd_free;
  assign in_fire   = in_valid && in_ready;

  assign odd_valid  = odd_q;
  assign even_valid = even_q;
  assign pending    = odd_q || even_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q    <= 1'b0;
      odd_q  <= 1'b0;
      even_q <= 1'b0;
    end else begin
      if (odd_q && odd_ready)
        odd_q <= 1'b0;
      if (even_q && even_ready)
        even_q <= 1'b0;
      if (in_fire) begin
        t_q <= !t_q;
        if (t_q)
          even_q <= 1'b1;
        else
          odd_q <= 1'b1;
      end
    end
  end

endmodule
