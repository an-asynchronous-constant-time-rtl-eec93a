// empty_pipeline_detector: a pipeline instrumented to report when it holds
// no tokens, so that it can be power gated safely.
//
// Tokens enter through an entrance token_gate, travel through a
// buffer_pipeline of STAGES stages and leave through an exit token_gate.
// Each gate raises a count request for every token (Inc at the entrance,
// Dec at the exit) and holds the token until the request is acknowledged.
//
// INTERLEAVED = 1 (default, the high-throughput arrangement): a det_split
// sends alternate Inc requests, and another alternate Dec requests, to an
// odd and an even counter_system. The k-th token entering and the k-th token
// leaving are the same token (the pipeline is first-in first-out), so both
// of its requests reach the same counter and neither count goes below zero.
// The pipeline is empty when both counters report empty and neither split
// still holds a request.
// INTERLEAVED = 0: a single counter_system takes every request directly.
//
// Interface: in_* / out_* valid/ready token channels (DATA_W-bit data);
// empty, the detector's verdict; skip, one bit per counter, pulses when an
// increment and a decrement cancel; overflow, one bit per counter, pulses if
// a counter wraps (cannot happen when 2**WIDTH > STAGES); occupancy, the
// true number of full pipeline stages, for checking.
// Timing: empty is registered logic; it drops on the edge after the first
// request of a token is taken and rises once the last update has reached a
// counter.
//
// Follows the document: gates, 25-stage buffer pipeline, two deterministic
// splits, two controllers and counters, AND of their zero flags. Own
// choices: counter WIDTH = 5, DATA_W = 8, the split-register term of
// empty, and the exit-gate term of empty (a token already counted out but
// stalled by the sink keeps empty low).
module empty_pipeline_detector
  import ectr_pkg::*;
#(
  parameter int unsigned STAGES      = 25,
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned WIDTH       = 5,
  parameter bit          INTERLEAVED = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [DATA_W-1:0]           in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [DATA_W-1:0]           out_data,
  output logic                        empty,
  output logic [1:0]                  skip,
  output logic [1:0]                  overflow,
  output logic [$clog2(STAGES+1)-1:0] occupancy
);

  logic              p_in_valid, p_in_ready, p_out_valid, p_out_ready;
  logic [DATA_W-1:0] p_in_data, p_out_data;
  logic              inc_valid, inc_ready, dec_valid, dec_ready;
  logic              exit_held;
  logic              counters_empty;

  // a token counted out at the exit but held by the sink is still inside;
  // one counted in at the entrance and held there is already counted
  assign empty = counters_empty && !exit_held;

  token_gate #(.DATA_W(DATA_W)) u_entry_gate (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(p_in_valid), .out_ready(p_in_ready), .out_data(p_in_data),
    .cnt_valid(inc_valid), .cnt_ready(inc_ready), .held()
  );

  buffer_pipeline #(.STAGES(STAGES), .DATA_W(DATA_W)) u_pipeline (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_data(p_in_data),
    .out_valid(p_out_valid), .out_ready(p_out_ready), .out_data(p_out_data),
    .occupancy(occupancy)
  );

  token_gate #(.DATA_W(DATA_W)) u_exit_gate (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p_out_valid), .in_ready(p_out_ready), .in_data(p_out_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .cnt_valid(dec_valid), .cnt_ready(dec_ready), .held(exit_held)
  );

  if (INTERLEAVED) begin : g_interleaved
    logic             inc_o_valid, inc_o_ready, inc_e_valid, inc_e_ready;
    logic             dec_o_valid, dec_o_ready, dec_e_valid, dec_e_ready;
    logic             inc_pending, dec_pending;
    logic             empty_odd, empty_even;
    logic [WIDTH-1:0] value_odd, value_even;

    det_split u_inc_split (
      .clk(clk), .rst_n(rst_n),
      .in_valid(inc_valid), .in_ready(inc_ready),
      .odd_valid(inc_o_valid), .odd_ready(inc_o_ready),
      .even_valid(inc_e_valid), .even_ready(inc_e_ready),
      .pending(inc_pending)
    );

    det_split u_dec_split (
      .clk(clk), .rst_n(rst_n),
      .in_valid(dec_valid), .in_ready(dec_ready),
      .odd_valid(dec_o_valid), .odd_ready(dec_o_ready),
      .even_valid(dec_e_valid), .even_ready(dec_e_ready),
      .pending(dec_pending)
    );

    counter_system #(.WIDTH(WIDTH)) u_odd (
      .clk(clk), .rst_n(rst_n),
      .inc_valid(inc_o_valid), .inc_ready(inc_o_ready),
      .dec_valid(dec_o_valid), .dec_ready(dec_o_ready),
      .empty(empty_odd), .skip(skip[0]),
      .value(value_odd), .overflow(overflow[0])
    );

    counter_system #(.WIDTH(WIDTH)) u_even (
      .clk(clk), .rst_n(rst_n),
      .inc_valid(inc_e_valid), .inc_ready(inc_e_ready),
      .dec_valid(dec_e_valid), .dec_ready(dec_e_ready),
      .empty(empty_even), .skip(skip[1]),
      .value(value_even), .overflow(overflow[1])
    );

    assign counters_empty = empty_odd && empty_even && !inc_pending && !dec_pending;
  end else begin : g_single
    logic [WIDTH-1:0] value;

    counter_system #(.WIDTH(WIDTH)) u_cnt (
      .clk(clk), .rst_n(rst_n),
      .inc_valid(inc_valid), .inc_ready(inc_ready),
      .dec_valid(dec_valid), .dec_ready(dec_ready),
      .empty(counters_empty), .skip(skip[0]),
      .value(value), .overflow(overflow[0])
    );

    assign skip[1]     = 1'b0;
    assign overflow[1] = 1'b0;
  end

endmodule
