// tb_config_throughput: saturated throughput of the three configurations
// compared by the design's evaluation: the bare 25-stage buffer pipeline
// (BP), the pipeline with one counter (C, INTERLEAVED = 0) and with the
// interleaved pair of counters (IC, INTERLEAVED = 1).
//
// Each gets a source that always offers a token and a sink that is always
// ready, and the tokens delivered in a 400-cycle window are counted.
// Expected in this clocked version: BP and IC one token per cycle, C one
// token every other cycle (each count request waits a cycle for its
// observer, so one controller serves one request of each kind every second
// cycle), i.e. BP >= IC > C, the order the evaluation reports. In the
// interleaved case the increments and decrements at each counter arrive
// staggered, so hardly any pair is cancelled; that is checked too. Every
// configuration must still deliver all tokens in order and end empty.
module tb_config_throughput;

  localparam int STAGES = 25;
  localparam int DW = 8;
  localparam int WINDOW = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  int checks = 0;
  int failures = 0;

  always #5 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // index 0: BP, 1: C, 2: IC
  logic [2:0]    src_on;
  logic [2:0]    iv, ir, ov;
  logic [DW-1:0] id [3];
  logic [DW-1:0] od [3];
  logic [2:0]    empty_c;
  int            sent [3];
  int            recv [3];
  logic [1:0]    skip_c, skip_ic, ovf_c, ovf_ic;
  logic [$clog2(STAGES+1)-1:0] occ0, occ1, occ2;

  buffer_pipeline u_bp (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_data(id[0]),
    .out_valid(ov[0]), .out_ready(1'b1), .out_data(od[0]), .occupancy(occ0));

  empty_pipeline_detector #(.INTERLEAVED(1'b0)) u_c (.clk, .rst_n,
    .in_valid(iv[1]), .in_ready(ir[1]), .in_data(id[1]),
    .out_valid(ov[1]), .out_ready(1'b1), .out_data(od[1]),
    .empty(empty_c[1]), .skip(skip_c), .overflow(ovf_c), .occupancy(occ1));

  empty_pipeline_detector #(.INTERLEAVED(1'b1)) u_ic (.clk, .rst_n,
    .in_valid(iv[2]), .in_ready(ir[2]), .in_data(id[2]),
    .out_valid(ov[2]), .out_ready(1'b1), .out_data(od[2]),
    .empty(empty_c[2]), .skip(skip_ic), .overflow(ovf_ic), .occupancy(occ2));

  assign empty_c[0] = (occ0 == '0);

  for (genvar i = 0; i < 3; i++) begin : g_src
    assign iv[i] = src_on[i];
    assign id[i] = DW'(sent[i]);
  end

  int n_skip_c = 0, n_skip_ic = 0;
  logic measuring = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (measuring) begin
      n_skip_c  <= n_skip_c + int'(skip_c[0]);
      n_skip_ic <= n_skip_ic + int'(skip_ic[0]) + int'(skip_ic[1]);
    end
    for (int i = 0; i < 3; i++) begin
      if (iv[i] && ir[i]) sent[i] <= sent[i] + 1;
      if (ov[i]) begin
        checks++;
        if (od[i] != DW'(recv[i])) begin
          failures++;
          if (failures < 5) $display("FAIL order in configuration %0d: got %0d expected %0d", i, od[i], DW'(recv[i]));
        end
        recv[i] <= recv[i] + 1;
      end
    end
  end

  initial begin
    int r0 [3];
    int got [3];
    src_on = '0;
    for (int i = 0; i < 3; i++) begin sent[i] = 0; recv[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    src_on = 3'b111;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 3; i++) r0[i] = recv[i];
    measuring = 1'b1;
    repeat (WINDOW) @(negedge clk);
    measuring = 1'b0;
    for (int i = 0; i < 3; i++) got[i] = recv[i] - r0[i];
    $display("tokens per %0d cycles: BP=%0d C=%0d IC=%0d", WINDOW, got[0], got[1], got[2]);
    $display("cancelled pairs in the window: C=%0d IC=%0d", n_skip_c, n_skip_ic);
    check(got[0] >= WINDOW - 1, "BP one token per cycle");
    check(got[2] >= WINDOW - 2, "IC one token per cycle");
    check(got[1] >= WINDOW / 2 - 2 && got[1] <= WINDOW / 2 + 2, "C one token every other cycle");
    check(got[0] >= got[2] && got[2] > got[1], "BP >= IC > C");
    // interleaving staggers the two request streams at each counter
    check(n_skip_ic <= WINDOW / 20, "IC: cancelled pairs nearly vanish");
    src_on = '0;
    repeat (4 * STAGES) @(negedge clk);
    for (int i = 0; i < 3; i++) check(sent[i] == recv[i], "all delivered");
    check(empty_c == 3'b111, "all empty at the end");
    check(ovf_c == 2'b00 && ovf_ic == 2'b00, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
