// tb_buffer_pipeline: checks the 25-stage buffer pipeline.
//
// Tokens carry a running number. Checked: tokens come out unchanged and in
// order; occupancy equals tokens in minus tokens out and never exceeds
// STAGES; a lone token takes STAGES cycles; a full pipeline with a ready sink
// moves one token per cycle; a stalled sink fills it to exactly STAGES.
module tb_buffer_pipeline;

  localparam int STAGES = 25;
  localparam int DW = 8;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [DW-1:0] in_data = '0;
  logic          out_valid, out_ready = 1'b0;
  logic [DW-1:0] out_data;
  logic [$clog2(STAGES+1)-1:0] occupancy;

  int checks = 0;
  int failures = 0;
  int sent = 0, recv = 0;
  logic in_fire, out_fire;

  buffer_pipeline dut (.*);

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

  // one cycle: p_in / p_out chance (percent) of offering / taking
  task automatic step(input int p_in, input int p_out);
    @(negedge clk);
    if (!in_valid && $urandom_range(0, 99) < p_in) begin
      in_valid = 1'b1;
      in_data  = DW'(sent);
    end
    out_ready = $urandom_range(0, 99) < p_out;
    #1;
    check(int'(occupancy) == sent - recv, "occupancy");
    check(int'(occupancy) <= STAGES, "occupancy bound");
    in_fire  = in_valid && in_ready;
    out_fire = out_valid && out_ready;
    if (out_fire) check(out_data == DW'(recv), "order and data");
    @(posedge clk);
    #1;
    if (in_fire) begin sent++; in_valid = 1'b0; end
    if (out_fire) recv++;
  endtask

  initial begin
    int t, n0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency of a lone token
    step(100, 100);
    t = 0;
    while (recv == 0 && t < 100) begin step(0, 100); t++; end
    check(t == STAGES, "latency of STAGES cycles");
    $display("lone token latency: %0d cycles after entry", t);
    // fill against a stalled sink
    for (int n = 0; n < 3 * STAGES; n++) step(100, 0);
    check(int'(occupancy) == STAGES, "fills to STAGES");
    // full pipeline, free flow: one token per cycle
    n0 = recv;
    for (int n = 0; n < 50; n++) step(100, 100);
    check(recv - n0 >= 49, "one token per cycle");
    // random traffic
    for (int n = 0; n < 6000; n++) step(60, 60);
    while (recv != sent) step(0, 100);
    $display("sent=%0d received=%0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
