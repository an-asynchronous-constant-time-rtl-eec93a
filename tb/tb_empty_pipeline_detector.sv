// tb_empty_pipeline_detector: end-to-end test of the instrumented pipeline at
// its default size (25 stages, interleaved counters, 5-bit counts).
//
// Numbered tokens are pushed in and drained out under several traffic
// patterns. Checked on every cycle:
//   * empty is never high while any token is between the two gates;
//   * tokens leave unchanged and in order;
//   * no counter overflows.
// A token that has been counted out at the exit but is held there by a
// stalled sink must keep empty low. Checked after each pattern, once traffic stops: empty rises again within
// RISE_LIMIT cycles of the last token leaving (split register, observer
// snapshot, update register, counter), whatever the count was. A saturating stream with a ready sink must move close to one
// token per cycle. Each mechanism must be seen at least once: cancelled
// increment/decrement pairs in both counters, requests routed to both the
// odd and the even counter, carries inside a counter, tokens held at the
// entrance gate, a pipeline filled by a stalled sink, and empty falling and
// rising again.
module tb_empty_pipeline_detector;

  localparam int STAGES = 25;
  localparam int DW = 8;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [DW-1:0] in_data = '0;
  logic          out_valid, out_ready = 1'b0;
  logic [DW-1:0] out_data;
  logic          empty;
  logic [1:0]    skip, overflow;
  logic [$clog2(STAGES+1)-1:0] occupancy;

  int checks = 0;
  int failures = 0;
  int sent = 0, recv = 0;
  int n_skip_odd = 0, n_skip_even = 0, n_odd = 0, n_even = 0, n_carry = 0;
  int n_gate_hold = 0, n_full = 0, n_empty_rise = 0, n_empty_fall = 0;
  logic in_fire, out_fire, prev_empty = 1'b1;
  int max_rise = 0;
  localparam int RISE_LIMIT = 3;

  empty_pipeline_detector dut (.*);

  always #5 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int p_in, input int p_out);
    @(negedge clk);
    if (!in_valid && $urandom_range(0, 99) < p_in) begin
      in_valid = 1'b1;
      in_data  = DW'(sent);
    end
    out_ready = $urandom_range(0, 99) < p_out;
    #1;
    check(!(empty && sent != recv), "empty only with no token inside");
    check(overflow == 2'b00, "no overflow");
    in_fire  = in_valid && in_ready;
    out_fire = out_valid && out_ready;
    if (out_fire) check(out_data == DW'(recv), "order and data");
    // mechanisms
    if (skip[0]) n_skip_odd++;
    if (skip[1]) n_skip_even++;
    if (dut.g_interleaved.inc_o_valid && dut.g_interleaved.inc_o_ready) n_odd++;
    if (dut.g_interleaved.inc_e_valid && dut.g_interleaved.inc_e_ready) n_even++;
    if (dut.g_interleaved.value_odd >= 2 || dut.g_interleaved.value_even >= 2) n_carry++;
    if (in_valid && !in_ready && dut.p_in_ready) n_gate_hold++;
    if (int'(occupancy) == STAGES) n_full++;
    if (empty && !prev_empty) n_empty_rise++;
    if (!empty && prev_empty) n_empty_fall++;
    prev_empty = empty;
    @(posedge clk);
    #1;
    if (in_fire) begin sent++; in_valid = 1'b0; end
    if (out_fire) recv++;
  endtask

  task automatic drain_and_check();
    int t;
    t = 0;
    while (recv != sent && t < 1000) begin step(0, 100); t++; end
    // cycles from the last token leaving until empty is seen
    t = 0;
    while (!empty && t < 20) begin step(0, 100); t++; end
    if (t > max_rise) max_rise = t;
    repeat (2) step(0, 100);
    check(recv == sent, "all tokens delivered");
    check(empty, "empty after draining");
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(empty, "empty after reset");
    // one token through
    step(100, 100);
    drain_and_check();
    // one token counted out at the exit but held there by a stalled sink
    step(100, 0);
    repeat (STAGES + 20) step(0, 0);
    check(dut.exit_held, "token held at the exit after its decrement");
    drain_and_check();
    // saturating stream, ready sink: throughput
    for (int n = 0; n < 60; n++) step(100, 100);
    n0 = recv;
    for (int n = 0; n < 200; n++) step(100, 100);
    $display("saturated stream: %0d tokens in 200 cycles", recv - n0);
    check(recv - n0 >= 190, "near one token per cycle");
    drain_and_check();
    // stalled sink fills the pipeline, then releases
    for (int n = 0; n < 80; n++) step(100, 0);
    check(int'(occupancy) == STAGES, "pipeline filled");
    for (int n = 0; n < 100; n++) step(100, 50);
    drain_and_check();
    // random bursts
    for (int r = 0; r < 80; r++) begin
      int pi, po;
      pi = $urandom_range(5, 100);
      po = $urandom_range(5, 100);
      repeat ($urandom_range(5, 300)) step(pi, po);
      if (r % 4 == 0) drain_and_check();
    end
    drain_and_check();
    $display("tokens=%0d skip odd/even=%0d/%0d routed odd/even=%0d/%0d carry-cycles=%0d",
             sent, n_skip_odd, n_skip_even, n_odd, n_even, n_carry);
    $display("gate holds=%0d full cycles=%0d empty falls/rises=%0d/%0d",
             n_gate_hold, n_full, n_empty_fall, n_empty_rise);
    $display("empty rose at most %0d cycles after the last token left", max_rise);
    check(max_rise <= RISE_LIMIT, "empty rises within RISE_LIMIT cycles");
    check(n_skip_odd > 0, "cancelled pair in odd counter");
    check(n_skip_even > 0, "cancelled pair in even counter");
    check(n_odd > 0 && n_even > 0, "both counters used");
    check(n_carry > 0, "carries inside a counter");
    check(n_gate_hold > 0, "tokens held at the entrance gate");
    check(n_full > 0, "pipeline full");
    check(n_empty_fall > 10 && n_empty_rise > 10, "empty fell and rose");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
