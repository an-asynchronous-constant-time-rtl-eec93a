// tb_counter_system: checks one complete counter (observers, controller,
// counter) as an empty detector.
//
// An increment requester and a decrement requester each raise a request and
// hold it until acknowledged; a decrement is only requested while the model
// says tokens are inside. The model count is acknowledged increments minus
// acknowledged decrements. Checked:
//   * empty is never high while the model count is non-zero;
//   * after a few quiet cycles empty equals (count == 0) and value = count;
//   * a steady stream of increments is acknowledged every other cycle;
//   * simultaneous requests are cancelled (skip) and still acknowledged.
module tb_counter_system;
  import ectr_pkg::*;

  localparam int W = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic inc_valid = 1'b0, inc_ready;
  logic dec_valid = 1'b0, dec_ready;
  logic empty, skip, overflow;
  logic [W-1:0] value;

  int checks = 0;
  int failures = 0;
  int count = 0, n_skip = 0, n_inc = 0, n_dec = 0;
  logic inc_fire, dec_fire;

  counter_system dut (.*);

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

  // one cycle; p_inc / p_dec: chance in percent of raising a new request
  task automatic step(input int p_inc, input int p_dec);
    @(negedge clk);
    if (!inc_valid && count < (1 << W) - 2 &&
        $urandom_range(0, 99) < p_inc)
      inc_valid = 1'b1;
    if (!dec_valid && count > 0 && $urandom_range(0, 99) < p_dec)
      dec_valid = 1'b1;
    #1;
    check(!(empty && count != 0), "empty only when count is zero");
    check(!overflow, "no overflow");
    inc_fire = inc_valid && inc_ready;
    dec_fire = dec_valid && dec_ready;
    if (skip) begin
      n_skip++;
      check(inc_fire && dec_fire, "skip acknowledges both");
    end
    @(posedge clk);
    #1;
    if (inc_fire) begin count++; n_inc++; inc_valid = 1'b0; end
    if (dec_fire) begin count--; n_dec++; dec_valid = 1'b0; end
  endtask

  task automatic quiet_check();
    repeat (8) step(0, 0);
    check(empty == (count == 0), "empty after settling");
    check(int'(value) == count, "value after settling");
  endtask

  initial begin
    int acks;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(empty, "empty after reset");
    // throughput of a steady increment stream
    acks = n_inc;
    for (int c = 0; c < 40; c++) begin
      step(100, 0);
    end
    acks = n_inc - acks;
    check(acks == 20, "increment every other cycle");
    $display("steady increments: %0d acknowledged in 40 cycles", acks);
    quiet_check();
    // both requests always present: pairs cancel
    for (int c = 0; c < 40; c++) step(100, 100);
    quiet_check();
    // random traffic
    for (int r = 0; r < 60; r++) begin
      int pi, pd;
      pi = $urandom_range(0, 100);
      pd = $urandom_range(0, 100);
      repeat ($urandom_range(10, 200)) step(pi, pd);
      quiet_check();
    end
    // drain
    while (count > 0) step(0, 100);
    quiet_check();
    check(n_skip > 10, "cancelled pairs occurred");
    $display("inc=%0d dec=%0d skip=%0d", n_inc, n_dec, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
