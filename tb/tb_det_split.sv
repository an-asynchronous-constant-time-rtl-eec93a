// tb_det_split: checks the deterministic split.
//
// Random requests in, random readiness on both outputs. Every request taken
// is numbered; the model expects the 1st, 3rd, 5th ... on the odd output and
// the 2nd, 4th ... on the even output, each exactly once and one cycle or
// more after it was taken. pending must be high exactly while an output
// holds a request. With both outputs always ready, one request per cycle
// must pass.
module tb_det_split;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic odd_valid, odd_ready = 1'b0;
  logic even_valid, even_ready = 1'b0;
  logic pending;

  int checks = 0;
  int failures = 0;
  int taken = 0, n_odd = 0, n_even = 0;
  int m_odd = 0, m_even = 0;  // requests held for each side in the model
  logic in_fire, o_fire, e_fire;

  det_split dut (.*);

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

  task automatic step(input int p_in, input int p_rdy);
    @(negedge clk);
    if (!in_valid && $urandom_range(0, 99) < p_in) in_valid = 1'b1;
    odd_ready  = $urandom_range(0, 99) < p_rdy;
    even_ready = $urandom_range(0, 99) < p_rdy;
    #1;
    check(odd_valid == (m_odd > 0) && even_valid == (m_even > 0), "outputs hold requests");
    check(pending == (m_odd > 0 || m_even > 0), "pending");
    in_fire = in_valid && in_ready;
    o_fire  = odd_valid && odd_ready;
    e_fire  = even_valid && even_ready;
    @(posedge clk);
    #1;
    if (o_fire) begin m_odd--; n_odd++; end
    if (e_fire) begin m_even--; n_even++; end
    if (in_fire) begin
      taken++;
      if (taken % 2 == 1) m_odd++;
      else m_even++;
      in_valid = 1'b0;
    end
    check(m_odd <= 1 && m_even <= 1, "one request per side at most");
  endtask

  initial begin
    int n_start;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) step(70, 60);
    // full rate: a new request every cycle, both sides always ready
    n_start = taken;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      odd_ready = 1'b1;
      even_ready = 1'b1;
      #1;
      in_fire = in_valid && in_ready;
      o_fire  = odd_valid;
      e_fire  = even_valid;
      @(posedge clk);
      #1;
      if (o_fire) begin m_odd--; n_odd++; end
      if (e_fire) begin m_even--; n_even++; end
      if (in_fire) begin
        taken++;
        if (taken % 2 == 1) m_odd++;
        else m_even++;
      end
    end
    check(taken - n_start == 40, "one request per cycle");
    in_valid = 1'b0;
    for (int n = 0; n < 5; n++) step(0, 100);
    check(n_odd + n_even == taken && n_odd == (taken + 1) / 2, "all delivered, alternating");
    $display("taken=%0d odd=%0d even=%0d", taken, n_odd, n_even);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
