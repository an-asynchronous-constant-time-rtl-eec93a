// tb_negated_probe: checks the probe observer.
//
// A random requester raises a_valid and holds it until acknowledged; a
// random reader strobes pa_read. Checked against a model: pa is the probe as
// it was one cycle earlier (cleared by the acknowledging edge), a_ready is
// high only when a true value is read, and every request is acknowledged
// exactly once and only after it was visible on pa.
module tb_negated_probe;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a_valid = 1'b0;
  logic a_ready;
  logic pa;
  logic pa_read = 1'b0;

  int checks = 0;
  int failures = 0;
  int sent = 0, acked = 0, false_reads = 0;
  logic m_seen = 1'b0;
  logic fire;

  negated_probe dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (!a_valid && $urandom_range(0, 2) == 0) begin
        a_valid = 1'b1;
        sent++;
      end
      pa_read = $urandom_range(0, 1) == 1;
      #1;
      check(pa == m_seen, "proxy value");
      check(a_ready == (pa_read && m_seen), "ack only on a true read");
      if (pa_read && !pa) false_reads++;
      fire = a_valid && a_ready;
      @(posedge clk);
      #1;
      m_seen = a_valid && !fire;
      if (fire) begin
        acked++;
        a_valid = 1'b0;
      end
    end
    // drain: keep reading until the last request is acknowledged
    repeat (3) begin
      @(negedge clk);
      pa_read = 1'b1;
      #1;
      fire = a_valid && a_ready;
      @(posedge clk);
      #1;
      if (fire) begin
        acked++;
        a_valid = 1'b0;
      end
    end
    check(acked == sent, "one acknowledge per request");
    check(false_reads > 100, "false values were read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
