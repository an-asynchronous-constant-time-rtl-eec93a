// tb_token_gate: checks the entrance/exit gate.
//
// A random source offers numbered tokens, a random sink takes them and a
// random counter side acknowledges count requests. Checked: every token
// makes exactly one count request; no token passes before its request is
// acknowledged (the same cycle is allowed); tokens pass unchanged and in
// order; a token whose request was acknowledged while the sink stalled is
// not counted twice.
module tb_token_gate;

  localparam int DW = 8;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [DW-1:0] in_data = '0;
  logic          out_valid, out_ready = 1'b0;
  logic [DW-1:0] out_data;
  logic          cnt_valid, cnt_ready = 1'b0;
  logic          held;

  int checks = 0;
  int failures = 0;
  int sent = 0, passed = 0, counts = 0, n_held = 0;
  logic m_counted = 1'b0;
  logic in_fire, out_fire, cnt_fire;
  logic [DW-1:0] expect_data = '0;

  token_gate dut (.*);

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
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (!in_valid && $urandom_range(0, 2) != 0) begin
        in_valid = 1'b1;
        in_data  = DW'(sent);
        sent++;
      end
      out_ready = $urandom_range(0, 2) != 0;
      cnt_ready = $urandom_range(0, 1) == 1;
      #1;
      check(cnt_valid == (in_valid && !m_counted), "count request");
      check(held == m_counted, "held flag");
      check(out_valid == (in_valid && (m_counted || cnt_ready)), "pass only when counted");
      if (out_valid) check(out_data == in_data, "data unchanged");
      in_fire  = in_valid && in_ready;
      out_fire = out_valid && out_ready;
      cnt_fire = cnt_valid && cnt_ready;
      check(in_fire == out_fire, "token leaves as it is taken");
      if (cnt_fire && !out_ready) n_held++;
      @(posedge clk);
      #1;
      if (cnt_fire) counts++;
      if (out_fire) begin
        check(out_data == expect_data, "order");
        expect_data++;
        passed++;
        in_valid  = 1'b0;
        m_counted = 1'b0;
      end else if (cnt_fire) begin
        m_counted = 1'b1;
      end
    end
    check(counts == passed + (m_counted ? 1 : 0), "one count per token");
    check(n_held > 10, "counted tokens waited for the sink");
    $display("sent=%0d passed=%0d counts=%0d held=%0d", sent, passed, counts, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
