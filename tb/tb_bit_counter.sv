// tb_bit_counter: checks one counter cell against a reference model.
//
// Random increment/decrement commands, a randomly ready cell above and random
// Zero reports from above. Each accepted command must report the right Zero
// value (0 on increment, sz AND x on decrement), flip x, and post a carry or
// borrow exactly when one is due. The cell must refuse commands while a carry
// waits. A watchdog ends the run if it hangs.
module tb_bit_counter;
  import ectr_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    cmd_valid = 1'b0;
  cnt_op_e cmd_op = OP_INC;
  logic    cmd_ready;
  logic    up_valid;
  cnt_op_e up_op;
  logic    up_ready = 1'b0;
  logic    zero_valid, zero;
  logic    zero_up_valid = 1'b0;
  logic    zero_up = 1'b0;
  logic    x, sz;

  int checks = 0;
  int failures = 0;
  int carries = 0;

  // reference state
  logic    m_x = 1'b0, m_sz = 1'b1, m_pend = 1'b0;
  logic    fire = 1'b0, up_fire;
  cnt_op_e m_pop = OP_INC;

  bit_counter dut (.*);

  always #5 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (!cmd_valid || fire) begin
        cmd_valid = ($urandom_range(0, 3) != 0);
        cmd_op    = cnt_op_e'($urandom_range(0, 1));
      end
      up_ready      = ($urandom_range(0, 2) != 0);
      zero_up_valid = ($urandom_range(0, 3) == 0);
      zero_up       = $urandom_range(0, 1) == 1;
      #1;
      // compare outputs with the model before the edge
      check(cmd_ready == !m_pend, "cmd_ready");
      check(x == m_x && sz == m_sz, "state");
      check(up_valid == m_pend && (!m_pend || up_op == m_pop), "carry out");
      check(zero_valid == (cmd_valid && !m_pend), "zero_valid");
      if (cmd_valid && !m_pend)
        check(zero == ((cmd_op == OP_INC) ? 1'b0 : (m_sz && m_x)), "zero value");
      fire    = cmd_valid && cmd_ready;
      up_fire = up_valid && up_ready;
      @(posedge clk);
      // model update
      if (up_fire) m_pend = 1'b0;
      if (fire) begin
        if ((cmd_op == OP_INC) ? m_x : !m_x) begin
          m_pend = 1'b1;
          m_pop  = cmd_op;
          carries++;
        end
        m_x = !m_x;
      end
      if (zero_up_valid) m_sz = zero_up;
    end
    check(carries > 100, "carries happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
