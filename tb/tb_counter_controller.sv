// tb_counter_controller: checks the controller's decisions cycle by cycle.
//
// Raw probes, proxy values, the counter's ready and zero flag are driven at
// random. A model of the controller's rules predicts: when the proxies are
// read (a probe is up and the update register is free or being emptied),
// which update is posted (increment for x only, decrement for y only,
// nothing and a skip pulse for both), that a posted update is held until
// taken, and empty = zero AND no update waiting. Every outcome must occur.
module tb_counter_controller;
  import ectr_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    inc_probe = 1'b0, dec_probe = 1'b0;
  logic    incp = 1'b0, decp = 1'b0;
  logic    incp_read, decp_read;
  logic    upd_valid;
  cnt_op_e upd_op;
  logic    upd_ready = 1'b0;
  logic    zero_in = 1'b1;
  logic    empty, skip;

  int checks = 0;
  int failures = 0;
  int n_skip = 0, n_inc = 0, n_dec = 0, n_none = 0, n_masked = 0;
  logic    m_v = 1'b0;
  cnt_op_e m_op = OP_INC;
  logic    go, taken;

  counter_controller dut (.*);

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
      inc_probe = $urandom_range(0, 1) == 1;
      dec_probe = $urandom_range(0, 1) == 1;
      incp      = $urandom_range(0, 1) == 1;
      decp      = $urandom_range(0, 1) == 1;
      upd_ready = $urandom_range(0, 2) != 0;
      zero_in   = $urandom_range(0, 1) == 1;
      #1;
      go    = (inc_probe || dec_probe) && (!m_v || upd_ready);
      taken = m_v && upd_ready;
      check(incp_read == go && decp_read == go, "proxy reads");
      check(skip == (go && incp && decp), "skip");
      check(upd_valid == m_v, "update valid");
      if (m_v) check(upd_op == m_op, "update op");
      check(empty == (zero_in && !m_v), "empty");
      if (zero_in && m_v) n_masked++;
      @(posedge clk);
      #1;
      if (taken) m_v = 1'b0;
      if (go) begin
        if (incp && decp) n_skip++;
        else if (incp) begin m_v = 1'b1; m_op = OP_INC; n_inc++; end
        else if (decp) begin m_v = 1'b1; m_op = OP_DEC; n_dec++; end
        else n_none++;
      end
    end
    check(n_skip > 0 && n_inc > 0 && n_dec > 0 && n_none > 0 && n_masked > 0,
          "every outcome occurred");
    $display("skip=%0d inc=%0d dec=%0d none=%0d", n_skip, n_inc, n_dec, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
