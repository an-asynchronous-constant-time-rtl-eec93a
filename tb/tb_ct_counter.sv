// tb_ct_counter: checks the constant-time counter against an integer model.
//
// Two counters are driven: one at its default width and one 12 bits wide.
// Each gets a random mix of increments and decrements that keeps its count
// inside its range, plus long runs of increments and of decrements that
// ripple carries and borrows through many cells. Checked:
//   * zero equals (count == 0) on every cycle, right after each update;
//   * value equals the count once carries have settled;
//   * constant time: an offered update is taken within MAX_WAIT cycles,
//     the same bound for both widths, and zero is right the cycle after.
module tb_ct_counter;
  import ectr_pkg::*;

  localparam int W0 = 5;
  localparam int W1 = 12;
  localparam int MAX_WAIT = 1;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- one driver/model per width
  logic [1:0]          v;
  cnt_op_e [1:0]       op;
  logic [1:0]          rdy;
  logic [1:0]          zero;
  logic [1:0]          ovf;
  logic [W0-1:0] value0, sticky0;
  logic [W1-1:0] value1, sticky1;
  int      cnt [2];
  int      wait_c [2];
  int      max_wait [2];
  int      carries_seen = 0;

  ct_counter dut0 (.clk, .rst_n, .cmd_valid(v[0]), .cmd_op(op[0]), .cmd_ready(rdy[0]),
                   .zero(zero[0]), .value(value0), .sticky(sticky0), .overflow(ovf[0]));
  ct_counter #(.WIDTH(W1)) dut1 (.clk, .rst_n, .cmd_valid(v[1]), .cmd_op(op[1]),
                   .cmd_ready(rdy[1]), .zero(zero[1]), .value(value1), .sticky(sticky1),
                   .overflow(ovf[1]));

  function automatic int limit(int i);
    return (i == 0) ? (1 << W0) - 1 : (1 << W1) - 1;
  endfunction

  // mode 0: random, 1: run up, 2: run down, 3: idle
  task automatic run(input int cycles, input int mode, input int top0, input int top1);
    bit fire [2];
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        int top;
        top = (i == 0) ? top0 : top1;
        if (!v[i]) begin
          case (mode)
            0: begin
              v[i]  = $urandom_range(0, 3) != 0;
              op[i] = cnt_op_e'($urandom_range(0, 1));
            end
            1: begin v[i] = 1'b1; op[i] = OP_INC; end
            2: begin v[i] = 1'b1; op[i] = OP_DEC; end
            default: v[i] = 1'b0;
          endcase
          if (v[i] && op[i] == OP_INC && cnt[i] >= top) v[i] = 1'b0;
          if (v[i] && op[i] == OP_DEC && cnt[i] == 0) v[i] = 1'b0;
          wait_c[i] = 0;
        end
      end
      #1;
      for (int i = 0; i < 2; i++) begin
        check(zero[i] == (cnt[i] == 0), "zero flag");
        check(!ovf[i], "no overflow");
        fire[i] = v[i] && rdy[i];
        if (v[i] && !rdy[i]) wait_c[i]++;
        if (wait_c[i] > max_wait[i]) max_wait[i] = wait_c[i];
      end
      if (dut0.c_valid[2]) carries_seen++;
      @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++)
        if (fire[i]) begin
          cnt[i] += (op[i] == OP_INC) ? 1 : -1;
          v[i] = 1'b0;
        end
    end
  endtask

  task automatic settle_and_compare();
    run(2 * W1 + 4, 3, 0, 0);
    check(int'(value0) == cnt[0], "value width 5");
    check(int'(value1) == cnt[1], "value width 12");
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      v[i] = 1'b0; op[i] = OP_INC; cnt[i] = 0; wait_c[i] = 0; max_wait[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(zero[0] && zero[1], "zero after reset");
    // long run up and down through many carries
    run(40, 1, limit(0), 40);
    settle_and_compare();
    run(40, 2, limit(0), 40);
    settle_and_compare();
    for (int r = 0; r < 40; r++) begin
      run($urandom_range(20, 400), 0, limit(0), limit(1));
      settle_and_compare();
      run($urandom_range(5, 60), $urandom_range(1, 2), limit(0), limit(1));
      settle_and_compare();
    end
    $display("highest counts before draining: %0d, %0d", cnt[0], cnt[1]);
    // empty both and check zero again
    while (cnt[0] != 0 || cnt[1] != 0) run(100, 2, limit(0), limit(1));
    settle_and_compare();
    check(zero[0] && zero[1], "zero at end");
    $display("max wait: width %0d -> %0d, width %0d -> %0d", W0, max_wait[0], W1, max_wait[1]);
    check(max_wait[0] <= MAX_WAIT && max_wait[1] <= MAX_WAIT, "constant-time acceptance");
    check(carries_seen > 10, "carries reached bit 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
