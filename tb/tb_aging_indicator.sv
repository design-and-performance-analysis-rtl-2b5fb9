// Self-checking testbench for aging_indicator.
// A small instance (4-bit counter, threshold 5, window of 8 operations) is
// driven with random error and op_done pulses and compared cycle by cycle
// with a reference model; a default-size instance is run on the same stimulus
// and checked the same way. The run must see the counter reset at a window
// end and aging_result switch on.
module tb_aging_indicator;
  int checks = 0, failures = 0;
  int window_resets = 0, switches = 0;

  logic clk = 1'b0, rst_n;
  logic op_done, error;
  logic [3:0] cnt_s;  logic aged_s;
  logic [7:0] cnt_d;  logic aged_d;

  aging_indicator #(.CNT_W(4), .THRESHOLD(5), .WINDOW(8)) dut_s (
    .clk, .rst_n, .op_done, .error, .count(cnt_s), .aging_result(aged_s)
  );
  aging_indicator dut_d (
    .clk, .rst_n, .op_done, .error, .count(cnt_d), .aging_result(aged_d)
  );

  // reference model state
  int m_cnt_s, m_ops_s, m_cnt_d, m_ops_d;
  bit m_aged_s, m_aged_d;

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic model_step(inout int cnt, inout int ops, inout bit aged,
                            input int maxc, input int thr, input int win, output bit reset_seen);
    reset_seen = 0;
    if (op_done) begin
      if (ops == win - 1) begin
        ops = 0;
        if (cnt != 0) reset_seen = 1;
        cnt = 0;
      end else ops++;
    end
    if (error && cnt < maxc) cnt++;
    if (cnt >= thr) aged = 1;
  endtask

  initial begin
    bit rs, rd;
    int p_err;
    rst_n = 1'b0; op_done = 1'b0; error = 1'b0;
    m_cnt_s = 0; m_ops_s = 0; m_cnt_d = 0; m_ops_d = 0; m_aged_s = 0; m_aged_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // first phase: rare errors, windows end before the threshold is hit;
      // second phase: frequent errors
      p_err = (cyc < 1500) ? 8 : 45;
      op_done = ($urandom_range(0, 99) < 70);
      error   = ($urandom_range(0, 99) < p_err);
      check("count_s", int'(cnt_s), m_cnt_s);
      check("aged_s",  int'(aged_s), int'(m_aged_s));
      check("count_d", int'(cnt_d), m_cnt_d);
      check("aged_d",  int'(aged_d), int'(m_aged_d));
      model_step(m_cnt_s, m_ops_s, m_aged_s, 15, 5, 8, rs);
      model_step(m_cnt_d, m_ops_d, m_aged_d, 255, 16, 256, rd);
      if (rs) window_resets++;
      if (m_aged_s && !aged_s) switches++;
      @(negedge clk);
    end
    checks++;
    if (window_resets == 0 || switches == 0) begin
      failures++;
      $display("FAIL mechanism not seen: window_resets=%0d switches=%0d", window_resets, switches);
    end
    $display("window resets=%0d aging switches=%0d", window_resets, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
