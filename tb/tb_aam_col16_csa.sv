// End-to-end testbench for aging_aware_multiplier, in the 16 x 16 column-bypassing
// configuration with the ripple-carry (carry-save adder) final stage, n = 8.
//
// The multiplier's path delay is modelled here, since the RTL has no
// delays: whenever the raw product changes, the value reaching the Razor
// flip-flops is delayed by BASE + STEP * (number of ones in the bypassing
// operand), a transport delay forced onto the Razor's data input. STEP
// starts at a "fresh" value, for which every pattern the hold logic judges
// one-cycle fits in a 1000 ps clock period, and after FRESH_OPS operations
// jumps to an "aged" value, for which the one-cycle patterns closest to the
// judging threshold miss the clock edge. clk_del is clk delayed by 200 ps, so
// the shadow latches close 700 ps after each edge, earlier than BASE.
// The test streams random operand pairs with bubbles and checks:
//   - every product against a * b, in order, one out_valid per operation;
//   - the number of cycles each operation occupies the input registers:
//     1 for a one-cycle pattern without an error, 2 otherwise, where
//     one-cycle means #zeros > n (n + 1 once aging_result is high);
//   - that a Razor error occurs exactly after the operations whose modelled
//     delay exceeds the cycle they were given;
//   - the aging indicator's count and aging_result against a model.
// Each mechanism must occur at least once: one-cycle and two-cycle patterns,
// bubbles, upstream stalls, Razor errors and corrections, the aging switch,
// the stricter judging block, and the window reset of the error counter.
`timescale 1ps/1ps
module tb_aam_col16_csa;
  import aam_pkg::*;

  localparam int unsigned N         = 16;
  localparam int unsigned N_JUDGE   = 8;
  localparam int unsigned AI_CNT_W  = 8;
  localparam int unsigned AI_THRESH = 16;
  localparam int unsigned AI_WINDOW = 256;
  localparam bit          ROW       = 0;
  localparam int          TCLK      = 1000;
  localparam int          BASE      = 750;
  localparam int          STEP_FRESH = 15;
  localparam int          STEP_AGED  = 38;
  localparam int          FRESH_OPS = 400;
  localparam int          TOTAL_OPS = 2000;

  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0, n_bubble = 0, n_stall = 0, n_err = 0, n_strict = 0;
  int n_switch = 0, n_winreset = 0, n_err_after_switch = 0, n_out = 0, n_in = 0;

  logic                clk = 1'b0, clk_del = 1'b0, rst_n;
  logic                in_valid, in_ready, out_valid, error, aging_result;
  logic [N-1:0]        md, mr;
  logic [2*N-1:0]      product;
  logic [AI_CNT_W-1:0] aging_count;

  aging_aware_multiplier #(
    .N(N), .BYPASS(BYPASS_COLUMN), .FINAL(ADDER_CSA), .N_JUDGE(N_JUDGE),
    .AI_CNT_W(AI_CNT_W), .AI_THRESH(AI_THRESH), .AI_WINDOW(AI_WINDOW)
  ) dut (
    .clk, .clk_del, .rst_n, .in_valid, .md, .mr, .in_ready, .product, .out_valid,
    .error, .aging_result, .aging_count
  );

  always #(TCLK / 2) clk = ~clk;
  always @(clk) clk_del <= #200 clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // ---------------- path-delay model ----------------
  logic [2*N-1:0] late_product;
  bit             aged_phase = 0;
  int             cur_delay = 0;
  bit             cur_changed = 0;

  always @(dut.product_raw) begin
    int ones;
    ones = $countones(ROW ? dut.mr_q : dut.md_q);
    cur_delay = BASE + ones * (aged_phase ? STEP_AGED : STEP_FRESH);
    cur_changed = 1;
    // transport delay: every change arrives, each after its own delay
    fork
      automatic logic [2*N-1:0] value = dut.product_raw;
      automatic int             delay = cur_delay;
      begin
        #(delay) late_product = value;
      end
    join_none
  end

  initial force dut.u_razor.d = late_product;

  // ---------------- stimulus ----------------
  logic [2*N-1:0] expq[$];

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      md <= '0;
      mr <= '0;
    end else if (in_ready) begin
      if (in_valid) begin
        expq.push_back((2*N)'(md) * (2*N)'(mr));
        n_in++;
        if (n_in == FRESH_OPS) aged_phase = 1;
      end else n_bubble++;
      if (n_in < TOTAL_OPS) begin
        in_valid <= ($urandom_range(0, 9) != 0);
        md <= N'({$urandom, $urandom});
        mr <= N'({$urandom, $urandom});
      end else in_valid <= 1'b0;
    end else if (in_valid) n_stall++;
  end

  // ---------------- monitor ----------------
  int  age = 0;                 // cycles the current operand pair has been held
  bit  op_one;                  // judged one-cycle in its first cycle
  bit  op_err;                  // a Razor error occurred while it was held
  bit  pend_late = 0;           // the operation just captured was late
  int  m_cnt = 0, m_ops = 0;
  bit  m_aged = 0;
  bit  prev_aged = 0;
  bit  op_sw = 0;               // the aging indicator switched while it was held

  always @(posedge clk) begin
    if (!rst_n) begin
      age = 0; op_err = 0; pend_late = 0;
    end else begin
      int zeros, thr;
      zeros = N - $countones(ROW ? dut.mr_q : dut.md_q);
      thr   = aging_result ? N_JUDGE + 1 : N_JUDGE;
      if (age == 0) begin
        op_one = (zeros > thr);
        if (aging_result) n_strict++;
      end
      // error expected exactly after a late capture
      check("error", error, pend_late);
      if (error) begin
        n_err++;
        op_err = 1;
        if (aging_result) n_err_after_switch++;
      end
      // outputs in order
      if (out_valid) begin
        n_out++;
        if (expq.size() == 0) begin
          failures++; checks++;
          $display("FAIL out_valid with no operation outstanding at %0t", $time);
        end else check("product", product, expq.pop_front());
      end
      // aging indicator model (op_done = out_valid)
      check("aging_count", aging_count, m_cnt);
      check("aging_result", aging_result, m_aged);
      if (out_valid) begin
        if (m_ops == AI_WINDOW - 1) begin
          m_ops = 0;
          if (m_cnt != 0) n_winreset++;
          m_cnt = 0;
        end else m_ops++;
      end
      if (error && m_cnt < (1 << AI_CNT_W) - 1) m_cnt++;
      if (m_cnt >= AI_THRESH) m_aged = 1;
      if (aging_result && !prev_aged) begin
        n_switch++;
        op_sw = 1;
      end
      prev_aged = aging_result;
      // occupancy of the input registers
      if (in_ready) begin
        // when the aging indicator switches while an operation is held, the
        // stricter judging block may hold it once more
        if (op_sw) check("cycles held at the aging switch", int'((age + 1) inside {[1:3]}), 1);
        else       check("cycles held", age + 1, (op_one && !op_err) ? 1 : 2);
        op_sw = 0;
        if (age == 0) n_one++; else n_two++;
        pend_late = cur_changed && (age == 0) && (cur_delay > TCLK);
        cur_changed = 0;
        age = 0;
        op_err = 0;
      end else begin
        pend_late = 0;
        age++;
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_in == TOTAL_OPS && expq.size() == 0);
    repeat (3) @(posedge clk);
    check("all outputs", n_out, TOTAL_OPS);
    checks++;
    if (n_one == 0 || n_two == 0 || n_bubble == 0 || n_stall == 0 || n_err == 0 ||
        n_switch == 0 || n_strict == 0 || n_winreset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("operations=%0d one-cycle=%0d two-cycle=%0d bubbles=%0d upstream-stalls=%0d",
             n_in, n_one, n_two, n_bubble, n_stall);
    $display("razor errors=%0d (after aging switch %0d) aging switches=%0d strict-judge ops=%0d window resets=%0d",
             n_err, n_err_after_switch, n_switch, n_strict, n_winreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * (TOTAL_OPS * 4 + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
