// Self-checking testbench for adaptive_hold_logic, at the 4 x 4 size
// (n = 2) and at the default 16 x 16 size (n = 8).
// Each instance holds an operand register that loads a new random pattern
// whenever hold_n = 1, as the multiplier's input register does. The test
// checks, cycle by cycle, the judging decision against an independent zero
// count, that a pattern judged two-cycle stays in the register for exactly
// two cycles and a one-cycle pattern for one, and that once the aging
// indicator has switched, the stricter threshold (n + 1) is used.
module tb_adaptive_hold_logic;
  int checks = 0, failures = 0;
  int one_cyc = 0, two_cyc = 0, strict_used = 0;

  logic clk = 1'b0, rst_n;
  logic error, op_done;

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // 4 x 4 instance
  logic [3:0]  op4;
  logic        hold4, one4, aged4;
  logic [2:0]  cnt4;
  adaptive_hold_logic #(.N(4), .N_JUDGE(2), .AI_CNT_W(3), .AI_THRESH(4), .AI_WINDOW(64)) dut4 (
    .clk, .rst_n, .operand(op4), .error, .op_done, .hold_n(hold4), .one_cycle(one4),
    .aging_result(aged4), .aging_count(cnt4)
  );

  // 16 x 16 instance with the default parameters
  logic [15:0] op16;
  logic        hold16, one16, aged16;
  logic [7:0]  cnt16;
  adaptive_hold_logic dut16 (
    .clk, .rst_n, .operand(op16), .error, .op_done, .hold_n(hold16), .one_cycle(one16),
    .aging_result(aged16), .aging_count(cnt16)
  );

  initial begin
    int age4 = 0, age16 = 0;     // cycles the current pattern has been held
    int thr4, thr16, z4, z16;
    logic h4, h16;
    rst_n = 1'b0; error = 1'b0; op_done = 1'b0; op4 = '0; op16 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // errors (only to drive the aging indicator) become frequent halfway
      error   = (cyc > 2000) && ($urandom_range(0, 9) < 4);
      op_done = 1'b1;
      #1;
      z4  = 4 - $countones(op4);
      z16 = 16 - $countones(op16);
      thr4  = aged4  ? 3 : 2;
      thr16 = aged16 ? 9 : 8;
      if (aged16) strict_used++;
      check("one_cycle4",  int'(one4),  int'(z4 > thr4));
      check("one_cycle16", int'(one16), int'(z16 > thr16));
      // hold_n: a pattern judged two-cycle is held once, then released
      check("hold4",  int'(hold4),  int'((z4 > thr4) || age4 == 1));
      check("hold16", int'(hold16), int'((z16 > thr16) || age16 == 1));
      h4 = hold4;
      h16 = hold16;
      @(negedge clk);
      if (h4) begin
        if (age4 == 0) one_cyc++; else two_cyc++;
        op4 = 4'($urandom);
        age4 = 0;
      end else age4++;
      if (h16) begin
        op16 = 16'($urandom) & ((cyc % 2 == 0) ? 16'($urandom) : 16'hffff);
        age16 = 0;
      end else age16++;
      check("held at most one extra cycle", int'(age4 <= 1 && age16 <= 1), 1);
    end
    checks++;
    if (one_cyc == 0 || two_cyc == 0 || strict_used == 0 || !aged4) begin
      failures++;
      $display("FAIL mechanism not seen: one=%0d two=%0d strict=%0d", one_cyc, two_cyc, strict_used);
    end
    $display("one-cycle=%0d two-cycle=%0d strict-judge cycles=%0d", one_cyc, two_cyc, strict_used);
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
