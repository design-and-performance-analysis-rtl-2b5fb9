// Self-checking testbench for razor_flip_flop (8 bits wide).
// The clock period is 10 ns; clk_del is clk delayed by 2 ns, so the shadow
// latch is open from 2 ns to 7 ns after each rising edge. Each operation
// launches a random value on a rising edge with a chosen path delay; the next
// rising edge captures it. A delay up to 10 ns meets timing (no error, q right
// after the edge); a delay of 11 to 16 ns misses the edge but reaches the
// shadow latch: error must be set after the latch closes, and after the
// following (disabled) edge q must hold the late value and error must clear.
// Some operations are captured with en = 0: q must keep its old value and no
// error may be raised even for a late value.
`timescale 1ns/1ps
module tb_razor_flip_flop;
  int checks = 0, failures = 0;
  int n_ok = 0, n_err = 0, n_hold = 0;

  logic       clk = 1'b0, clk_del, rst_n, en;
  logic [7:0] d, q;
  logic       error;

  razor_flip_flop #(.W(8)) dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    logic [7:0] v, old;
    int t;
    bit late, hold;
    rst_n = 1'b0; en = 1'b1; d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 600; k++) begin
      // launch on this rising edge
      old  = q;
      v    = 8'($urandom);
      if (v == d) v = ~v;
      late = ($urandom_range(0, 2) == 0);
      hold = ($urandom_range(0, 7) == 0);
      t    = late ? int'($urandom_range(11, 16)) : int'($urandom_range(8, 10));
      d <= #(t * 1ns - 1ps) v;   // arrives just before t ns
      en = !hold;
      @(posedge clk);            // capture edge
      #8;                        // shadow latch closed
      if (hold) begin
        n_hold++;
        check("held q", int'(q), int'(old));
        check("held error", int'(error), 0);
        en = 1'b1;
      end else if (!late) begin
        n_ok++;
        check("on-time q", int'(q), int'(v));
        check("on-time error", int'(error), 0);
      end else begin
        n_err++;
        check("late error", int'(error), 1);
        en = 1'b0;               // the correcting edge must not capture
        @(posedge clk);
        #1;
        check("restored q", int'(q), int'(v));
        check("error cleared", int'(error), 0);
        en = 1'b1;
      end
      @(posedge clk);
    end
    checks++;
    if (n_ok == 0 || n_err == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL case not seen: ok=%0d err=%0d hold=%0d", n_ok, n_err, n_hold);
    end
    $display("on-time=%0d late=%0d held=%0d", n_ok, n_err, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
