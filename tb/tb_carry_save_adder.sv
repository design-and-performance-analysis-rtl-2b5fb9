// Self-checking testbench for carry_save_adder.
// Checks x + y + z for the 4-bit adder exhaustively, with both merging
// adders (ripple-carry and Brent-Kung), and 16-bit adders on random operands.
module tb_carry_save_adder;
  import aam_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, z4;
  logic [5:0]  s4r, s4b;
  logic [15:0] x16, y16, z16;
  logic [17:0] s16r, s16b;

  carry_save_adder                                   d4r  (.x(x4),  .y(y4),  .z(z4),  .sum(s4r));
  carry_save_adder #(.W(4),  .FINAL(ADDER_BKA))      d4b  (.x(x4),  .y(y4),  .z(z4),  .sum(s4b));
  carry_save_adder #(.W(16), .FINAL(ADDER_CSA))      d16r (.x(x16), .y(y16), .z(z16), .sum(s16r));
  carry_save_adder #(.W(16), .FINAL(ADDER_BKA))      d16b (.x(x16), .y(y16), .z(z16), .sum(s16b));

  task automatic check(input string what, input logic [17:0] got, input logic [17:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      check("csa4 ripple", 18'(s4r), 18'(x4) + 18'(y4) + 18'(z4));
      check("csa4 bk",     18'(s4b), 18'(x4) + 18'(y4) + 18'(z4));
    end
    for (int i = 0; i < 3000; i++) begin
      x16 = 16'($urandom); y16 = 16'($urandom); z16 = 16'($urandom);
      if (i == 0) begin x16 = '1; y16 = '1; z16 = '1; end
      #1;
      check("csa16 ripple", s16r, 18'(x16) + 18'(y16) + 18'(z16));
      check("csa16 bk",     s16b, 18'(x16) + 18'(y16) + 18'(z16));
    end
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
