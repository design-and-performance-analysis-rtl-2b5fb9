// Self-checking testbench for brent_kung_adder.
// Checks the 4-bit adder exhaustively (all a, b, cin), and the 16-bit
// (default) and a 12-bit (padded, not a power of two) adder on random and
// corner operands against the + operator.
module tb_brent_kung_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;   logic c4i, c4o;
  logic [15:0] a16, b16, s16; logic c16i, c16o;
  logic [11:0] a12, b12, s12; logic c12i, c12o;

  brent_kung_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(c4i),  .sum(s4),  .cout(c4o));
  brent_kung_adder           dut16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));
  brent_kung_adder #(.W(12)) dut12 (.a(a12), .b(b12), .cin(c12i), .sum(s12), .cout(c12o));

  task automatic check(input string what, input logic [16:0] got, input logic [16:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4i, a4, b4} = 9'(i);
      #1 check("bk4", 17'({c4o, s4}), 17'(a4) + 17'(b4) + 17'(c4i));
    end
    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16i = 1'($urandom);
      a12 = 12'($urandom); b12 = 12'($urandom); c12i = 1'($urandom);
      if (i == 0) begin a16 = '1; b16 = 16'd0; c16i = 1'b1; a12 = '1; b12 = '0; c12i = 1'b1; end
      if (i == 1) begin a16 = '1; b16 = '1;    c16i = 1'b1; a12 = '1; b12 = '1; c12i = 1'b1; end
      #1;
      check("bk16", 17'({c16o, s16}), 17'(a16) + 17'(b16) + 17'(c16i));
      check("bk12", 17'({c12o, s12}), 17'(a12) + 17'(b12) + 17'(c12i));
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
