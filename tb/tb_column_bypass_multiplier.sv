// Self-checking testbench for column_bypass_multiplier.
// Checks a * b for the 4 x 4 array exhaustively and for the 16 x 16 array
// (the default size) on random operands biased towards many zero bits, so
// that the bypass paths are exercised, with both final adders. The number
// of bypassed (zero) bits in the enabling operand is tallied so that the
// run shows bypassing actually happened. Directed checks cover the 4 x 4
// worked bypass example (which lines are disabled) and the operand/product
// pairs shown in the 4 x 4 simulation waveform.
module tb_column_bypass_multiplier;
  import aam_pkg::*;
  int checks = 0, failures = 0;
  int bypassed = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4c, p4b;
  logic [15:0] a16, b16;
  logic [31:0] p16c, p16b;

  column_bypass_multiplier #(.N(4),  .FINAL(ADDER_CSA)) d4c  (.a(a4),  .b(b4),  .p(p4c));
  column_bypass_multiplier #(.N(4),  .FINAL(ADDER_BKA)) d4b  (.a(a4),  .b(b4),  .p(p4b));
  column_bypass_multiplier #(.N(16), .FINAL(ADDER_CSA)) d16c (.a(a16), .b(b16), .p(p16c));
  column_bypass_multiplier                              d16b (.a(a16), .b(b16), .p(p16b));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] sparse16();
    // AND of up to three random words: 0, 1 or 2 extra ANDs give dense to sparse operands
    logic [15:0] v = 16'($urandom);
    int k = int'($urandom_range(0, 2));
    for (int i = 0; i < k; i++) v &= 16'($urandom);
    return v;
  endfunction

  initial begin
    // worked example: 1001 x 1000 disables columns 1 and 2 (multiplicand bits 1, 2 are 0)
    a4 = 4'b1001; b4 = 4'b1000;
    #1;
    check("example 1001 x 1000", 32'(p4c), 32'd72);
    for (int j = 1; j <= 2; j++) begin
      check("column 1 disabled", 32'(j == 1 ? d4c.g_row[1].g_cell[1].en : d4c.g_row[2].g_cell[1].en), 0);
      check("column 2 disabled", 32'(j == 1 ? d4c.g_row[1].g_cell[2].en : d4c.g_row[2].g_cell[2].en), 0);
      check("column 3 enabled",  32'(j == 1 ? d4c.g_row[1].g_cell[3].en : d4c.g_row[2].g_cell[3].en), 1);
    end
    // operand pairs and products printed in the 4 x 4 simulation waveforms
    for (int k = 0; k < 4; k++) begin
      logic [7:0] exp_p;
      case (k)
        0: begin a4 = 4'b0110; b4 = 4'b1110; exp_p = 8'b01010100; end
        1: begin a4 = 4'b1100; b4 = 4'b1010; exp_p = 8'b01111000; end
        2: begin a4 = 4'b1011; b4 = 4'b0001; exp_p = 8'b00001011; end
        default: begin a4 = 4'b0101; b4 = 4'b1111; exp_p = 8'b01001011; end
      endcase
      #1;
      check("waveform csa", 32'(p4c), 32'(exp_p));
      check("waveform bka", 32'(p4b), 32'(exp_p));
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      check("4x4 csa", 32'(p4c), 32'(a4) * 32'(b4));
      check("4x4 bka", 32'(p4b), 32'(a4) * 32'(b4));
    end
    for (int i = 0; i < 4000; i++) begin
      a16 = sparse16(); b16 = sparse16();
      if (i == 0) begin a16 = '1; b16 = '1; end
      if (i == 1) begin a16 = 16'h8001; b16 = 16'hffff; end
      if (i == 2) begin a16 = 16'hffff; b16 = 16'h8001; end
      #1;
      bypassed += 16 - $countones(("column" == "row") ? b16 : a16);
      check("16x16 csa", p16c, 32'(a16) * 32'(b16));
      check("16x16 bka", p16b, 32'(a16) * 32'(b16));
    end
    checks++;
    if (bypassed == 0) begin failures++; $display("FAIL no bypassed line"); end
    $display("bypassed lines over the random run: %0d", bypassed);
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
