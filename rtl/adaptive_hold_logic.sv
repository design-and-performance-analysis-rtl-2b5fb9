// Adaptive hold logic (AHL): decides, from the number of zeros in the
// registered operand, whether the current input pattern can finish in one
// cycle or needs two, and holds the input registers for one cycle when it
// needs two.
//
//   judging block 1   one_cycle_1 = (#zeros > N_JUDGE)
//   judging block 2   one_cycle_2 = (#zeros > N_JUDGE + 1)
//   multiplexer       selects block 2 once the aging indicator reports aging
//   OR gate + D FF    hold_n = mux | ~q,  q <= hold_n every clock
//
// hold_n (the "!gating" signal) is the enable of the input registers and the
// Razor flip-flops: 0 holds them for the next clock edge. Because the D
// flip-flop stores hold_n and feeds back its inverse, a 0 is always followed
// by a 1, so a two-cycle pattern is held for exactly one extra cycle.
// The operand is the multiplicand for a column-bypassing multiplier and the
// multiplier for a row-bypassing one. The aging indicator sits inside this
// block and counts the Razor errors.
// This design uses hold_n as a synchronous clock enable instead of ANDing the
// clock with the flip-flop output; the input registers then skip the same
// edge that the gated clock would, without a glitch-prone gated clock.
// Timing: hold_n is combinational from the registered operand, the aging
// result and q; it is sampled by the enabled registers at the next rising edge.
module adaptive_hold_logic #(
  parameter int unsigned N         = 16,
  parameter int unsigned N_JUDGE   = 8,
  parameter int unsigned AI_CNT_W  = 8,
  parameter int unsigned AI_THRESH = 16,
  parameter int unsigned AI_WINDOW = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        operand,       // registered md or mr
  input  logic                error,         // Razor error
  input  logic                op_done,       // operation completed
  output logic                hold_n,        // !gating: 1 = registers may load
  output logic                one_cycle,     // multiplexer output
  output logic                aging_result,
  output logic [AI_CNT_W-1:0] aging_count
);
  logic [$clog2(N+1)-1:0] zeros;
  logic                   judge1, judge2;
  logic                   q;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < N; i++) zeros = zeros + {{($clog2(N+1)-1){1'b0}}, ~operand[i]};
  end

  assign judge1    = 32'(zeros) > N_JUDGE;
  assign judge2    = 32'(zeros) > N_JUDGE + 1;
  assign one_cycle = aging_result ? judge2 : judge1;
  assign hold_n    = one_cycle | ~q;

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b1;
    else        q <= hold_n;
  end

  aging_indicator #(.CNT_W(AI_CNT_W), .THRESHOLD(AI_THRESH), .WINDOW(AI_WINDOW)) u_ai (
    .clk, .rst_n, .op_done, .error, .count(aging_count), .aging_result
  );
endmodule
