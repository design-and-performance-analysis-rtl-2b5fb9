// Aging-aware variable-latency multiplier with adaptive hold logic.
//
// Aging (BTI, hot carriers, ...) slowly lengthens every path in a multiplier.
// Instead of clocking for the worst-case, aged critical path, this design
// clocks for a typical path and lets most operations finish in one cycle:
//   - input registers md_q / mr_q feed a bypassing array multiplier (column
//     bypassing on the multiplicand or row bypassing on the multiplier, with
//     a ripple-carry or Brent-Kung final adder);
//   - the adaptive hold logic counts zeros in the bypassing operand; patterns
//     with few zeros (long active paths) are given two cycles by holding the
//     input registers and the Razor flip-flops for one edge;
//   - Razor flip-flops capture the product; if a pattern judged one-cycle was
//     in fact too slow, the Razor shadow latch still has the right value, the
//     product is corrected on the next edge and the pipeline stalls for that
//     edge (the operation is redone in two cycles);
//   - the aging indicator counts those errors; once they reach a threshold it
//     switches the hold logic to the stricter judging block (#zeros > n+1), so
//     fewer patterns are treated as one-cycle as the circuit ages.
// Interface: an operand pair (md, mr) is taken on a rising edge where
// in_ready = 1; when in_valid = 0 the registers load zeros (a bubble, which is
// judged one-cycle). product is valid while out_valid = 1, for exactly one
// cycle per operation, in order. error is the Razor error (one cycle per
// detected violation); aging_result and aging_count come from the aging
// indicator. clk_del is the delayed clock of the Razor shadow latches: a copy
// of clk delayed by less than half a period.
// Latency: an operation loaded on edge k is captured on edge k+1 (one-cycle
// pattern) or k+2 (two-cycle pattern) and product is valid in the following
// cycle; a Razor error adds one cycle.
// The architecture (input registers, AHL with two judging blocks and aging
// indicator, bypassing multiplier, Razor flip-flops) follows the published
// design; the clock-enable form of the clock gating, the restore-and-stall
// recovery, the bubble handling and the valid/ready signals are this
// design's choices.
module aging_aware_multiplier
  import aam_pkg::*;
#(
  parameter int unsigned N         = 16,             // operand width
  parameter bypass_e     BYPASS    = BYPASS_COLUMN,  // column or row bypassing
  parameter adder_e      FINAL     = ADDER_BKA,      // CSA (ripple) or Brent-Kung merge
  parameter int unsigned N_JUDGE   = 8,              // judging threshold n
  parameter int unsigned AI_CNT_W  = 8,              // aging indicator counter width
  parameter int unsigned AI_THRESH = 16,             // errors per window that mean "aged"
  parameter int unsigned AI_WINDOW = 256             // operations per counting window
) (
  input  logic                clk,
  input  logic                clk_del,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0]        md,            // multiplicand
  input  logic [N-1:0]        mr,            // multiplier
  output logic                in_ready,
  output logic [2*N-1:0]      product,
  output logic                out_valid,
  output logic                error,
  output logic                aging_result,
  output logic [AI_CNT_W-1:0] aging_count
);
  logic [N-1:0]   md_q, mr_q;
  logic           vld_q;
  logic           hold_n, one_cycle;
  logic           load;
  logic [2*N-1:0] product_raw;
  logic           out_pending;

  // input registers, enabled by the hold logic and stalled by a Razor error
  assign load     = hold_n & ~error;
  assign in_ready = load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      md_q  <= '0;
      mr_q  <= '0;
      vld_q <= 1'b0;
    end else if (load) begin
      md_q  <= in_valid ? md : '0;
      mr_q  <= in_valid ? mr : '0;
      vld_q <= in_valid;
    end
  end

  // bypassing multiplier
  if (BYPASS == BYPASS_ROW) begin : g_mul
    row_bypass_multiplier #(.N(N), .FINAL(FINAL)) u_mult (
      .a(md_q), .b(mr_q), .p(product_raw)
    );
  end else begin : g_mul
    column_bypass_multiplier #(.N(N), .FINAL(FINAL)) u_mult (
      .a(md_q), .b(mr_q), .p(product_raw)
    );
  end

  // adaptive hold logic with the aging indicator
  adaptive_hold_logic #(
    .N(N), .N_JUDGE(N_JUDGE), .AI_CNT_W(AI_CNT_W), .AI_THRESH(AI_THRESH), .AI_WINDOW(AI_WINDOW)
  ) u_ahl (
    .clk, .rst_n,
    .operand     ((BYPASS == BYPASS_ROW) ? mr_q : md_q),
    .error,
    .op_done     (out_valid),
    .hold_n,
    .one_cycle,
    .aging_result,
    .aging_count
  );

  // Razor flip-flops on the product
  razor_flip_flop #(.W(2 * N)) u_razor (
    .clk, .clk_del, .rst_n, .en(load), .d(product_raw), .q(product), .error
  );

  // output valid: the captured product is final unless the Razor flags it;
  // after a correction it is final in the following cycle
  always_ff @(posedge clk) begin
    if (!rst_n)      out_pending <= 1'b0;
    else if (load)   out_pending <= vld_q;
    else if (!error) out_pending <= 1'b0;
  end

  assign out_valid = out_pending & ~error;

  // an enabled capture and a correction never share an edge
  a_no_load_on_restore : assert property (@(posedge clk) disable iff (!rst_n) error |-> !load);
endmodule
