// Aging indicator: counts Razor timing errors over a window of operations.
//
// count increments (saturating) on every cycle with error = 1. A second
// counter counts completed operations (op_done); after WINDOW of them the
// error count is reset to zero and a new window starts. When the error count
// reaches THRESHOLD, aging_result goes high and stays high until reset: aging
// does not heal, and the adaptive hold logic must keep using its stricter
// judging block from then on. The error counting, the reset at the end of a
// period of operation and the switch at a predefined threshold follow the
// description of the block; the window length, the threshold and the
// stickiness of aging_result are this design's choices.
// Timing: synchronous, active-low synchronous reset; count and aging_result
// change on the rising clock edge after the error or op_done that causes it.
module aging_indicator #(
  parameter int unsigned CNT_W     = 8,
  parameter int unsigned THRESHOLD = 16,
  parameter int unsigned WINDOW    = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_done,       // one pulse per completed operation
  input  logic             error,         // Razor error, one pulse per error
  output logic [CNT_W-1:0] count,         // errors seen in the current window
  output logic             aging_result   // 1: significant aging, use judging block 2
);
  localparam int unsigned WIN_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  logic [WIN_W-1:0] ops;
  logic             window_end;
  logic [CNT_W-1:0] count_next;

  assign window_end = op_done && (ops == WIN_W'(WINDOW - 1));

  always_comb begin
    count_next = window_end ? '0 : count;
    if (error && (count_next != '1)) count_next = count_next + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ops          <= '0;
      count        <= '0;
      aging_result <= 1'b0;
    end else begin
      if (op_done) ops <= window_end ? '0 : ops + 1'b1;
      count <= count_next;
      if (32'(count_next) >= THRESHOLD) aging_result <= 1'b1;
    end
  end
endmodule
