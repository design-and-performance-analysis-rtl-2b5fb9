// Razor flip-flop bank, W bits wide: detects and corrects late-arriving data.
//
// Each bit has a main flip-flop clocked by clk and a shadow latch that is
// transparent while the delayed clock clk_del is high. Data that arrives
// after the clk edge but before the shadow latch closes is caught only by the
// shadow latch; the comparator (main != shadow) then flags a timing error.
// On the next clk edge the multiplexer in front of the main flip-flop loads
// the shadow value, so the stored result is corrected one cycle late; the
// per-bit comparisons are ORed into one error output.
// en plays the role of the gated clock: the main flip-flop captures only on
// enabled edges, and the shadow latch is only armed in the cycle after such
// a capture, so held cycles of a two-cycle operation raise no error. The
// caller must keep en low on the correcting edge (error = 1).
// The shadow element is a level-sensitive latch on purpose (this is the Razor
// principle); it is the only latch in the design. Requirements on timing:
// clk_del must fall before the next rising edge of clk, and the shortest path
// into d must be longer than the time from the clk edge to the falling edge
// of clk_del, or new data overwrites the shadow value.
// error is valid from the falling edge of clk_del to the next rising clk edge.
module razor_flip_flop #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clk_del,   // delayed clock for the shadow latch
  input  logic         rst_n,
  input  logic         en,        // capture enable (gated-clock equivalent)
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         error
);
  logic [W-1:0] shadow;
  logic [W-1:0] error_l;   // per-bit comparator outputs
  logic         armed;     // main flip-flop captured on the last edge

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q     <= '0;
      armed <= 1'b0;
    end else begin
      armed <= en & ~error;
      if (error)   q <= shadow;  // restore the late but correct value
      else if (en) q <= d;
    end
  end

  always_latch begin
    if (clk_del && armed) shadow = d;
  end

  assign error_l = q ^ shadow;
  assign error   = armed & (|error_l);
endmodule
