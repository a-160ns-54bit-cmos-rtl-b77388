// rem_compare: remainder register and comparator for early done detection.
//
// Each time the last stage of the ring evaluates (`capture`), the value of
// the shifted partial remainder it produced (sum + carry, modulo 2^55) and
// the quotient digit already chosen for it are compared with those stored
// one ring trip earlier, and then stored.  If both are equal, the five
// digits of the trip just finished took the remainder back to the same
// value, so repeating them forever keeps it there: the remaining quotient
// digits repeat with period five and the division can stop (document
// equations (7)-(8)).  Comparing the value rather than the carry-save bit
// pattern is this design's choice: the two words of a repeated value need
// not repeat bit for bit, and the value is what the arithmetic depends on.
// The add is a plain 55-bit adder; the document does not show how its
// comparator is built.
// Timing: `result_valid` pulses one clock after `capture`, with `same` valid
// while it is high and held until the next capture.  `clr` forgets the
// stored value (so the first trip of a division never reports `same`).
module rem_compare
  import srt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        capture,
  input  ring_state_t state,
  output logic        same,
  output logic        result_valid
);
  logic [REM_W-1:0] value, stored_value;
  qdig_t            stored_q;
  logic             stored_valid;

  assign value = state.sum + state.car;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored_value <= '0;
      stored_q     <= Q_SPACER;
      stored_valid <= 1'b0;
      same         <= 1'b0;
      result_valid <= 1'b0;
    end else if (clr) begin
      stored_valid <= 1'b0;
      same         <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= capture;
      if (capture) begin
        same         <= stored_valid && (value == stored_value) && (state.q == stored_q);
        stored_value <= value;
        stored_q     <= state.q;
        stored_valid <= 1'b1;
      end
    end
  end
endmodule
