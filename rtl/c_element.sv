// c_element: Muller C-element.
//
// The output rises when both inputs are high, falls when both are low and
// otherwise keeps its value.  The document builds it as a static CMOS gate
// with a weak feedback keeper.  Here the stored value is a flip-flop and the
// output takes its new value on the next clock edge, so one clock stands for
// the gate delay; that clocked form is this design's choice, made so the
// self-timed circuits can be simulated and synthesised as ordinary
// synchronous logic.  `clr` (synchronous) returns the output to 0, the state
// the document's precharge/reset leaves it in.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic c
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       c <= 1'b0;
    else if (clr)     c <= 1'b0;
    else if (a && b)  c <= 1'b1;
    else if (!a && !b) c <= 1'b0;
  end
endmodule
