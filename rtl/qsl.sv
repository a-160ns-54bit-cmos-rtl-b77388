// qsl: radix-2 SRT quotient digit selection with force-ahead.
//
// Input `est` is the 3-bit approximation of the shifted partial remainder
// (two's complement, unit 1/2, so -4..+3 stands for -2.0..+1.5) and `frc_in`
// is the force flag set by the previous stage.  Following the document:
//   q = +1  if est >= 0  and frc_in = 0
//   q =  0  if est = -1  and frc_in = 0
//   q = -1  if est <= -2 or  frc_in = 1
//   frc_out = 1 if est = -4, or if frc_in = 1 and the sign bit of est is 0.
// The second term of frc_out catches a remainder so negative that its
// approximation wrapped round to a positive-looking value (the sign bit
// "fell off" the trimmed 3-bit adder); such a remainder needs the next digit
// forced to -1 as well.  Combinational; the digit leaves triple-monotonic.
module qsl
  import srt_pkg::*;
#(
  parameter int EW = EST_W
) (
  input  logic [EW-1:0] est,
  input  logic          frc_in,
  output qdig_t         q,
  output logic          frc_out
);
  logic is_min, is_m1;
  assign is_min = est == {1'b1, {(EW-1){1'b0}}};   // most negative value (-4)
  assign is_m1  = &est;                              // -1

  always_comb begin
    if (frc_in || (est[EW-1] && !is_m1)) q = Q_NEG;
    else if (is_m1)                       q = Q_ZERO;
    else                                  q = Q_POS;
  end

  assign frc_out = is_min || (frc_in && !est[EW-1]);
endmodule
