// quot_resolve: final remainder sign and quotient conversion.
//
// After the ring stops, the bundle left in the last stage holds the shifted
// remainder 2P_54 (carry-save) and the last digit q_54.  This block forms
// the final remainder P_55 = 2P_54 - q_54*D with one carry-propagate add,
// and converts the signed-digit quotient to binary.  The ring is started with
// the leading digit already fixed at +1 (see srt_divider), so the quotient is
//   1 + sum_k q_k 2^-(k+1),  k = 0 .. Q_W-1,
// formed here as 2^Q_W + plus - minus on Q_W+1 bits, where the plus and minus
// vectors mark the digits +1 and -1.  If P_55 is negative
// the quotient is decremented at its last position and D is added back to
// the remainder.  The outputs satisfy
//   dividend * 2^Q_W = quotient * divisor + remainder,
//   0 <= remainder < divisor
// with dividend and divisor read as MANT_W-bit integers.  The document gives
// this step's function (a CLA for the sign, a carry-select adder for the
// decrement and conversion) but not its insides, so it is written as plain
// adders.  It does not round to a target format: the document does not say
// which rounding is wanted, and `rem_zero` is the sticky information a
// rounder needs.  Combinational.
module quot_resolve
  import srt_pkg::*;
(
  input  logic [Q_W-1:0]    qpos,      // bit Q_W-1-k is high when q_k = +1
  input  logic [Q_W-1:0]    qneg,      // bit Q_W-1-k is high when q_k = -1
  input  ring_state_t       last,      // bundle left in the last stage
  input  logic [REM_W-1:0]  divisor,
  output logic [Q_W:0]      quotient,
  output logic [MANT_W-1:0] remainder,
  output logic              rem_neg,   // the decrement was applied
  output logic              rem_zero
);
  logic [REM_W-1:0] m, p_fin, p_fix;
  logic             cin;

  always_comb begin
    unique case (last.q)
      Q_POS:   m = ~divisor;
      Q_NEG:   m = divisor;
      default: m = '0;
    endcase
    cin      = (last.q == Q_POS);
    p_fin    = last.sum + last.car + m + REM_W'(cin);
    rem_neg  = p_fin[REM_W-1];
    p_fix    = rem_neg ? p_fin + divisor : p_fin;
    quotient = {1'b1, {Q_W{1'b0}}} + {1'b0, qpos} - {1'b0, qneg}
               - (Q_W+1)'(rem_neg);
    remainder = p_fix[MANT_W-1:0];
    rem_zero = (p_fix == '0);
  end
endmodule
