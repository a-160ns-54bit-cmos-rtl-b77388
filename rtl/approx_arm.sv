// approx_arm: one arm of the replicated remainder approximation.
//
// Each stage computes, ahead of knowing its incoming quotient digit, the
// top bits of the next shifted remainder for every digit it might receive.
// An arm takes the top EW+1 columns (bits REM_W-2 .. REM_W-EW-2) of the
// incoming sum and carry vectors and of one divisor multiple, reduces them
// with a short carry-save adder and adds the resulting sum and carry bits
// with an EW-bit carry-propagate adder.  The result is the EW-bit
// approximation of 2*(sum + carry + multiple), i.e. what the 55-bit CSA will
// produce, truncated.  The zero-digit arm has no CSA (HAS_CSA = 0): it adds
// the incoming sum and carry bits directly.  The document gives this
// structure (3-bit CSA followed by 3-bit CPA, no CSA on the zero arm);
// the column bookkeeping is this design's.  Combinational.
module approx_arm
  import srt_pkg::*;
#(
  parameter int EW      = EST_W,
  parameter bit HAS_CSA = 1'b1
) (
  input  logic [EW:0]   s_top,   // incoming sum bits REM_W-2 .. REM_W-EW-2
  input  logic [EW:0]   c_top,   // incoming carry bits, same columns
  input  logic [EW:0]   m_top,   // divisor multiple, same columns (ignored if HAS_CSA = 0)
  output logic [EW-1:0] est
);
  logic [EW:0] xs, cy;
  always_comb begin
    if (HAS_CSA) begin
      xs  = s_top ^ c_top ^ m_top;
      cy  = (s_top & c_top) | (s_top & m_top) | (c_top & m_top);
      // sum bits of the upper EW columns; carries out of the EW columns below
      est = xs[EW:1] + cy[EW-1:0];
    end else begin
      xs  = '0;
      cy  = '0;
      est = s_top[EW:1] + c_top[EW:1];
    end
  end
endmodule
