// rem_csa: divisor multiple mux (DMUX) and full-width carry-save adder.
//
// Given the incoming shifted remainder in carry-save form (sum, car) and the
// quotient digit q chosen for it, produces the next shifted remainder
//   2 * (sum + car - q * D)
// again in carry-save form.  The DMUX selects ~D (with a carry-in of 1 in the
// free least significant carry position) for q = +1, D for q = -1 and 0 for
// q = 0.  The multiply by 2 is wiring; the bit that leaves the top is dropped,
// which is safe because the value always lies in [-2D, 2D] (the document's
// trimmed datapath).  Combinational.
module rem_csa
  import srt_pkg::*;
#(
  parameter int W = REM_W
) (
  input  logic [W-1:0] sum,
  input  logic [W-1:0] car,
  input  logic [W-1:0] divisor,
  input  qdig_t        q,
  output logic [W-1:0] sum_next,
  output logic [W-1:0] car_next
);
  logic [W-1:0] m, xs, cy;
  logic         cin;

  always_comb begin
    unique case (q)
      Q_POS:   m = ~divisor;
      Q_NEG:   m = divisor;
      default: m = '0;
    endcase
    cin = (q == Q_POS);
    xs  = sum ^ car ^ m;
    cy  = (sum & car) | (sum & m) | (car & m);
    sum_next = {xs[W-2:0], 1'b0};
    car_next = {cy[W-3:0], cin, 1'b0};
  end
endmodule
