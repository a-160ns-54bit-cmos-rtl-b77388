// quot_shift_reg: asynchronous shift register that collects the quotient
// digits produced by one ring stage.
//
// Each cell holds one triple-monotonic digit on three C-elements (document
// Figure 2).  The C-element for wire k of cell i has inputs "wire k of cell
// i-1" and "cell i+1 is empty" (the NOR of cell i+1, the inverted
// acknowledge).  A digit therefore ripples forward until it meets an
// occupied cell, a spacer (all wires low) behind it wipes the copies it left,
// and while no spacer follows, every cell behind the newest digit keeps a copy
// of it, which is how an early finish leaves the repeating digits in place.
// The last cell's acknowledge input is tied to "empty", so it keeps the first
// digit it receives.
//
// Because a digit and its spacer occupy two cells, N_DIG digits need
// DEPTH = 2*N_DIG - 1 cells; after the register has filled, digit j sits in
// cell DEPTH-1-2j.  The cell count is this design's choice: the document does
// not give it.
//
// `ack` is the entry cell's NOR: high when a new digit may be offered.
// `stable` is high when no C-element is about to change, i.e. every digit
// has reached its place.  `clr` empties the register (the Reset from the
// control logic).  One clock edge stands for one C-element transition.
module quot_shift_reg
  import srt_pkg::*;
#(
  parameter int N_DIG = N_ITERS,
  parameter int DEPTH = 2 * N_DIG - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  qdig_t din,
  output logic  ack,
  output qdig_t digits [N_DIG],
  output logic  stable
);
  qdig_t cells    [DEPTH];
  qdig_t cells_in  [DEPTH];
  logic  ack_next [DEPTH];   // "cell i+1 is empty", input of cell i's C-elements
  logic  [DEPTH-1:0] cells_stable;

  for (genvar i = 0; i < DEPTH; i++) begin : g_cell
    if (i == 0) begin : g_first
      assign cells_in[i] = din;
    end else begin : g_mid
      assign cells_in[i] = cells[i-1];
    end
    if (i == DEPTH - 1) begin : g_last
      assign ack_next[i] = 1'b1;
    end else begin : g_notlast
      assign ack_next[i] = ~|cells[i+1];
    end

    for (genvar k = 0; k < 3; k++) begin : g_wire
      c_element u_c (
        .clk  (clk),
        .rst_n(rst_n),
        .clr  (clr),
        .a    (cells_in[i][k]),
        .b    (ack_next[i]),
        .c    (cells[i][k])
      );
    end

    // a C-element is about to change when both inputs differ from its output
    assign cells_stable[i] =
      ~|(( cells_in[i] & {3{ ack_next[i]}} & ~cells[i]) |
         (~cells_in[i] & {3{~ack_next[i]}} &  cells[i]));
  end

  for (genvar j = 0; j < N_DIG; j++) begin : g_out
    assign digits[j] = cells[DEPTH-1-2*j];
  end

  assign ack    = ~|cells[0];
  assign stable = &cells_stable;

endmodule
