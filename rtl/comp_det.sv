// comp_det: completion detector for a group of dual-monotonic wire pairs.
//
// `done` is high when every pair has evaluated (one wire of each pair high),
// `empty` when every pair is back in reset (both wires low).  The document
// states the function (local done signals from NOR gates on the wire pairs)
// but not the gate network, so this is written as a plain reduction.
// Combinational.
module comp_det #(
  parameter int WIDTH = 111   // pairs watched: 55 + 55 remainder bits and the force flag
) (
  input  logic [WIDTH-1:0] t,
  input  logic [WIDTH-1:0] f,
  output logic             done,
  output logic             empty
);
  assign done  = &(t | f);
  assign empty = ~|(t | f);
endmodule
