// pcc -- probability conversion circuit for one binary input.
//
// With the select decoded once into one-hot lines, converting an input needs
// only AND and OR gates: each bit x_i is ANDed with its one-hot line and the N
// products are ORed. The result equals the (N+1)-to-1 MUX output of ld_mux for
// the same select (0 when no line is high) at a lower gate cost per input.
// Combinational, no state. The exact gate arrangement (a flat AND-OR) is this
// design's choice.
module pcc #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] oh,
  output logic         bit_o
);

  assign bit_o = |(x & oh);

endmodule
