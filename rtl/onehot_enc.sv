// onehot_enc -- one-hot encoder placed after a shared LD FSM.
//
// Turns the FSM's select code into N one-hot lines: oh[i] is high when the
// code selects input bit x_i. The code N (the "constant 0" state) drives no
// line, so all lines are low then. Combinational. One encoder is shared by all
// the probability conversion circuits fed from the same FSM, which moves the
// decoding out of each per-input multiplexer.
module onehot_enc #(
  parameter int unsigned N     = 8,
  parameter int unsigned SEL_W = $clog2(N + 1)
) (
  input  logic [SEL_W-1:0] sel,
  output logic [N-1:0]     oh
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      oh[i] = (sel == SEL_W'(i));
  end

endmodule
