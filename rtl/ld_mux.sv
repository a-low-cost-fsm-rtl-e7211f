// ld_mux -- the (N+1)-to-1 multiplexer of the FSM-based LD bit-stream
// generator.
//
// The N bits of the binary input are the first N data inputs; the extra input
// N is tied to 0, so the FSM can emit a 0 regardless of the input (the state
// whose Sobol point is 1 - 2^-N). Purely combinational: bit_o follows x and
// sel in the same cycle. Select codes above N also give 0 (they never occur).
module ld_mux #(
  parameter int unsigned N     = 8,
  parameter int unsigned SEL_W = $clog2(N + 1)
) (
  input  logic [N-1:0]     x,
  input  logic [SEL_W-1:0] sel,
  output logic             bit_o
);

  always_comb begin
    bit_o = 1'b0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SEL_W'(i)) bit_o = x[i];
  end

endmodule
