// ld_fsm -- the 2^N-state finite state machine of the FSM-based LD bit-stream
// generator.
//
// The FSM visits its states in a fixed cycle 0, 1, ..., 2^N-1, 0, ... and is a
// Moore machine: in state k it outputs the select code of the interval rule computed
// from the k-th point of Sobol sequence DIM (see ld_pkg). Select code i < N
// picks input bit x_i, code N picks the constant 0. Over one period x_i is
// picked exactly 2^i times. The state-to-select map is a constant table
// (ld_sel_rom) built at elaboration, so a different DIM gives a different,
// independent pattern with the same hardware shape; as in the method the
// pattern is fixed once implemented.
//
// The state is held binary-encoded in an N-bit register; this encoding, the
// asynchronous active-low reset to state 0, the synchronous `clear` and the
// `en` stall input (used by the rotation multiplier) are this design's choices.
//
// L = N is the normal case. With L > N the FSM has 2^L states and makes a
// 2^L-bit stream from N-bit data (x_i picked 2^(L-N+i) times); this is the
// full-precision variant that needs no rotation but grows exponentially.
//
// Timing: `sel` is combinational from the state register, so the select code
// of state k is valid during the cycle the FSM sits in state k. With en = 1 the
// state advances on every rising clock edge; `clear` has priority over `en`.
module ld_fsm #(
  parameter int unsigned N     = 8,  // data precision in bits
  parameter int unsigned DIM   = 1,  // Sobol dimension that defines the pattern
  parameter int unsigned L     = N,  // log2 of the number of states, L >= N
  parameter int unsigned SEL_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [L-1:0]     state,
  output logic [SEL_W-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= state + 1'b1;
  end

  ld_sel_rom #(.N(N), .L(L), .DIM(DIM), .M(1)) u_rom (.state, .sel);

endmodule
