// ld_fsm_par -- FSM of the M-times parallel LD bit-stream generator.
//
// The non-parallel FSM has 2^N states and selects one input bit per state. The
// parallel FSM folds M consecutive states into one: it has 2^N/M states and in
// state s outputs M select codes, sel[j] being the code of stream position
// s*M + j. One full stream therefore takes 2^N/M cycles instead of 2^N. Codes
// follow the interval rule on Sobol sequence DIM, exactly as in ld_fsm, so the
// parallel stream, read in the order sel[0], sel[1], ..., equals the serial one.
//
// State register: binary encoded, N - log2(M) bits, asynchronous active-low
// reset and synchronous `clear` to state 0, advances when `en` is high (this
// design's choices). `sel` is combinational from the state.
module ld_fsm_par #(
  parameter int unsigned N     = 8,
  parameter int unsigned M     = 8,   // level of parallelism, power of two
  parameter int unsigned DIM   = 1,
  parameter int unsigned SEL_W = $clog2(N + 1),
  parameter int unsigned SW    = N - $clog2(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  output logic [SW-1:0]           state,
  output logic [M-1:0][SEL_W-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= state + 1'b1;
  end

  ld_sel_rom #(.N(N), .DIM(DIM), .M(M)) u_rom (.state, .sel);

endmodule
