// ld_bsg_par -- M-times parallel FSM-based LD bit-stream generator.
//
// An ld_fsm_par with 2^N/M states drives M (N+1)-to-1 multiplexers that all
// see the same binary input x. Each cycle it emits M consecutive bits of the
// 2^N-bit LD stream: bits[j] is stream position idx*M + j. A full stream takes
// 2^N/M cycles and holds exactly x ones; the bits equal those of ld_bsg with
// the same N and DIM. x must stay stable while a stream is produced; `clear`
// restarts at position 0 and `en` = 0 holds the current group.
module ld_bsg_par #(
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 8,
  parameter int unsigned DIM = 1,
  parameter int unsigned SW  = N - $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [N-1:0]  x,
  output logic [SW-1:0] idx,
  output logic [M-1:0]  bits
);

  localparam int unsigned SEL_W = $clog2(N + 1);

  logic [M-1:0][SEL_W-1:0] sel;

  ld_fsm_par #(.N(N), .M(M), .DIM(DIM)) u_fsm (
    .clk, .rst_n, .clear, .en, .state(idx), .sel
  );

  for (genvar j = 0; j < M; j++) begin : g_mux
    ld_mux #(.N(N)) u_mux (.x, .sel(sel[j]), .bit_o(bits[j]));
  end

endmodule
