// ld_bsg -- FSM-based low-discrepancy bit-stream generator.
//
// Converts an N-bit binary value x into a 2^N-bit LD stochastic bit-stream,
// one bit per clock: an ld_fsm walks its 2^N states and drives the select of an
// (N+1)-to-1 ld_mux whose data inputs are the bits of x and a constant 0. Each
// period of 2^N bits holds exactly x ones, spread the way the chosen Sobol
// sequence spreads its points, so streams made with different DIM are
// independent and an AND of two of them multiplies accurately.
//
// With L > N the stream is 2^L bits long and holds x * 2^(L-N) ones (the
// full-precision variant: two such streams of different DIM with L = 2N
// multiply exactly).
//
// Interface: x must stay stable while a stream is produced (it feeds the MUX
// directly, as in the method). `clear` restarts at stream bit 0, `en` = 0 stalls
// the stream (the current bit is repeated). `idx` is the position of the
// current bit within the period; `bit_o` is valid in the same cycle.
module ld_bsg #(
  parameter int unsigned N   = 8,
  parameter int unsigned DIM = 1,
  parameter int unsigned L   = N   // log2 of the stream length, L >= N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] x,
  output logic [L-1:0] idx,
  output logic         bit_o
);

  localparam int unsigned SEL_W = $clog2(N + 1);

  logic [SEL_W-1:0] sel;

  ld_fsm #(.N(N), .DIM(DIM), .L(L)) u_fsm (
    .clk, .rst_n, .clear, .en, .state(idx), .sel
  );

  ld_mux #(.N(N)) u_mux (.x, .sel, .bit_o);

endmodule
