// ld_shared_conv -- converts NUM_IN binary inputs to LD bit-streams with one
// shared FSM and one shared one-hot encoder.
//
// When many inputs use the same LD pattern (their streams need not be
// independent of each other), a single ld_fsm and onehot_enc serve them all
// and each input only adds a pcc. Stream j is bit-for-bit the stream an ld_bsg
// with the same N and DIM would make from x[j]. Control and timing as in
// ld_bsg: `clear` restarts, `en` advances, bits are valid in the cycle the FSM
// sits in state idx. Inputs must be stable for the length of a stream.
module ld_shared_conv #(
  parameter int unsigned N      = 8,
  parameter int unsigned DIM    = 1,
  parameter int unsigned NUM_IN = 9,
  parameter bit          USE_PCC = 1'b1  // 1: one-hot encoder + PCCs, 0: one MUX per input
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic [NUM_IN-1:0][N-1:0] x,
  output logic [N-1:0]             idx,
  output logic [NUM_IN-1:0]        bits
);

  localparam int unsigned SEL_W = $clog2(N + 1);

  logic [SEL_W-1:0] sel;

  ld_fsm #(.N(N), .DIM(DIM)) u_fsm (.clk, .rst_n, .clear, .en, .state(idx), .sel);

  if (USE_PCC) begin : g_onehot
    logic [N-1:0] oh;
    onehot_enc #(.N(N)) u_oh (.sel, .oh);
    for (genvar j = 0; j < NUM_IN; j++) begin : g_pcc
      pcc #(.N(N)) u_pcc (.x(x[j]), .oh, .bit_o(bits[j]));
    end
  end else begin : g_mux
    for (genvar j = 0; j < NUM_IN; j++) begin : g_in
      ld_mux #(.N(N)) u_mux (.x(x[j]), .sel, .bit_o(bits[j]));
    end
  end

endmodule
