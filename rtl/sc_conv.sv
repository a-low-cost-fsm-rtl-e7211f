// sc_conv -- stochastic-computing K x K convolution with FSM-based LD
// bit-stream generation (FSM + one-hot encoder + PCC per input).
//
// The K*K activations and the K*K weights (N-bit unsigned fractions) are
// converted to LD bit-streams by two ld_shared_conv units: all activations use
// Sobol pattern 1, all weights pattern 2, so only two 2^N-state FSMs and two
// one-hot encoders exist. Each product is one AND gate per activation/weight
// pair. The accumulation is done in the binary domain: every cycle the ones
// among the K*K product bits are counted and added to an accumulator. Because
// accumulation is binary, the K*K products need not be independent of each
// other, which is what allows the two patterns to be shared. USE_PCC = 0
// replaces the one-hot encoders and PCCs by one 9-to-1 MUX per input fed by
// the same two FSMs (same results, larger per-input cost).
//
// After 2^N cycles result ~= sum_j act[j] * wgt[j] / 2^N. Each product stream
// has the error of one 2^N-bit LD multiplication; the stream length (one
// period of the FSMs), the unsigned data format and the accumulator width
// N + clog2(K*K+1) are this design's choices.
//
// Timing: a one-cycle `start` pulse clears the accumulator and restarts both
// FSMs; `busy` is high for the next 2^N cycles, then `done` pulses for one
// cycle and `result` holds until the next start. Inputs must be stable while
// busy.
module sc_conv #(
  parameter int unsigned N = 8,  // data precision
  parameter int unsigned K = 3,  // kernel size (K x K)
  parameter bit          USE_PCC = 1'b1,  // 1: FSM + one-hot + PCC, 0: FSM + MUX per input
  parameter int unsigned ACC_W = N + $clog2(K * K + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [K*K-1:0][N-1:0]     act,
  input  logic [K*K-1:0][N-1:0]     wgt,
  output logic                      busy,
  output logic                      done,
  output logic [ACC_W-1:0]          result
);

  localparam int unsigned P  = K * K;
  localparam int unsigned PW = $clog2(P + 1);

  logic [P-1:0]  a_bits, w_bits, prod;
  logic [N-1:0]  a_idx, w_idx;
  logic [PW-1:0] ones;

  ld_shared_conv #(.N(N), .DIM(1), .NUM_IN(P), .USE_PCC(USE_PCC)) u_act (
    .clk, .rst_n, .clear(start), .en(busy), .x(act), .idx(a_idx), .bits(a_bits)
  );
  ld_shared_conv #(.N(N), .DIM(2), .NUM_IN(P), .USE_PCC(USE_PCC)) u_wgt (
    .clk, .rst_n, .clear(start), .en(busy), .x(wgt), .idx(w_idx), .bits(w_bits)
  );

  assign prod = a_bits & w_bits;

  always_comb begin
    ones = '0;
    for (int unsigned j = 0; j < P; j++) ones += PW'(prod[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        result <= '0;
      end else if (busy) begin
        result <= result + ACC_W'(ones);
        if (&a_idx) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Both FSMs always move together.
  a_w_lockstep: assert property (@(posedge clk) disable iff (!rst_n) a_idx == w_idx);

endmodule
