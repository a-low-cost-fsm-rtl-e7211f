// ld_sc_top -- the FSM-based LD bit-stream generation designs side by side.
//
// Four independent units, each with its own ports:
//   conv_*  sc_conv      K x K convolution, FSM + one-hot encoder + PCC
//                        generation with two shared Sobol patterns, AND-gate
//                        multipliers, binary accumulation (2^N cycles).
//   mul_*   sc_mult_rot  I-input full-precision multiplier, one 2^N-state
//                        FSM generator per input, rotation by stalling
//                        (2^(I*N) cycles, exact product).
//   par_*   ld_bsg_par   M-times parallel generator, M stream bits per cycle.
//   nmr_*   ld_bsg_nmr   NR-modular-redundant generator with majority voting
//                        and soft-error injection inputs.
// They share only the clock and the asynchronous active-low reset. Defaults
// follow the evaluated configurations: 8-bit data, 3 x 3 kernel, 2-input
// multiplier, 8x parallelism, 5 copies.
module ld_sc_top #(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 3,
  parameter int unsigned I  = 2,
  parameter int unsigned M  = 8,
  parameter int unsigned NR = 5,
  parameter int unsigned ACC_W = N + $clog2(K * K + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // convolution
  input  logic                    conv_start,
  input  logic [K*K-1:0][N-1:0]   conv_act,
  input  logic [K*K-1:0][N-1:0]   conv_wgt,
  output logic                    conv_busy,
  output logic                    conv_done,
  output logic [ACC_W-1:0]        conv_result,
  // rotation multiplier
  input  logic                    mul_start,
  input  logic [I-1:0][N-1:0]     mul_x,
  output logic                    mul_valid,
  output logic                    mul_last,
  output logic                    mul_bit,
  output logic [I-1:0]            mul_stall,
  // parallel generator
  input  logic                    par_clear,
  input  logic                    par_en,
  input  logic [N-1:0]            par_x,
  output logic [N-$clog2(M)-1:0]  par_idx,
  output logic [M-1:0]            par_bits,
  // redundant generator
  input  logic                    nmr_clear,
  input  logic                    nmr_en,
  input  logic [N-1:0]            nmr_x,
  input  logic [NR-1:0][N-1:0]    nmr_flip_state,
  input  logic [NR-1:0]           nmr_flip_out,
  output logic [N-1:0]            nmr_idx,
  output logic                    nmr_bit
);

  sc_conv #(.N(N), .K(K)) u_conv (
    .clk, .rst_n, .start(conv_start), .act(conv_act), .wgt(conv_wgt),
    .busy(conv_busy), .done(conv_done), .result(conv_result)
  );

  sc_mult_rot #(.N(N), .I(I)) u_mul (
    .clk, .rst_n, .start(mul_start), .x(mul_x),
    .valid(mul_valid), .last(mul_last), .prod_bit(mul_bit), .stall(mul_stall)
  );

  ld_bsg_par #(.N(N), .M(M), .DIM(1)) u_par (
    .clk, .rst_n, .clear(par_clear), .en(par_en), .x(par_x),
    .idx(par_idx), .bits(par_bits)
  );

  ld_bsg_nmr #(.N(N), .DIM(1), .NR(NR)) u_nmr (
    .clk, .rst_n, .clear(nmr_clear), .en(nmr_en), .x(nmr_x),
    .flip_state(nmr_flip_state), .flip_out(nmr_flip_out),
    .idx(nmr_idx), .bit_o(nmr_bit)
  );

endmodule
