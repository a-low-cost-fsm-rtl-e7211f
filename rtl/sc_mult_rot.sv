// sc_mult_rot -- I-input full-precision stochastic multiplier built from
// FSM-based LD generators and the rotation method.
//
// Each input x[k] (N bits) has its own ld_bsg of 2^N states using Sobol
// sequence k+1, and the I streams are ANDed (an AND gate multiplies
// stochastic streams). To reach the full I*N-bit output precision without
// 2^(I*N)-state FSMs, the streams are rotated by stalling: generator 1 runs
// freely with period 2^N, generator k (k = 2..I, counted from 1) holds its
// state for one cycle every 2^((k-1)N) cycles. Over the 2^(I*N)-cycle product
// stream every combination of the I streams' bit positions then occurs exactly
// once, so the number of ones in the product stream is exactly the product of
// the inputs: sum(prod_bit) = x[0] * x[1] * ... * x[I-1].
//
// With ROTATE = 0 the same hardware runs without stalls for one period of
// 2^N cycles: the limited-precision multiplier, whose output has only N-bit
// precision (the stall logic and the wider counter are then not built).
//
// Interface and timing (this design's choices): a one-cycle `start` pulse
// restarts all generators and the cycle counter; from the next cycle on
// `valid` is high for 2^(I*N) cycles (2^N without rotation) and `prod_bit` carries one product bit per
// cycle, `last` marking the final one. The stall of generator k is taken in
// the cycle whose count has its low (k-1)N bits all ones, so its state repeats
// in the following cycle. The inputs must stay stable while `valid` is high.
module sc_mult_rot #(
  parameter int unsigned N = 8,  // precision of each input
  parameter int unsigned I = 2,  // number of inputs
  parameter bit          ROTATE = 1'b1  // 1: full precision, 0: limited (2^N cycles)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [I-1:0][N-1:0] x,
  output logic                valid,
  output logic                last,
  output logic                prod_bit,
  output logic [I-1:0]        stall      // generator k stalls this cycle
);

  localparam int unsigned CW = ROTATE ? I * N : N;

  logic [CW-1:0] cnt;
  logic [I-1:0]  streams;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      cnt   <= '0;
    end else if (start) begin
      valid <= 1'b1;
      cnt   <= '0;
    end else if (valid) begin
      cnt <= cnt + 1'b1;
      if (last) valid <= 1'b0;
    end
  end

  assign last = valid && (&cnt);

  always_comb begin
    stall = '0;
    for (int unsigned k = 1; k < I && ROTATE; k++) begin
      logic [CW-1:0] mask;
      mask = {CW{1'b1}} >> (CW - k * N);
      stall[k] = valid && ((cnt & mask) == mask);
    end
  end

  for (genvar k = 0; k < I; k++) begin : g_gen
    logic [N-1:0] idx_unused;
    ld_bsg #(.N(N), .DIM(k + 1)) u_bsg (
      .clk, .rst_n,
      .clear(start),
      .en   (valid && !stall[k]),
      .x    (x[k]),
      .idx  (idx_unused),
      .bit_o(streams[k])
    );
  end

  assign prod_bit = valid && (&streams);

  initial assert (I >= 1 && I <= ld_pkg::MAX_DIM) else $fatal(1, "sc_mult_rot: I out of range");

endmodule
