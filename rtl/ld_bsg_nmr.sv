// ld_bsg_nmr -- NR-modular-redundant FSM-based LD bit-stream generator.
//
// Soft errors in the generator's state register corrupt a whole stream, so the
// generator is replicated NR times (NR odd; 3 and 5 in the evaluation) and
// majority gates vote between the copies. Each copy has its own N-bit state
// register, its own state-to-select decode and its own (N+1)-to-1 MUX. Voting
// happens at two points (this design's reading of "vote between copies"):
//   * the state registers are voted bitwise and every copy loads the
//     successor of the voted state, so a flipped copy is repaired at the next
//     clock edge;
//   * the NR stream bits are voted to form the output bit, so a copy that is
//     wrong in the current cycle is outvoted.
// Test inputs flip_state and flip_out XOR an error into a copy's next state or
// its output bit, to inject soft errors; tie them to zero in normal use.
//
// Timing and control as in ld_bsg: `clear` restarts at position 0, `en`
// advances, bit_o is combinational from the registers and the input x.
module ld_bsg_nmr #(
  parameter int unsigned N   = 8,
  parameter int unsigned DIM = 1,
  parameter int unsigned NR  = 5   // number of copies, odd, at most 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic [N-1:0]         x,
  input  logic [NR-1:0][N-1:0] flip_state,
  input  logic [NR-1:0]        flip_out,
  output logic [N-1:0]         idx,        // voted state
  output logic                 bit_o
);

  localparam int unsigned SEL_W = $clog2(N + 1);

  logic [NR-1:0][N-1:0] state;
  logic [NR-1:0]        copy_bit;
  logic [N-1:0]         voted;
  logic [N-1:0]         nxt;

  always_comb begin
    for (int unsigned b = 0; b < N; b++) begin
      logic [15:0] v;
      v = '0;
      for (int unsigned r = 0; r < NR; r++) v[r] = state[r][b];
      voted[b] = ld_pkg::majority(v, NR);
    end
  end

  always_comb begin
    if (clear)   nxt = '0;
    else if (en) nxt = voted + 1'b1;
    else         nxt = voted;
  end

  for (genvar r = 0; r < NR; r++) begin : g_copy
    logic [SEL_W-1:0] sel;
    logic             mux_bit;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) state[r] <= '0;
      else        state[r] <= nxt ^ flip_state[r];
    end

    ld_sel_rom #(.N(N), .DIM(DIM), .M(1)) u_rom (.state(state[r]), .sel);
    ld_mux     #(.N(N))                    u_mux (.x, .sel, .bit_o(mux_bit));

    assign copy_bit[r] = mux_bit ^ flip_out[r];
  end

  always_comb bit_o = ld_pkg::majority(16'(copy_bit), NR);
  assign idx = voted;

  initial assert (NR % 2 == 1 && NR <= 15) else $fatal(1, "ld_bsg_nmr: NR must be odd and <= 15");

endmodule
