// ld_sel_rom -- constant state-to-select map shared by the LD bit-stream FSMs.
//
// The stream has 2^L positions (L = N normally; L > N gives the longer streams
// of the full-precision multiplier without rotation). For an FSM that
// produces M stream bits per state (M = 1 for the plain
// generator, M > 1 for the parallel one), state s covers stream positions
// s*M .. s*M+M-1 and sel[j] is the interval-rule select code of position s*M+j
// for Sobol dimension DIM (see ld_pkg). The table is computed at elaboration;
// in hardware it is pure combinational decode logic of the state register,
// i.e. the output logic of the Moore FSM. No clock, no latency.
module ld_sel_rom #(
  parameter int unsigned N     = 8,
  parameter int unsigned L     = N,   // log2 of the stream length, L >= N
  parameter int unsigned DIM   = 1,
  parameter int unsigned M     = 1,   // stream bits per state, power of two
  parameter int unsigned SEL_W = $clog2(N + 1),
  parameter int unsigned SW    = L - $clog2(M)  // state index width
) (
  input  logic [SW-1:0]             state,
  output logic [M-1:0][SEL_W-1:0]   sel
);

  // The table is built in chunks of at most 2^10 positions so that long
  // streams (L up to 16) stay within what elaboration tools evaluate.
  localparam int unsigned CL   = (L > 10) ? 10 : L;
  localparam int unsigned NCH  = 1 << (L - CL);
  localparam int unsigned CPOS = 1 << CL;
  localparam int unsigned LW   = CL - $clog2(M);   // state bits inside a chunk

  typedef logic [CPOS*SEL_W-1:0] chunk_t;

  function automatic chunk_t build_chunk(int unsigned c);
    chunk_t t;
    ld_pkg::dirs_t d;
    d = ld_pkg::sobol_dirs(DIM);
    t = '0;
    for (int unsigned k = 0; k < CPOS; k++)
      t[k*SEL_W +: SEL_W] =
        SEL_W'(ld_pkg::select_of_point(ld_pkg::sobol_point(d, c * CPOS + k), N));
    return t;
  endfunction

  logic [NCH-1:0][M-1:0][SEL_W-1:0] chunk_sel;

  for (genvar c = 0; c < NCH; c++) begin : g_chunk
    localparam chunk_t SEL_TABLE = build_chunk(c);
    assign chunk_sel[c] = SEL_TABLE[state[LW-1:0]*(M*SEL_W) +: M*SEL_W];
  end

  if (NCH == 1) begin : g_one
    assign sel = chunk_sel[0];
  end else begin : g_many
    assign sel = chunk_sel[state[SW-1:LW]];
  end

  initial begin
    assert (N >= 1 && L >= N && L <= ld_pkg::MAX_N) else $fatal(1, "ld_sel_rom: N or L out of range");
    assert (DIM >= 1 && DIM <= ld_pkg::MAX_DIM) else $fatal(1, "ld_sel_rom: DIM out of range");
    assert (M >= 1 && (1 << $clog2(M)) == M && M < CPOS)
      else $fatal(1, "ld_sel_rom: M must be a power of two below min(2^L, 2^10)");
  end

endmodule
