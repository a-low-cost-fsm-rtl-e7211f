// ld_pkg -- shared constants and elaboration-time functions for the FSM-based
// low-discrepancy (LD) bit-stream generators.
//
// An N-bit binary value X is turned into a 2^N-bit stream in which bit x_i of X
// appears exactly 2^i times. An FSM steps through 2^N states; in state k it
// points an (N+1)-to-1 multiplexer at one bit of X (or at a constant 0). The
// order in which bits are picked is derived, once and offline, from the first
// 2^N points S_k of a Sobol sequence:
//
//   S_k in [1 - 2^-(m-1), 1 - 2^-m), m = 1..N   ->  select x_(N-m)
//   S_k = 1 - 2^-N (all N fraction bits set)     ->  select the constant 0
//
// Seen on the N-bit fraction of S_k this is: count its leading ones c; select
// x_(N-1-c), or the constant 0 when c = N. The functions below compute that
// select code for every state at elaboration time, so the hardware holds only
// a fixed state-to-select map and no Sobol generator.
//
// Sobol points are generated in natural (non-Gray) order: S_k is the XOR of the
// direction numbers v_j for every bit j set in k. Dimension 1 is the bit-reversed
// counter (van der Corput); dimension 2 uses the primitive polynomial x+1 with
// m_1 = 1. These two reproduce the two 16-point example sequences of the method
// exactly. A stream may also be longer than 2^N: with 2^L states (L > N) the
// first 2^L points are used with the same N intervals, and x_i is then picked
// 2^(L-N+i) times. Dimensions 3 to 10 use the widely published Joe-Kuo direction
// numbers; they are this design's choice and are only required to be valid
// Sobol sequences (every N-bit value appears once in the first 2^N points).
package ld_pkg;

  // Widest precision the elaboration functions support.
  localparam int unsigned MAX_N = 16;
  // Number of Sobol dimensions (independent LD patterns) available.
  localparam int unsigned MAX_DIM = 10;

  // Direction numbers v_1..v_MAX_N of Sobol dimension dim, each aligned as a
  // MAX_N-bit fraction (v_j = m_j / 2^j). Entry j-1 holds v_j.
  typedef logic [MAX_N-1:0][MAX_N-1:0] dirs_t;

  function automatic dirs_t sobol_dirs(int unsigned dim);
    int unsigned s, a;
    int unsigned m [MAX_N+1];
    dirs_t d;
    s = 1;
    a = 0;
    for (int i = 0; i <= MAX_N; i++) m[i] = 1;
    // Primitive polynomial degree s, coefficients a, initial m_1..m_s.
    case (dim)
      2:  begin s = 1; a = 0; end
      3:  begin s = 2; a = 1; m[2] = 3; end
      4:  begin s = 3; a = 1; m[2] = 3; m[3] = 1; end
      5:  begin s = 3; a = 2; m[2] = 1; m[3] = 1; end
      6:  begin s = 4; a = 1; m[2] = 1; m[3] = 3; m[4] = 3; end
      7:  begin s = 4; a = 4; m[2] = 3; m[3] = 5; m[4] = 13; end
      8:  begin s = 5; a = 2; m[2] = 1; m[3] = 5; m[4] = 5; m[5] = 17; end
      9:  begin s = 5; a = 4; m[2] = 1; m[3] = 5; m[4] = 5; m[5] = 5; end
      10: begin s = 5; a = 7; m[2] = 1; m[3] = 7; m[4] = 11; m[5] = 19; end
      default: ;
    endcase
    // Recurrence m_i = 2^s m_(i-s) ^ m_(i-s) ^ sum_j 2^j a_j m_(i-j).
    // Dimension 1 keeps m_i = 1 for every i.
    if (dim >= 2) begin
      for (int unsigned i = s + 1; i <= MAX_N; i++) begin
        int unsigned v;
        v = (m[i-s] << s) ^ m[i-s];
        for (int unsigned j = 1; j < s; j++)
          if (((a >> (s - 1 - j)) & 1) == 1) v = v ^ (m[i-j] << j);
        m[i] = v;
      end
    end
    for (int unsigned j = 1; j <= MAX_N; j++)
      d[j-1] = MAX_N'(m[j]) << (MAX_N - j);
    return d;
  endfunction

  // k-th point of the sequence with direction numbers d, as a MAX_N-bit
  // fraction (natural order: XOR of v_j for every bit j-1 set in k).
  function automatic logic [MAX_N-1:0] sobol_point(dirs_t d, int unsigned k);
    logic [MAX_N-1:0] x;
    x = '0;
    for (int unsigned j = 0; j < MAX_N; j++)
      if (((k >> j) & 1) == 1) x = x ^ d[j];
    return x;
  endfunction

  // Interval rule for n-bit data: select code of a Sobol point p (MAX_N-bit
  // fraction). Leading ones c of p: select x_(n-1-c), or n when c >= n.
  function automatic int unsigned select_of_point(logic [MAX_N-1:0] p, int unsigned n);
    int unsigned lead;
    bit          run;
    lead = 0;
    run  = 1'b1;
    for (int i = MAX_N - 1; i >= 0; i--) begin
      if (run && p[i]) lead++;
      else run = 1'b0;
    end
    return (lead >= n) ? n : (n - 1 - lead);
  endfunction

  // Bitwise majority of an odd number of votes held in the low `count` bits.
  function automatic logic majority(logic [15:0] votes, int unsigned count);
    int unsigned ones;
    ones = 0;
    for (int unsigned i = 0; i < count; i++) ones += votes[i];
    return (ones > count / 2);
  endfunction

endpackage
