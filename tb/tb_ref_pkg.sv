// tb_ref_pkg -- reference model for the LD bit-stream testbenches, written
// independently of the RTL package.
//
// Sobol points are produced from direction vectors with the vector form of the
// recurrence, v_i = v_(i-s) ^ (v_(i-s) >> s) ^ XOR_j a_j v_(i-j), kept as
// 32-bit fractions. The select code follows the interval rule literally, by
// comparing the point against the interval bounds 1 - 2^-(m-1) and 1 - 2^-m.
package tb_ref_pkg;

  function automatic int unsigned ref_sobol(int unsigned dim, int unsigned l, int unsigned k);
    // Polynomial degree, coefficient bits and initial m values per dimension.
    int unsigned s, a;
    int unsigned minit [6];
    longint unsigned v [33];
    longint unsigned x;
    minit = '{1, 1, 1, 1, 1, 1};
    s = 0; a = 0;
    case (dim)
      2:  begin s = 1; a = 0; end
      3:  begin s = 2; a = 1; minit[2] = 3; end
      4:  begin s = 3; a = 1; minit[2] = 3; minit[3] = 1; end
      5:  begin s = 3; a = 2; minit[2] = 1; minit[3] = 1; end
      6:  begin s = 4; a = 1; minit[2] = 1; minit[3] = 3; minit[4] = 3; end
      7:  begin s = 4; a = 4; minit[2] = 3; minit[3] = 5; minit[4] = 13; end
      8:  begin s = 5; a = 2; minit[2] = 1; minit[3] = 5; minit[4] = 5; minit[5] = 17; end
      9:  begin s = 5; a = 4; minit[2] = 1; minit[3] = 5; minit[4] = 5; minit[5] = 5; end
      10: begin s = 5; a = 7; minit[2] = 1; minit[3] = 7; minit[4] = 11; minit[5] = 19; end
      default: ;
    endcase
    for (int i = 1; i <= 32; i++) begin
      if (dim == 1) v[i] = 64'd1 << (32 - i);
      else if (i <= int'(s)) v[i] = longint'(minit[i]) << (32 - i);
      else begin
        v[i] = v[i-s] ^ (v[i-s] >> s);
        for (int j = 1; j < int'(s); j++)
          if (a[s-1-j]) v[i] = v[i] ^ v[i-j];
      end
    end
    x = 0;
    for (int i = 1; i <= int'(l); i++)
      if (k[i-1]) x = x ^ v[i];
    return int'(x >> (32 - l));   // l-bit fraction
  endfunction

  // Interval rule on an l-bit Sobol fraction p, n-bit data: returns the index of
  // the selected input bit, or n for the constant-0 input.
  function automatic int unsigned ref_sel(int unsigned p, int unsigned n, int unsigned l);
    longint unsigned one;
    one = 64'd1 << l;
    for (int unsigned m = 1; m <= n; m++) begin
      longint unsigned lo, hi;
      lo = one - (one >> (m - 1));
      hi = one - (one >> m);
      if (longint'(p) >= lo && longint'(p) < hi) return n - m;
    end
    return n;
  endfunction

  // Stream bit number k for data x.
  function automatic bit ref_bit(int unsigned x, int unsigned dim, int unsigned n,
                                 int unsigned l, int unsigned k);
    int unsigned s;
    s = ref_sel(ref_sobol(dim, l, k), n, l);
    return (s < n) ? x[s] : 1'b0;
  endfunction

endpackage
