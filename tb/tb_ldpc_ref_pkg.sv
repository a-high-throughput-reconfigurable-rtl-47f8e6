// tb_ldpc_ref_pkg: bit-level reference model of the rate-compatible LDPC code
// for the testbenches. It works straight from the matrix definition in ldpc_pkg,
// one bit at a time, with no shifters and no parallel lanes:
//   ref_encode   parity vectors q_i(k) = XOR_t p_c((k + S) mod a) XOR q_(i-1)(k)
//   ref_unsat    number of parity-check rows that a word violates
//   ref_phi      phi(x) = -ln(tanh(x/2)) on the 7-bit grid, from $tanh
package tb_ldpc_ref_pkg;
  import ldpc_pkg::*;

  function automatic void ref_encode(input bit sys[], output bit par[],
                                     input int a, input int ni, input int nj);
    par = new[ni * a];
    for (int i = 0; i < ni; i++)
      for (int k = 0; k < a; k++) begin
        bit v;
        v = (i > 0) ? par[(i - 1) * a + k] : 1'b0;
        for (int t = 0; t < int'(NSYS); t++)
          v ^= sys[base_col(i, t, nj) * a + (k + base_shift(i, t, nj, a)) % a];
        par[i * a + k] = v;
      end
  endfunction

  // rows of M (mother code) violated by the word [sys, par]
  function automatic int ref_unsat(input bit sys[], input bit par[],
                                   input int a, input int ni, input int nj);
    int n;
    n = 0;
    for (int i = 0; i < ni; i++)
      for (int k = 0; k < a; k++) begin
        bit v;
        v = par[i * a + k];
        if (i > 0) v ^= par[(i - 1) * a + k];
        for (int t = 0; t < int'(NSYS); t++)
          v ^= sys[base_col(i, t, nj) * a + (k + base_shift(i, t, nj, a)) % a];
        if (v) n++;
      end
    return n;
  endfunction

  function automatic int ref_phi(input int code);
    real x, v;
    if (code == 0) return MAG_MAX;
    x = code / 16.0;
    v = -$ln($tanh(x / 2.0)) * 16.0;
    if (v >= MAG_MAX) return MAG_MAX;
    return int'($floor(v + 0.5));
  endfunction

endpackage
