// tb_flam_ref_pkg -- reference models used by the FLAM-PUF testbenches.
//
// Written directly from the equations, independently of the RTL structure:
//   apuf_ref : additive delay model evaluated term by term, each feature
//              Phi_l recomputed as a full product (O(n^2), no running product)
//   lfsr_ref : one Galois transition, register by register, with the
//              feedback-point rule written as the two cases
//              (r* = 1: XOR with the last register, r* = 0: invert).
// Vectors are MAXN bits wide; only bits 0..n-1 are used.
package tb_flam_ref_pkg;

  parameter int MAXN = 256;
  typedef logic [MAXN-1:0] vec_t;

  function automatic bit apuf_ref(input int unsigned seed, input int n, input vec_t c);
    longint delta;
    delta = flam_pkg::apuf_weight(seed, n + 1);
    for (int l = 1; l <= n; l++) begin
      int prod;
      prod = 1;
      for (int i = l; i <= n; i++) prod = prod * (c[i-1] ? -1 : 1);
      delta += longint'(flam_pkg::apuf_weight(seed, l)) * prod;
    end
    return delta > 0;
  endfunction

  // g[j] is coefficient g_j (bit 0 unused).
  function automatic vec_t lfsr_ref(input int n, input vec_t s, input vec_t g,
                                    input bit r, input int fbpos);
    vec_t o;
    o = '0;
    o[0] = s[n-1];
    for (int j = 1; j < n; j++) begin
      if (j == fbpos) o[j] = r ? (s[j-1] ^ s[n-1]) : ~s[j-1];
      else            o[j] = g[j] ? (s[j-1] ^ s[n-1]) : s[j-1];
    end
    return o;
  endfunction

endpackage
