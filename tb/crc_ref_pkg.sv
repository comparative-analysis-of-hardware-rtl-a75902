// crc_ref_pkg: golden CRC model for the testbenches.
//
// The remainder is computed by plain polynomial long division over GF(2),
// independent of any shift-register formulation: the dividend is
// SEED(x) * x^k + M(x) * x^n for a k-bit message M sent MSB first, and the
// generator is x^n + POLY(x). The result is the CRC with no bit reflection and
// no final XOR, i.e. the value a seeded MSB-first serial register leaves.
package crc_ref_pkg;

  typedef bit bitq_t[$];

  function automatic logic [31:0] ref_crc(int n, logic [31:0] poly, logic [31:0] seed,
                                          bitq_t msg);
    int k = msg.size();
    bit d[];
    bit g[];
    logic [31:0] r;
    d = new[k + n];
    g = new[n + 1];
    // generator, highest power first
    g[0] = 1'b1;
    for (int j = 1; j <= n; j++) g[j] = poly[n - j];
    // dividend, highest power (x^(k+n-1)) first
    for (int i = 0; i < k + n; i++) d[i] = 1'b0;
    for (int i = 0; i < n; i++) d[i] ^= seed[n - 1 - i];
    for (int i = 0; i < k; i++) d[i] ^= msg[i];
    // long division
    for (int i = 0; i < k; i++) begin
      if (d[i]) for (int j = 0; j <= n; j++) d[i + j] ^= g[j];
    end
    r = '0;
    for (int i = 0; i < n; i++) r[n - 1 - i] = d[k + i];
    return r;
  endfunction

  // ASCII string to an MSB-first bit queue.
  function automatic bitq_t str_bits(string s);
    bitq_t q;
    for (int i = 0; i < s.len(); i++)
      for (int b = 7; b >= 0; b--) q.push_back(s[i][b]);
    return q;
  endfunction

endpackage
