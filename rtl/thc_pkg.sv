// thc_pkg: constants and helper functions shared by the turbo Hadamard (THC)
// encoder/decoder system.
//
// Number formats used across the design:
//   * Channel LLRs: N_CH-bit two's complement, 1 LSB = 1/64 (LLR = 2x/sigma^2).
//   * FHT inputs (a priori / APP LLRs): N_FHT-bit two's complement, same 1/64 LSB.
//   * Log-domain probabilities in the BCJR and DFHT (APP-FHT) units: 1 LSB =
//     2^-LOG_FRAC nat (a parameter of the decoder modules). The FHT output y
//     (1/64 LLR units) is the log-probability y/2 nats of a code word.
//     Probabilities are normalised so that the largest is 1 (log 0), so
//     stored values are never positive: alpha/beta keep N_BCJR bits of
//     magnitude, the DFHT N_DFHT bits of magnitude plus a sign bit (sums of
//     several probabilities can exceed the normalising one).
//   * Addition of probabilities in the log domain uses the Jacobian logarithm
//     ln(e^a + e^b) = max(a,b) + ln(1 + e^-|a-b|), the correction coming from a
//     table (max_star below).
// Interleaver patterns (the "ROMs" of the FIWS interleavers) are computed by
// perm(): component 0 keeps natural order; component m >= 1 permutes window
// (column) w by an affine map k -> (a*k + b) mod K with a prime to K. The
// patterns of the reference design are random and not published, so this
// design uses this computed substitute.
package thc_pkg;

  // Jacobian correction table for a log domain with 2^-frac nat per LSB:
  // tbl[d] = round(2^frac * ln(1 + exp(-d / 2^frac))), computed at
  // elaboration. Differences of JAC_N LSBs or more get no correction (it is
  // below half an LSB there for frac <= 5). Modules build their max*
  // operator, max(a,b) + tbl[|a-b|], from this table.
  localparam int JAC_N = 160;
  typedef int jac_t [JAC_N];

  function automatic jac_t jac_table(input int frac);
    jac_t t;
    real sc;
    sc = real'(1 << frac);
    for (int d = 0; d < JAC_N; d++) t[d] = $rtoi(sc * $ln(1.0 + $exp(-real'(d) / sc)) + 0.5);
    return t;
  endfunction

  // Clamp an integer to the range of a signed w-bit number.
  function automatic int sat(input int v, input int w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Multiplier of the affine interleaver of component m, window w: the
  // (m*r + w)-th prime from 7 upward that does not divide K (so it is prime to K).
  function automatic int perm_mult(input int m, input int w, input int r, input int k_len);
    int n, p, found;
    bit is_p;
    n = m * r + w;
    found = -1;
    p = 6;
    while (found < n) begin
      p++;
      is_p = 1'b1;
      for (int q = 2; q * q <= p; q++) if (p % q == 0) is_p = 1'b0;
      if (is_p && (k_len % p != 0)) found++;
    end
    return p % k_len;
  endfunction

  // FIWS interleaver pattern: row of window w that component m reads at its
  // step k. Component 0 is the natural order.
  function automatic int perm(input int m, input int w, input int k, input int r, input int k_len);
    int a, b;
    if (m == 0) return k;
    a = perm_mult(m, w, r, k_len);
    b = (7 * m + 3 * w + 1) % k_len;
    return (a * k + b) % k_len;
  endfunction

  // Number of code-word positions of an order-r Hadamard code that are not
  // information positions 2^b: position 0 (the convolutional bit q) and the
  // 2^r - r - 1 Hadamard parity bits.
  function automatic int n_par(input int r);
    return (1 << r) - r;
  endfunction

  // i-th non-information position (popcount != 1) of an order-r code word.
  function automatic int par_pos(input int i, input int r);
    int n;
    n = 0;
    for (int p = 0; p < (1 << r); p++) begin
      if ($countones(p) != 1) begin
        if (n == i) return p;
        n++;
      end
    end
    return 0;
  endfunction

endpackage
