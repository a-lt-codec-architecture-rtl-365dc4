// lt_pkg: sizes and the default degree distribution shared by the LT codec.
//
// The codec encodes K = 128 message bits (variable nodes) into N = 256 coded
// bits (check nodes); both sizes are the ones the design is built for.
// The degree generator draws 16-bit random numbers and compares them with a
// cumulative probability table, so probabilities are stored as 16-bit
// fractions of 65535 (this width is a choice of this implementation).
//
// The default table is Luby's robust soliton distribution (RSD), computed at
// elaboration time by rsd_cdf():
//   R      = c * ln(K/delta) * sqrt(K),  spike = floor(K/R)
//   rho(1) = 1/K,        rho(i) = 1/(i(i-1))              for i = 2..K
//   tau(i) = R/(iK)      for i < spike
//   tau(i) = R ln(R/delta)/K for i = spike, 0 above
//   mu(i)  = (rho(i) + tau(i)) / sum_j (rho(j) + tau(j))
//   rsd_cdf(d) = round(65535 * sum_{i<=d} mu(i))
// c = 0.1 and delta = 0.5 are this design's choice. Entry j of the
// probability memory holds rsd_cdf(j+1) - rsd_cdf(j), so the running sum of
// the table ends at exactly 65535, the largest value the 16-bit LFSR emits.
package lt_pkg;

  parameter int unsigned LT_K    = 128;  // message bits (variable nodes)
  parameter int unsigned LT_N    = 256;  // coded bits (check nodes)
  parameter int unsigned RAND_W  = 16;   // LFSR / probability width
  parameter int unsigned NDEG    = 128;  // entries of the prob / deg memories
  parameter int unsigned DEG_W   = 8;    // width of a degree (holds 1..K)

  // Cumulative robust soliton probability P(degree <= d), scaled to 'scale'.
  function automatic int unsigned rsd_cdf(int d, int k, real c, real delta,
                                          int unsigned scale);
    real r, beta, acc, rho, tau;
    int  spike;
    r     = c * $ln(real'(k) / delta) * $sqrt(real'(k));
    spike = int'($floor(real'(k) / r));
    beta  = 0.0;
    acc   = 0.0;
    for (int i = 1; i <= k; i++) begin
      rho = (i == 1) ? 1.0 / real'(k) : 1.0 / (real'(i) * real'(i - 1));
      if (i < spike)       tau = r / (real'(i) * real'(k));
      else if (i == spike) tau = r * $ln(r / delta) / real'(k);
      else                 tau = 0.0;
      beta += rho + tau;
      if (i <= d) acc += rho + tau;
    end
    return int'($floor(acc / beta * real'(scale) + 0.5));
  endfunction

  // Default content of probability-memory entry j (degree j+1).
  function automatic int unsigned rsd_prob(int j, int k);
    // RSD constants c = 0.1, delta = 0.5
    return rsd_cdf(j + 1, k, 0.1, 0.5, (1 << RAND_W) - 1)
         - rsd_cdf(j,     k, 0.1, 0.5, (1 << RAND_W) - 1);
  endfunction

endpackage
