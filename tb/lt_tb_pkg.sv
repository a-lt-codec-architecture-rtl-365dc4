// lt_tb_pkg: reference models for the LT codec testbenches, written
// independently of the RTL: the LFSR step, the robust soliton distribution
// in floating point, and a software peeling decoder.
package lt_tb_pkg;

  // one step of the 16-bit Galois LFSR x^16 + x^14 + x^13 + x^11 + 1
  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    logic fb;
    fb = s[0];
    s  = {1'b0, s[15:1]};
    if (fb) begin
      s[15] = ~s[15]; s[13] = ~s[13]; s[12] = ~s[12]; s[10] = ~s[10];
    end
    return s;
  endfunction

  // robust soliton mu(d), d = 1..k, with c = 0.1, delta = 0.5
  function automatic real rsd_mu(int d, int k);
    real r, tot, w;
    int  sp;
    r   = 0.1 * $ln(k / 0.5) * $sqrt(k);
    sp  = int'($floor(k / r));
    tot = 0.0;
    w   = 0.0;
    for (int i = 1; i <= k; i++) begin
      real v;
      v = (i == 1) ? 1.0 / k : 1.0 / (i * (i - 1.0));
      if (i < sp)       v += r / (i * 1.0 * k);
      else if (i == sp) v += r * $ln(r / 0.5) / k;
      tot += v;
      if (i == d) w = v;
    end
    return w / tot;
  endfunction

  // quantised cumulative table: cum[j] = round(65535 * P(degree <= j+1))
  function automatic void rsd_cum(int k, ref int unsigned cum[]);
    real acc;
    cum = new[k];
    acc = 0.0;
    for (int j = 0; j < k; j++) begin
      acc += rsd_mu(j + 1, k);
      cum[j] = int'($floor(acc * 65535.0 + 0.5));
    end
    cum[k-1] = 65535;
  endfunction

  // software peeling decoder on a bit matrix m[col][row] with check values c.
  // Returns the recovered mask and values.
  function automatic void peel(int k, int n, bit m_in[][], bit c_in[],
                               ref bit rec[], ref bit val[]);
    bit m[][];
    bit c[];
    bit progress;
    m = new[n];
    c = new[n];
    for (int j = 0; j < n; j++) begin
      m[j] = new[k];
      for (int r = 0; r < k; r++) m[j][r] = m_in[j][r];
      c[j] = c_in[j];
    end
    rec = new[k];
    val = new[k];
    foreach (rec[r]) begin rec[r] = 0; val[r] = 0; end
    progress = 1;
    while (progress) begin
      progress = 0;
      for (int j = 0; j < n && !progress; j++) begin
        int cnt, row;
        cnt = 0; row = 0;
        for (int r = 0; r < k; r++) if (m[j][r]) begin cnt++; row = r; end
        if (cnt == 1) begin
          rec[row] = 1;
          val[row] = c[j];
          for (int jj = 0; jj < n; jj++)
            if (m[jj][row]) begin
              if (jj != j) c[jj] ^= c[j];
              m[jj][row] = 0;
            end
          progress = 1;
        end
      end
    end
  endfunction

endpackage
