// tb_lt_codec_top: end-to-end test of the LT codec at its full size
// (K = 128, N = 256, robust soliton table of 128 entries), with every
// parameter at its default.
//
// For each block the testbench works out, on its own, the LFSR sequence from
// the seed, the degree of every column from a floating-point robust soliton
// table (or from the custom table it loaded), the columns of G produced by the
// shifted counters, the check nodes, and the result of a software peeling
// decoder after the erasures it applies. It compares the degree monitor,
// cout, sout, s_recovered and dec_success with those, and checks the
// encoding latency (start to cout_valid, N + 4 clocks) and the decoding time
// (N + 5 + r(2N + 8) clocks for r recovered bits). It makes each mechanism happen:
// erasure of check nodes, full recovery, recovery stopped short, loading a new
// distribution with a cumulative-table rebuild, and a start that has to wait
// for that rebuild.
module tb_lt_codec_top;
  import lt_tb_pkg::*;

  localparam int K = 128, N = 256, NDEG = 128;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [15:0]  seed = 0;
  logic [K-1:0] sin = '0;
  logic [N-1:0] erase = '0;
  logic         busy, done, cout_valid, dec_success, csum_ready;
  logic [N-1:0] cout;
  logic [K-1:0] sout, s_recovered;
  logic         prob_we = 0, deg_we = 0, csum_start = 0;
  logic [6:0]   prob_addr = 0, deg_addr = 0;
  logic [15:0]  prob_wdata = 0;
  logic [7:0]   deg_wdata = 0;
  logic         gen_degree_valid;
  logic [7:0]   gen_degree, gen_adrs;

  int checks = 0, failures = 0;
  int n_erased_cols = 0, n_full = 0, n_partial = 0, n_reload = 0, n_wait_csum = 0;

  lt_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned cum[];           // current cumulative table (reference)
  int          degtab[];        // degree of each table entry (reference)

  // degrees seen on the monitor during one block
  int mon_deg [N];
  always @(posedge clk)
    if (gen_degree_valid) mon_deg[gen_adrs] <= gen_degree;

  task automatic run_block(int t, logic [15:0] sd, logic [K-1:0] msg, int erase_pct,
                           bit expect_wait);
    logic [15:0] st;
    int          deg [N];
    bit          m[][];
    bit          c[];
    bit          rec[], val[];
    logic [N-1:0] exp_c;
    int          cycles, enc_cycles, nrec, ner;

    // reference: degrees, columns, check nodes, erasures, peeling
    st = (sd == 0) ? 16'd1 : sd;
    m = new[N];
    c = new[N];
    ner = 0;
    for (int n = 0; n < N; n++) begin
      int d, cnt;
      d = degtab[NDEG - 1];
      for (int j = NDEG - 1; j >= 0; j--) if (st <= cum[j]) d = degtab[j];
      deg[n] = d;
      st = lfsr_next(st);
      m[n] = new[K];
      exp_c[n] = 0;
      for (int r = 0; r < K; r++) m[n][r] = 0;
      cnt = (d > K) ? K : d;
      for (int i = 0; i < cnt; i++) m[n][(n + i) % K] = 1;
      for (int r = 0; r < K; r++) if (m[n][r] && msg[r]) exp_c[n] = !exp_c[n];
      erase[n] = ($urandom_range(0, 99) < erase_pct);
      ner += erase[n];
      c[n] = erase[n] ? 1'b0 : exp_c[n];
      if (erase[n]) for (int r = 0; r < K; r++) m[n][r] = 0;
    end
    n_erased_cols += ner;
    peel(K, N, m, c, rec, val);

    // run the codec
    seed = sd;
    sin = msg;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    if (expect_wait) begin
      expect_true(!csum_ready && busy, $sformatf("block %0d waits for csum", t));
      if (!csum_ready && busy) n_wait_csum++;
      while (!csum_ready) @(negedge clk);
    end
    enc_cycles = 1;
    while (!cout_valid && enc_cycles < 10000) begin @(negedge clk); enc_cycles++; end
    // N + 4 clocks from the edge that loads the seed; one more when the
    // count starts on the clock the rebuild finished
    expect_true(enc_cycles == N + 4 + int'(expect_wait), $sformatf("block %0d encode latency %0d", t, enc_cycles));
    expect_true(cout == exp_c, $sformatf("block %0d cout", t));
    for (int n = 0; n < N; n++)
      expect_true(mon_deg[n] == deg[n],
                  $sformatf("block %0d degree of column %0d: %0d vs %0d", t, n, mon_deg[n], deg[n]));
    cycles = 0;
    while (!done && cycles < 1000000) begin @(negedge clk); cycles++; end
    nrec = 0;
    for (int r = 0; r < K; r++) begin
      nrec += rec[r];
      expect_true(s_recovered[r] == rec[r], $sformatf("block %0d recovered flag %0d", t, r));
      if (rec[r]) expect_true(sout[r] == msg[r], $sformatf("block %0d value %0d", t, r));
    end
    expect_true(cycles == N + 5 + nrec * (2 * N + 8),
                $sformatf("block %0d decode clocks %0d for %0d bits", t, cycles, nrec));
    expect_true(dec_success == (nrec == K), $sformatf("block %0d success flag", t));
    if (nrec == K) n_full++; else n_partial++;
    $display("block %0d: seed %h, %0d erased, %0d of %0d bits recovered, decode %0d clocks",
             t, sd, ner, nrec, K, cycles);
    @(negedge clk);
    expect_true(!busy, "idle after done");
  endtask

  initial begin
    logic [K-1:0] msg;
    rsd_cum(NDEG, cum);
    degtab = new[NDEG];
    for (int j = 0; j < NDEG; j++) degtab[j] = j + 1;

    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!csum_ready) @(negedge clk);

    // default robust soliton distribution
    run_block(0, 16'h0001, {{(K-1){1'b0}}, 1'b1}, 0, 0);
    for (int t = 1; t < 4; t++) begin
      for (int r = 0; r < K; r++) msg[r] = 1'($urandom);
      run_block(t, 16'($urandom_range(0, 65535)), msg, (t - 1) * 10, 0);
    end

    // load a denser low-degree distribution: degrees 1, 2, 3 with
    // probabilities 19661, 32768, 13106 (of 65535); other entries 0
    for (int j = 0; j < NDEG; j++) begin
      @(negedge clk);
      prob_we = 1; prob_addr = 7'(j);
      prob_wdata = (j == 0) ? 16'd19661 : (j == 1) ? 16'd32768 : (j == 2) ? 16'd13106 : 16'd0;
      deg_we = (j < 3); deg_addr = 7'(j); deg_wdata = 8'(j + 1);
    end
    @(negedge clk);
    prob_we = 0; deg_we = 0;
    csum_start = 1;
    @(negedge clk);
    csum_start = 0;
    n_reload++;
    cum[0] = 19661; cum[1] = 52429;
    for (int j = 2; j < NDEG; j++) cum[j] = 65535;
    // start at once: the codec must wait for the rebuild
    for (int r = 0; r < K; r++) msg[r] = 1'($urandom);
    run_block(4, 16'hBEEF, msg, 5, 1);
    for (int r = 0; r < K; r++) msg[r] = 1'($urandom);
    run_block(5, 16'h0000, msg, 0, 0);

    expect_true(n_erased_cols > 0, "erasures applied");
    expect_true(n_full > 0, "a block fully recovered");
    expect_true(n_partial > 0, "a block only partly recovered");
    expect_true(n_reload > 0, "distribution reloaded");
    expect_true(n_wait_csum > 0, "start waited for the cumulative table");
    $display("mechanisms: erased columns %0d, full %0d, partial %0d, reloads %0d, waits %0d",
             n_erased_cols, n_full, n_partial, n_reload, n_wait_csum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
