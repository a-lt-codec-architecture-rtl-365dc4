// tb_lt_decoder: checks the peeling decoder on a K = 32, N = 64 instance.
// Each trial builds a random sparse matrix (column degrees 1..4, some columns
// forced to degree 1), encodes a random message, erases a random share of the
// check nodes and compares the decoder with a software peeling decoder: the
// set of recovered bits must match, every recovered value must equal the
// message bit, 'success' must match full recovery, and the run must take
// exactly N + 5 + r * (2N + 8) clocks from the start edge to the done pulse for r recovered bits.
module tb_lt_decoder;
  import lt_tb_pkg::*;

  localparam int K = 32, N = 64;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] g_i [N];
  logic [N-1:0] c_i = '0, rx_i = '0;
  logic         busy, done, success;
  logic [K-1:0] s_o, rec_o;
  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0;

  lt_decoder #(.K(K), .N(N)) dut (
    .clk, .rst_n, .start, .g_i, .c_i, .rx_i, .busy, .done, .success, .s_o, .rec_o);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  initial begin
    bit m[][];
    bit c[];
    bit rec[], val[];
    logic [K-1:0] s;
    int cycles, nrec, erase_pct;

    foreach (g_i[n]) g_i[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      erase_pct = (t % 3 == 0) ? 0 : (t % 3 == 1) ? 20 : 50;
      for (int r = 0; r < K; r++) s[r] = 1'($urandom);
      m = new[N];
      c = new[N];
      for (int n = 0; n < N; n++) begin
        int d;
        m[n] = new[K];
        d = (n % 5 == 0) ? 1 : $urandom_range(1, 4);
        g_i[n] = '0;
        for (int i = 0; i < d; i++) g_i[n][$urandom_range(0, K - 1)] = 1'b1;
        rx_i[n] = ($urandom_range(0, 99) >= erase_pct);
        c_i[n] = ^(g_i[n] & s);
        for (int r = 0; r < K; r++) m[n][r] = rx_i[n] && g_i[n][r];
        c[n] = rx_i[n] && c_i[n];
        // erased check nodes carry garbage on the wire
        if (!rx_i[n]) c_i[n] = 1'($urandom);
      end
      peel(K, N, m, c, rec, val);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
      nrec = 0;
      for (int r = 0; r < K; r++) begin
        nrec += rec[r];
        expect_true(rec_o[r] == rec[r], $sformatf("trial %0d recovered flag %0d", t, r));
        if (rec[r])
          expect_true(s_o[r] == s[r], $sformatf("trial %0d value %0d", t, r));
      end
      expect_true(success == (nrec == K), $sformatf("trial %0d success", t));
      expect_true(cycles == N + 5 + nrec * (2 * N + 8),
                  $sformatf("trial %0d cycles %0d for %0d bits", t, cycles, nrec));
      if (nrec == K) n_full++; else n_partial++;
      @(negedge clk);
      expect_true(!busy, "idle after done");
    end
    expect_true(n_full > 0 && n_partial > 0, "both full and partial recovery seen");
    $display("full recoveries %0d, partial %0d", n_full, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
