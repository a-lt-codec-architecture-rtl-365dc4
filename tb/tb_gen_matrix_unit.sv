// tb_gen_matrix_unit: checks the generator matrix unit.
//  - a K = 4 instance fed the degrees 1, 3, 2, 1, 4 must build the columns of
//    the four-counter example: rows {0}, {1,2,3}, {2,3}, {3}, {0,1,2,3};
//  - 'clear' restarts the counters;
//  - a full-size instance (K = 128, N = 256) fed random degrees must store
//    column n with ones exactly in rows (n + i) mod K, i < min(d, K), and
//    present tg one clock after each degree.
module tb_gen_matrix_unit;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- small instance
  logic       s_clear = 0, s_dv = 0, s_tgv;
  logic [7:0] s_deg = 0;
  logic [2:0] s_adrs = 0, s_tga;
  logic [3:0] s_tg;
  logic [3:0] s_g [8];

  gen_matrix_unit #(.K(4), .N(8), .DEG_W_P(8)) dut_s (
    .clk, .rst_n, .clear(s_clear), .degree_valid(s_dv), .degree(s_deg),
    .adrs(s_adrs), .tg_valid(s_tgv), .tg(s_tg), .tg_adrs(s_tga), .g_o(s_g));

  // ---------------- full-size instance
  logic         f_clear = 0, f_dv = 0, f_tgv;
  logic [7:0]   f_deg = 0;
  logic [7:0]   f_adrs = 0, f_tga;
  logic [127:0] f_tg;
  logic [127:0] f_g [256];

  gen_matrix_unit dut_f (
    .clk, .rst_n, .clear(f_clear), .degree_valid(f_dv), .degree(f_deg),
    .adrs(f_adrs), .tg_valid(f_tgv), .tg(f_tg), .tg_adrs(f_tga), .g_o(f_g));

  function automatic logic [127:0] window(int n, int d, int k);
    logic [127:0] w;
    w = '0;
    for (int i = 0; i < d && i < k; i++) w[(n + i) % k] = 1'b1;
    return w;
  endfunction

  initial begin
    int degs [5] = '{1, 3, 2, 1, 4};
    logic [3:0] exp_cols [5] = '{4'b0001, 4'b1110, 4'b1100, 4'b1000, 4'b1111};
    int fdeg [256];

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int n = 0; n < 5; n++) begin
      s_dv = 1; s_deg = 8'(degs[n]); s_adrs = 3'(n);
      @(negedge clk);
      checks++;
      if (!s_tgv || s_tg !== exp_cols[n] || s_tga !== 3'(n)) begin
        failures++;
        $display("FAIL small tg col %0d: %b (valid %0d)", n, s_tg, s_tgv);
      end
    end
    s_dv = 0;
    @(negedge clk);
    for (int n = 0; n < 5; n++) begin
      checks++;
      if (s_g[n] !== exp_cols[n]) begin
        failures++;
        $display("FAIL small column %0d: %b expected %b", n, s_g[n], exp_cols[n]);
      end
    end
    // clear and repeat degree 3: rows 0,1,2
    s_clear = 1;
    @(negedge clk);
    s_clear = 0; s_dv = 1; s_deg = 8'd3; s_adrs = 3'd6;
    @(negedge clk);
    s_dv = 0;
    @(negedge clk);
    checks++;
    if (s_g[6] !== 4'b0111) begin
      failures++;
      $display("FAIL after clear: %b", s_g[6]);
    end

    // full size, random degrees 1..130 (above K is clamped)
    for (int n = 0; n < 256; n++) begin
      fdeg[n] = (n % 50 == 7) ? 130 : $urandom_range(1, 20);
      f_dv = 1; f_deg = 8'(fdeg[n]); f_adrs = 8'(n);
      @(negedge clk);
      checks++;
      if (f_tg !== window(n, fdeg[n], 128)) begin
        failures++;
        $display("FAIL full tg col %0d", n);
      end
    end
    f_dv = 0;
    @(negedge clk);
    for (int n = 0; n < 256; n++) begin
      checks++;
      if (f_g[n] !== window(n, fdeg[n], 128) || $countones(f_g[n]) != (fdeg[n] > 128 ? 128 : fdeg[n])) begin
        failures++;
        $display("FAIL full column %0d", n);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
