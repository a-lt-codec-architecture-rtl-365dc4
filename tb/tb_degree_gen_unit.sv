// tb_degree_gen_unit: checks the degree generation unit.
//  - after reset the cumulative table is rebuilt in 2*NDEG clocks;
//  - with the default table, the degree picked for many random numbers equals
//    the one found in a floating-point robust soliton reference;
//  - a small hand-made distribution is loaded through the write ports and the
//    table boundaries (rand == csum[k] and csum[k]+1) map to the right degree,
//    including the fallback to the last entry when the table sums short;
//  - degree_o and adrs_o appear one clock after 'sample'.
module tb_degree_gen_unit;
  import lt_tb_pkg::*;

  localparam int NDEG = 128;

  logic        clk = 0, rst_n = 0;
  logic        prob_we = 0, deg_we = 0, csum_start = 0, csum_ready, sample = 0;
  logic [6:0]  prob_addr = 0, deg_addr = 0, k_o;
  logic [15:0] prob_wdata = 0, rand_i = 0;
  logic [7:0]  deg_wdata = 0, degree_o;
  logic [7:0]  adrs = 0, adrs_o;
  logic        degree_valid;
  int checks = 0, failures = 0;
  int unsigned cum[];

  degree_gen_unit dut (
    .clk, .rst_n, .prob_we, .prob_addr, .prob_wdata, .deg_we, .deg_addr,
    .deg_wdata, .csum_start, .csum_ready, .sample, .rand_i, .adrs,
    .degree_valid, .degree_o, .adrs_o, .k_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // draw one degree; returns it
  task automatic draw(logic [15:0] r, logic [7:0] a, output int d);
    @(negedge clk);
    rand_i = r; adrs = a; sample = 1;
    @(negedge clk);
    sample = 0;
    if (!degree_valid) begin failures++; $display("FAIL no valid"); end
    checks++;
    expect_eq(adrs_o, a, "adrs_o");
    d = degree_o;
  endtask

  int wait_cycles;
  int d, exp_d;
  int unsigned custom [NDEG];

  initial begin
    rsd_cum(NDEG, cum);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_cycles = 0;
    while (!csum_ready) begin @(negedge clk); wait_cycles++; end
    expect_eq(wait_cycles, 2 * NDEG, "csum rebuild clocks after reset");

    // default table against the reference
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] r;
      r = (t < 8) ? 16'(cum[t]) + 16'(t % 2) : 16'($urandom_range(1, 65535));
      draw(r, 8'(t), d);
      exp_d = NDEG;
      for (int j = NDEG - 1; j >= 0; j--) if (r <= cum[j]) exp_d = j + 1;
      expect_eq(d, exp_d, $sformatf("RSD degree for rand %0d", r));
    end

    // custom distribution: entries 0..3 carry 1000, 2000, 30000, 32535;
    // degrees 5, 2, 9, 40; all other entries 0
    for (int j = 0; j < NDEG; j++) custom[j] = 0;
    custom[0] = 1000; custom[1] = 2000; custom[2] = 30000; custom[3] = 32535;
    for (int j = 0; j < NDEG; j++) begin
      @(negedge clk);
      prob_we = 1; prob_addr = 7'(j); prob_wdata = 16'(custom[j]);
      deg_we = (j < 4); deg_addr = 7'(j);
      deg_wdata = (j == 0) ? 8'd5 : (j == 1) ? 8'd2 : (j == 2) ? 8'd9 : 8'd40;
    end
    @(negedge clk);
    prob_we = 0; deg_we = 0;
    csum_start = 1;
    @(negedge clk);
    csum_start = 0;
    checks++;
    if (csum_ready) begin failures++; $display("FAIL csum_ready stayed high"); end
    wait_cycles = 0;
    while (!csum_ready) begin @(negedge clk); wait_cycles++; end
    expect_eq(wait_cycles, 2 * NDEG, "csum rebuild clocks");
    draw(16'd1,     8'd1, d); expect_eq(d, 5,  "rand 1");
    draw(16'd1000,  8'd2, d); expect_eq(d, 5,  "rand 1000");
    draw(16'd1001,  8'd3, d); expect_eq(d, 2,  "rand 1001");
    draw(16'd3000,  8'd4, d); expect_eq(d, 2,  "rand 3000");
    draw(16'd3001,  8'd5, d); expect_eq(d, 9,  "rand 3001");
    draw(16'd33000, 8'd6, d); expect_eq(d, 9,  "rand 33000");
    draw(16'd33001, 8'd7, d); expect_eq(d, 40, "rand 33001");
    draw(16'd65535, 8'd8, d); expect_eq(d, 40, "rand 65535");
    expect_eq(k_o, 3, "k of rand 65535");

    // short table: last entry reduced, rand above the sum falls back to
    // the last entry (degree 128 = reset content of deg[127])
    @(negedge clk);
    prob_we = 1; prob_addr = 7'd3; prob_wdata = 16'd100;
    @(negedge clk);
    prob_we = 0; csum_start = 1;
    @(negedge clk);
    csum_start = 0;
    while (!csum_ready) @(negedge clk);
    draw(16'd33100, 8'd9,  d); expect_eq(d, 40,  "rand 33100, short table");
    draw(16'd33101, 8'd10, d); expect_eq(d, 128, "fallback to last entry");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
