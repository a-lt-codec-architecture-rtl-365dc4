// tb_rsd_distribution: the degree distribution the hardware actually produces.
//
// The LFSR and the degree generation unit are run together for one full LFSR
// period (65535 draws), in which every random value 1..65535 occurs exactly
// once. The histogram of the degrees drawn must therefore equal the stored
// table exactly, and each degree's share must be within 1/65535 (one
// quantisation step, plus rounding) of the robust soliton probability
// computed here in floating point. The testbench prints both distributions
// for the first degrees and the spike.
module tb_rsd_distribution;
  import lt_tb_pkg::*;

  localparam int NDEG = 128;

  logic        clk = 0, rst_n = 0, load = 0, step = 0, sample = 0, csum_ready;
  logic [15:0] rand_v;
  logic [7:0]  degree, adrs_o;
  logic [6:0]  k_o;
  logic        dv;
  int checks = 0, failures = 0;
  int hist [NDEG + 1];

  lfsr_unit u_lfsr (.clk, .rst_n, .load, .seed(16'h5A5A), .step, .rand_o(rand_v));

  degree_gen_unit u_dgu (
    .clk, .rst_n, .prob_we(1'b0), .prob_addr('0), .prob_wdata('0), .deg_we(1'b0),
    .deg_addr('0), .deg_wdata('0), .csum_start(1'b0), .csum_ready, .sample,
    .rand_i(rand_v), .adrs(8'd0), .degree_valid(dv), .degree_o(degree),
    .adrs_o, .k_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dv) hist[degree]++;

  initial begin
    int total;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!csum_ready) @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    sample = 1; step = 1;
    repeat (65535) @(negedge clk);
    sample = 0; step = 0;
    @(negedge clk);
    total = 0;
    foreach (hist[i]) total += hist[i];
    checks++;
    if (total != 65535) begin failures++; $display("FAIL %0d draws", total); end
    checks++;
    if (hist[0] != 0) begin failures++; $display("FAIL degree 0 drawn"); end
    for (int d = 1; d <= NDEG; d++) begin
      real ideal, err;
      ideal = rsd_mu(d, NDEG) * 65535.0;
      err   = hist[d] - ideal;
      if (err < 0) err = -err;
      checks++;
      if (err > 1.01) begin
        failures++;
        $display("FAIL degree %0d: %0d draws, ideal %f", d, hist[d], ideal);
      end
      if (d <= 5 || (d >= 18 && d <= 21))
        $display("degree %3d: hardware %6.4f  robust soliton %6.4f",
                 d, hist[d] / 65535.0, rsd_mu(d, NDEG));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
