// tb_lt_encoder: checks the encoder at full size (K = 128, N = 256) with
// random matrices and messages, including the all-zero message, a single-one
// message and an all-ones column. Each check node is compared with a bit-by-bit
// sum computed here; the result must appear one clock after 'start'.
module tb_lt_encoder;

  localparam int K = 128, N = 256;

  logic         clk = 0, rst_n = 0, start = 0, c_valid;
  logic [K-1:0] s_i = '0;
  logic [K-1:0] g_i [N];
  logic [N-1:0] c_o;
  int checks = 0, failures = 0;

  lt_encoder dut (.clk, .rst_n, .start, .s_i, .g_i, .c_valid, .c_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (g_i[n]) g_i[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < N; n++) begin
        for (int r = 0; r < K; r++) g_i[n][r] = ($urandom_range(0, 15) == 0);
      end
      g_i[5] = '1;
      for (int r = 0; r < K; r++) s_i[r] = (t == 0) ? 1'b0 : (t == 1) ? (r == 0) : 1'($urandom);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!c_valid) begin failures++; $display("FAIL c_valid"); end
      for (int n = 0; n < N; n++) begin
        bit e;
        e = 0;
        for (int r = 0; r < K; r++) if (g_i[n][r] && s_i[r]) e = !e;
        checks++;
        if (c_o[n] !== e) begin
          failures++;
          $display("FAIL trial %0d check node %0d", t, n);
        end
      end
      @(negedge clk);
      checks++;
      if (c_valid) begin failures++; $display("FAIL c_valid not a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
