// tb_lfsr_unit: checks the LFSR against a bit-level reference model: seed
// load, zero-seed substitution, hold without step, and a full period of
// 65535 distinct states.
module tb_lfsr_unit;
  import lt_tb_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] seed = 0, rand_o;
  int checks = 0, failures = 0;

  lfsr_unit dut (.clk, .rst_n, .load, .seed, .step, .rand_o);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] exp, string what);
    checks++;
    if (rand_o !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rand_o, exp);
    end
  endtask

  initial begin
    logic [15:0] ref_s;
    bit seen [65536];
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(16'hACE1, "reset value");
    // seed load
    load = 1; seed = 16'h1234; @(negedge clk); load = 0;
    chk(16'h1234, "seed load");
    // hold
    repeat (3) @(negedge clk);
    chk(16'h1234, "hold");
    // steps against the model
    ref_s = 16'h1234;
    step = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ref_s = lfsr_next(ref_s);
      chk(ref_s, "step");
    end
    step = 0;
    // zero seed
    load = 1; seed = 16'h0000; @(negedge clk); load = 0;
    chk(16'h0001, "zero seed");
    // full period
    step = 1;
    period = 0;
    foreach (seen[i]) seen[i] = 0;
    seen[1] = 1;
    do begin
      @(negedge clk);
      period++;
      if (rand_o != 16'h0001 && seen[rand_o]) begin
        failures++;
        $display("FAIL repeated state %h", rand_o);
        break;
      end
      seen[rand_o] = 1;
    end while (rand_o != 16'h0001 && period < 70000);
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
