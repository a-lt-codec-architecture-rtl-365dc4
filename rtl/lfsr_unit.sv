// lfsr_unit: the linear feedback shift register unit (LFSRU) that feeds random
// numbers to the degree generator.
//
// A W-bit Galois LFSR. 'load' copies 'seed' into the register (a zero seed is
// replaced by 1, because the all-zero state never leaves itself); 'step'
// advances it by one shift. 'rand_o' is the current state, so it takes every
// value from 1 to 2^W-1 once per period of 2^W-1 steps. Load has priority over
// step; both act on the rising clock edge, reset is asynchronous, active low.
//
// That the random numbers come from an LFSR started from a seed follows the
// design description; the width, the feedback polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (mask 16'hB400, maximal length) and the reset
// value are choices of this implementation.
module lfsr_unit #(
  parameter int unsigned    W        = 16,
  parameter logic [W-1:0]   POLY     = 16'hB400,
  parameter logic [W-1:0]   RST_SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] rand_o
);

  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= RST_SEED;
    else if (load)  state <= (seed == '0) ? W'(1) : seed;
    else if (step)  state <= state[0] ? ((state >> 1) ^ POLY) : (state >> 1);
  end

  assign rand_o = state;

endmodule
