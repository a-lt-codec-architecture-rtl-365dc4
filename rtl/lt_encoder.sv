// lt_encoder: the LT encoder. It forms all N check nodes from the message bits
// s and the generator matrix G in one step.
//
// Check node n is c[n] = XOR over k of (s[k] AND G[k][n]): the column of G
// selects the d message bits it has ones for, and a reduction XOR adds them
// modulo 2. There are N such AND/XOR units side by side, one per check node.
// 'start' registers all N results at the next clock edge; c_valid is high
// for that one cycle and c_o holds its value until the next start.
// Asynchronous active-low reset.
//
// The AND/reduced-XOR structure and the N parallel units follow the design
// description; the output register and its valid strobe are this design's.
module lt_encoder
  import lt_pkg::*;
#(
  parameter int unsigned K = LT_K,
  parameter int unsigned N = LT_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] s_i,
  input  logic [K-1:0] g_i [N],
  output logic         c_valid,
  output logic [N-1:0] c_o
);

  logic [N-1:0] c_next;

  always_comb begin
    for (int n = 0; n < N; n++) c_next[n] = ^(g_i[n] & s_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c_o     <= '0;
    end else begin
      c_valid <= start;
      if (start) c_o <= c_next;
    end
  end

endmodule
