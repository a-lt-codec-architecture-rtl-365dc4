// gen_matrix_unit: the generator matrix unit (GMU). It turns a stream of
// degrees into the columns of the K x N generator matrix G and stores them.
//
// Permutation by counters: K counters count modulo K; counter i starts at i,
// so at any time the K counts are all different. For a column of degree d the
// selector takes the counts of the first d counters and puts a 1 in each of
// those rows of the temporary column register tg (the other rows are 0), so
// the column has exactly min(d, K) ones. Every counter then advances by one,
// which gives the next column a different set of rows. With K = 4 the counts
// of counters 1..4 for columns 0, 1, 2, 3, 4 are 0123, 1230, 2301, 3012, 0123.
//
// Timing: a degree presented with degree_valid and its column address adrs
// is turned into tg on the next clock (tg_valid, tg_adrs); one clock later tg
// is written into the matrix memory at that column. The whole matrix is
// visible on g_o (g_o[n] is column n, bit k of it is row k). 'clear' puts the
// counters back to their initial values, so that a new code block starts from
// the same permutation. Asynchronous active-low reset clears the matrix.
//
// The counters with distinct initial values, the selector driven by the
// degree, tg and the matrix memory follow the design description, as does an
// increment of one per column. Degrees above K are clamped to K; the clear
// input and the pipeline timing are choices of this design.
module gen_matrix_unit
  import lt_pkg::*;
#(
  parameter int unsigned K       = LT_K,
  parameter int unsigned N       = LT_N,
  parameter int unsigned DEG_W_P = DEG_W,
  localparam int unsigned ROW_W  = $clog2(K),
  localparam int unsigned COL_W  = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               degree_valid,
  input  logic [DEG_W_P-1:0] degree,
  input  logic [COL_W-1:0]   adrs,
  output logic               tg_valid,
  output logic [K-1:0]       tg,
  output logic [COL_W-1:0]   tg_adrs,
  output logic [K-1:0]       g_o [N]
);

  logic [ROW_W-1:0] cnt [K];
  logic [K-1:0]     sel;

  // ---------------- counters with distinct initial values
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) cnt[i] <= ROW_W'(i);
    end else if (clear) begin
      for (int i = 0; i < K; i++) cnt[i] <= ROW_W'(i);
    end else if (degree_valid) begin
      for (int i = 0; i < K; i++)
        cnt[i] <= (cnt[i] == ROW_W'(K - 1)) ? '0 : cnt[i] + 1'b1;
    end
  end

  // ---------------- selector: a 1 at the count of each of the first d counters
  always_comb begin
    sel = '0;
    for (int i = 0; i < K; i++) begin
      if (i < int'(degree)) sel[cnt[i]] = 1'b1;
    end
  end

  // ---------------- temporary column register tg
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tg_valid <= 1'b0;
      tg       <= '0;
      tg_adrs  <= '0;
    end else begin
      tg_valid <= degree_valid && !clear;
      if (degree_valid) begin
        tg      <= sel;
        tg_adrs <= adrs;
      end
    end
  end

  // ---------------- matrix memory, one column per address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) g_o[n] <= '0;
    end else if (tg_valid) begin
      g_o[tg_adrs] <= tg;
    end
  end

endmodule
