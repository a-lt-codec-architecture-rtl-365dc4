// degree_gen_unit: the degree generation unit (DGU). It turns a uniform random
// number into a degree drawn from a stored distribution.
//
// Three memories of NDEG entries:
//   prob  - probability of each table entry, as a fraction of 2^PROB_W-1;
//   csum  - cumulative sum of prob, csum[j] = csum[j-1] + prob[j];
//   deg   - the degree that entry j stands for.
// prob and deg can be rewritten at any time through their write ports, so a
// different distribution can be loaded; 'csum_start' then rebuilds csum.
// The cumulative sum is computed one entry per two cycles with the two
// temporary registers tp1 (holds prob[j]) and tp2 (holds csum[j-1]); csum[0]
// is prob[0]. A rebuild also starts by itself after reset, and 'csum_ready'
// is low while it runs (2*NDEG cycles).
//
// Sampling: the comparator finds the first index k with rand <= csum[k]; the
// degree is deg[k]. If no entry qualifies (a table whose sum is short of the
// largest random value) the last entry is used. 'sample' registers the
// degree together with the column address 'adrs' it belongs to: degree_o,
// adrs_o and degree_valid appear one clock after the sample. Asynchronous
// active-low reset.
//
// The memories, the tp1/tp2 accumulation, the comparison rand <= csum[k] and
// the deg look-up follow the design description. The memory widths, the
// two-cycle accumulation schedule, the automatic rebuild after reset, the
// fallback to the last entry and the default contents (robust soliton
// distribution over degrees 1..NDEG, see lt_pkg) are choices of this design.
module degree_gen_unit
  import lt_pkg::*;
#(
  parameter int unsigned NDEG_P  = NDEG,
  parameter int unsigned PROB_W  = RAND_W,
  parameter int unsigned DEG_W_P = DEG_W,
  parameter int unsigned ADRS_W  = $clog2(LT_N),
  parameter int unsigned DIST_K  = LT_K,          // K of the default RSD table
  localparam int unsigned IDX_W  = $clog2(NDEG_P),
  localparam int unsigned CSUM_W = PROB_W + IDX_W  // no overflow for any table
) (
  input  logic               clk,
  input  logic               rst_n,
  // distribution load ports
  input  logic               prob_we,
  input  logic [IDX_W-1:0]   prob_addr,
  input  logic [PROB_W-1:0]  prob_wdata,
  input  logic               deg_we,
  input  logic [IDX_W-1:0]   deg_addr,
  input  logic [DEG_W_P-1:0] deg_wdata,
  input  logic               csum_start,
  output logic               csum_ready,
  // sampling
  input  logic               sample,
  input  logic [PROB_W-1:0]  rand_i,
  input  logic [ADRS_W-1:0]  adrs,
  output logic               degree_valid,
  output logic [DEG_W_P-1:0] degree_o,
  output logic [ADRS_W-1:0]  adrs_o,
  output logic [IDX_W-1:0]   k_o
);

  typedef enum logic [1:0] {CS_IDLE, CS_FETCH, CS_ADD} cs_state_t;

  typedef logic [PROB_W-1:0] prob_tab_t [NDEG_P];

  function automatic prob_tab_t default_probs();
    prob_tab_t t;
    for (int j = 0; j < NDEG_P; j++) t[j] = PROB_W'(rsd_prob(j, DIST_K));
    return t;
  endfunction

  localparam prob_tab_t DEFAULT_PROB = default_probs();

  logic [PROB_W-1:0]  prob [NDEG_P];
  logic [DEG_W_P-1:0] deg  [NDEG_P];
  logic [CSUM_W-1:0]  csum [NDEG_P];
  logic [PROB_W-1:0]  tp1;
  logic [CSUM_W-1:0]  tp2;
  cs_state_t          cs_state;
  logic [IDX_W-1:0]   j;

  // ---------------- probability and degree memories
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NDEG_P; i++) begin
        prob[i] <= DEFAULT_PROB[i];
        deg[i]  <= DEG_W_P'(i + 1);
      end
    end else begin
      if (prob_we) prob[prob_addr] <= prob_wdata;
      if (deg_we)  deg[deg_addr]   <= deg_wdata;
    end
  end

  // ---------------- cumulative sum, Eq. csum[j] = csum[j-1] + prob[j]
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_state <= CS_FETCH;           // rebuild csum right after reset
      j        <= '0;
      tp1      <= '0;
      tp2      <= '0;
      for (int i = 0; i < NDEG_P; i++) csum[i] <= '0;
    end else begin
      unique case (cs_state)
        CS_IDLE: begin
          if (csum_start) begin
            cs_state <= CS_FETCH;
            j        <= '0;
          end
        end
        CS_FETCH: begin
          tp1      <= prob[j];
          tp2      <= (j == '0) ? '0 : csum[j - 1'b1];
          cs_state <= CS_ADD;
        end
        CS_ADD: begin
          csum[j] <= CSUM_W'(tp1) + tp2;
          if (j == IDX_W'(NDEG_P - 1)) begin
            cs_state <= CS_IDLE;
          end else begin
            j        <= j + 1'b1;
            cs_state <= CS_FETCH;
          end
        end
        default: cs_state <= CS_IDLE;
      endcase
    end
  end

  assign csum_ready = (cs_state == CS_IDLE);

  // ---------------- comparator: first k with rand <= csum[k]
  logic [IDX_W-1:0] k_sel;
  always_comb begin
    k_sel = IDX_W'(NDEG_P - 1);
    for (int i = NDEG_P - 1; i >= 0; i--) begin
      if (CSUM_W'(rand_i) <= csum[i]) k_sel = IDX_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      degree_valid <= 1'b0;
      degree_o     <= '0;
      adrs_o       <= '0;
      k_o          <= '0;
    end else begin
      degree_valid <= sample;
      if (sample) begin
        degree_o <= deg[k_sel];
        adrs_o   <= adrs;
        k_o      <= k_sel;
      end
    end
  end

endmodule
