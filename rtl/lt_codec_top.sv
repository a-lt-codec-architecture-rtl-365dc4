// lt_codec_top: a complete LT (Luby transform) codec for K = 128 message bits
// and N = 256 coded bits, with a loadable degree distribution.
//
// Blocks and data flow:
//   lfsr_unit        random numbers, restarted from 'seed' for each block
//   degree_gen_unit  draws one degree per column from the stored distribution
//   gen_matrix_unit  builds column n of G from that degree with K counters
//   lt_encoder       c = s * G over GF(2), all N check nodes at once
//   lt_decoder       peels the message back out of the received check nodes,
//                    using the same matrix G
// The channel sits between encoder and decoder: 'erase' marks the coded bits
// lost on a binary erasure channel; the decoder ignores them and their columns.
//
// Operation: when 'start' is seen (and the distribution's cumulative table is
// ready), the LFSR is loaded with 'seed' and the GMU counters are cleared.
// GEN then asks the DGU for one degree per clock for columns 0..N-1, stepping
// the LFSR each time; the last column is in G three clocks later. The encoder
// registers all check nodes (cout, cout_valid pulse) and the decoder is
// started with the encoder's output and the same matrix. 'done' pulses when
// the decoder stops; sout, s_recovered and dec_success then hold the result
// until the next start. Encoding takes N + 4 clocks from start to cout_valid;
// decoding about 2N + 8 clocks per recovered bit.
//
// Distribution loading: prob_* and deg_* write the DGU memories at any time;
// 'csum_start' rebuilds the cumulative table (csum_ready low meanwhile). A
// start that arrives while the table is being rebuilt waits for it.
// 'gen_degree_valid', 'gen_degree' and 'gen_adrs' show each degree drawn.
//
// The block partition and connections follow the codec's architecture; the
// sequencing, the erasure input and the status outputs are this design's.
// Asynchronous active-low reset.
module lt_codec_top
  import lt_pkg::*;
#(
  parameter int unsigned K        = LT_K,
  parameter int unsigned N        = LT_N,
  parameter int unsigned NDEG_P   = NDEG,
  parameter int unsigned RAND_W_P = RAND_W,
  parameter int unsigned DEG_W_P  = DEG_W,
  localparam int unsigned IDX_W   = $clog2(NDEG_P),
  localparam int unsigned COL_W   = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // codec control
  input  logic                start,
  input  logic [RAND_W_P-1:0] seed,
  input  logic [K-1:0]        sin,
  input  logic [N-1:0]        erase,
  output logic                busy,
  output logic                done,
  // encoder output
  output logic                cout_valid,
  output logic [N-1:0]        cout,
  // decoder output
  output logic [K-1:0]        sout,
  output logic [K-1:0]        s_recovered,
  output logic                dec_success,
  // distribution load
  input  logic                prob_we,
  input  logic [IDX_W-1:0]    prob_addr,
  input  logic [RAND_W_P-1:0] prob_wdata,
  input  logic                deg_we,
  input  logic [IDX_W-1:0]    deg_addr,
  input  logic [DEG_W_P-1:0]  deg_wdata,
  input  logic                csum_start,
  output logic                csum_ready,
  // degree monitor
  output logic                gen_degree_valid,
  output logic [DEG_W_P-1:0]  gen_degree,
  output logic [COL_W-1:0]    gen_adrs
);

  typedef enum logic [2:0] {T_IDLE, T_WAIT_CSUM, T_GEN, T_FLUSH, T_ENC, T_DEC} tstate_t;

  tstate_t            state;
  logic [COL_W-1:0]   adrs;
  logic [1:0]         flush_cnt;
  logic               lfsr_load, lfsr_step, gmu_clear, sample, enc_start, dec_start;
  logic [RAND_W_P-1:0] rand_v;
  logic               deg_valid;
  logic [DEG_W_P-1:0] degree;
  logic [COL_W-1:0]   deg_adrs;
  logic [K-1:0]       gmat [N];
  logic               dec_done;

  // ---------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      adrs      <= '0;
      flush_cnt <= '0;
    end else begin
      unique case (state)
        T_IDLE:      if (start) state <= csum_ready ? T_GEN : T_WAIT_CSUM;
        T_WAIT_CSUM: if (csum_ready) state <= T_GEN;
        T_GEN: begin
          if (adrs == COL_W'(N - 1)) begin
            adrs      <= '0;
            flush_cnt <= '0;
            state     <= T_FLUSH;
          end else begin
            adrs <= adrs + 1'b1;
          end
        end
        // the last degree reaches the matrix memory two clocks after GEN ends
        T_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 2'd2) state <= T_ENC;
        end
        T_ENC:       state <= T_DEC;
        T_DEC:       if (dec_done) state <= T_IDLE;
        default:     state <= T_IDLE;
      endcase
    end
  end

  // LFSR load and counter clear happen on the clock that leaves idle
  assign lfsr_load = (state == T_IDLE && start && csum_ready)
                  || (state == T_WAIT_CSUM && csum_ready);
  assign gmu_clear = lfsr_load;
  assign sample    = (state == T_GEN);
  assign lfsr_step = sample;
  assign enc_start = (state == T_FLUSH && flush_cnt == 2'd2);
  assign dec_start = (state == T_ENC);
  assign busy      = (state != T_IDLE);
  assign done      = dec_done;

  // ---------------- blocks
  lfsr_unit #(.W(RAND_W_P)) u_lfsr (
    .clk, .rst_n,
    .load   (lfsr_load),
    .seed   (seed),
    .step   (lfsr_step),
    .rand_o (rand_v)
  );

  degree_gen_unit #(
    .NDEG_P (NDEG_P), .PROB_W (RAND_W_P), .DEG_W_P (DEG_W_P),
    .ADRS_W (COL_W),  .DIST_K (K)
  ) u_dgu (
    .clk, .rst_n,
    .prob_we, .prob_addr, .prob_wdata,
    .deg_we,  .deg_addr,  .deg_wdata,
    .csum_start, .csum_ready,
    .sample       (sample),
    .rand_i       (rand_v),
    .adrs         (adrs),
    .degree_valid (deg_valid),
    .degree_o     (degree),
    .adrs_o       (deg_adrs),
    .k_o          ()
  );

  gen_matrix_unit #(.K(K), .N(N), .DEG_W_P(DEG_W_P)) u_gmu (
    .clk, .rst_n,
    .clear        (gmu_clear),
    .degree_valid (deg_valid),
    .degree       (degree),
    .adrs         (deg_adrs),
    .tg_valid     (),
    .tg           (),
    .tg_adrs      (),
    .g_o          (gmat)
  );

  lt_encoder #(.K(K), .N(N)) u_enc (
    .clk, .rst_n,
    .start   (enc_start),
    .s_i     (sin),
    .g_i     (gmat),
    .c_valid (cout_valid),
    .c_o     (cout)
  );

  lt_decoder #(.K(K), .N(N)) u_dec (
    .clk, .rst_n,
    .start   (dec_start),
    .g_i     (gmat),
    .c_i     (cout),
    .rx_i    (~erase),
    .busy    (),
    .done    (dec_done),
    .success (dec_success),
    .s_o     (sout),
    .rec_o   (s_recovered)
  );

  assign gen_degree_valid = deg_valid;
  assign gen_degree       = degree;
  assign gen_adrs         = deg_adrs;

endmodule
