// lt_decoder: the LT decoder. It recovers the message bits from the received
// check nodes by peeling, without belief propagation.
//
// The decoder works on its own copy of the generator matrix. On 'start' it
// copies G and the check nodes c, discarding (zeroing) every column and check
// node whose bit was erased on the channel (rx_i[n] = 0). It then repeats:
//   SCAN   each column in turn is copied to the temporary register tg, its
//          column sum is taken into tsum, and se_flag[n] is set when the sum
//          is 1 (a single-edge check node). One column per clock, pipelined.
//   PICK   the lowest flagged column gives col_index; the position of its one
//          gives row_index. With no flag set, decoding stops.
//   ASSIGN s[row_index] = c[col_index]; that value is also kept in tc.
//   CUPD   every check node c[j], j != col_index, whose column has a one in
//          row_index is replaced by c[j] XOR tc (all at once).
//   MUPD   each column in turn is copied to tg2, tg2[row_index] is cleared,
//          and tg2 is written back, so no column connects to the recovered
//          bit any more. One column per clock, pipelined.
// When no single-edge column is left, 'done' pulses for one clock. rec_o marks
// the recovered message bits, s_o holds their values (unrecovered bits read 0)
// and 'success' is high when every bit was recovered. Timing: a scan pass
// takes N + 3 clocks and a pick 1; each recovered bit adds assign, update and
// a matrix pass, 2N + 8 clocks in all, so a run of r recovered bits ends with
// 'done' N + 5 + r(2N + 8) clocks after the clock edge that samples 'start'
// (66821 clocks for a full K = 128, N = 256 block). Asynchronous active-low
// reset.
//
// The four steps, the registers tg, tsum, se_flag, tc and tg2, and the
// column-by-column scan and matrix update follow the design description. The
// erasure input, the choice of the lowest flagged column, the stop condition,
// the pipeline timing and the status outputs are choices of this design.
module lt_decoder
  import lt_pkg::*;
#(
  parameter int unsigned K = LT_K,
  parameter int unsigned N = LT_N,
  localparam int unsigned ROW_W = $clog2(K),
  localparam int unsigned COL_W = $clog2(N),
  localparam int unsigned SUM_W = $clog2(K + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] g_i [N],
  input  logic [N-1:0] c_i,
  input  logic [N-1:0] rx_i,
  output logic         busy,
  output logic         done,
  output logic         success,
  output logic [K-1:0] s_o,
  output logic [K-1:0] rec_o
);

  typedef enum logic [2:0] {
    D_IDLE, D_SCAN, D_PICK, D_ASSIGN, D_CUPD, D_MUPD
  } dstate_t;

  dstate_t          state;
  logic [K-1:0]     gw [N];      // working copy of the matrix
  logic [N-1:0]     cw;          // working check nodes
  logic [N-1:0]     se_flag;
  logic [K-1:0]     tg, tg2;
  logic [SUM_W-1:0] tsum;
  logic             tc;
  logic [COL_W-1:0] idx;         // column being fetched
  logic             last_fetch;  // idx has reached N-1 in this pass
  logic             v1, v2;      // pipeline valids: tg / tsum, tg2
  logic [COL_W-1:0] idx1, idx2;  // column numbers of tg and tsum / tg2
  logic [COL_W-1:0] col_index;
  logic [ROW_W-1:0] row_index;

  // lowest flagged column and the row of its single one
  logic             any_flag;
  logic [COL_W-1:0] first_col;
  logic [ROW_W-1:0] one_row;
  always_comb begin
    any_flag  = |se_flag;
    first_col = '0;
    for (int n = N - 1; n >= 0; n--) if (se_flag[n]) first_col = COL_W'(n);
    one_row = '0;
    for (int r = K - 1; r >= 0; r--) if (gw[first_col][r]) one_row = ROW_W'(r);
  end

  assign busy    = (state != D_IDLE);
  assign success = &rec_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      for (int n = 0; n < N; n++) gw[n] <= '0;
      cw         <= '0;
      se_flag    <= '0;
      tg         <= '0;
      tg2        <= '0;
      tsum       <= '0;
      tc         <= 1'b0;
      idx        <= '0;
      last_fetch <= 1'b0;
      v1         <= 1'b0;
      v2         <= 1'b0;
      idx1       <= '0;
      idx2       <= '0;
      col_index  <= '0;
      row_index  <= '0;
      s_o        <= '0;
      rec_o      <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: begin
          if (start) begin
            for (int n = 0; n < N; n++) gw[n] <= rx_i[n] ? g_i[n] : '0;
            cw         <= c_i & rx_i;
            s_o        <= '0;
            rec_o      <= '0;
            se_flag    <= '0;
            idx        <= '0;
            last_fetch <= 1'b0;
            v1         <= 1'b0;
            v2         <= 1'b0;
            state      <= D_SCAN;
          end
        end

        // tg <= column idx; tsum <= sum(tg); se_flag[idx2] <= (tsum == 1)
        D_SCAN: begin
          v1   <= !last_fetch;
          tg   <= gw[idx];
          idx1 <= idx;
          v2   <= v1;
          tsum <= SUM_W'($countones(tg));
          idx2 <= idx1;
          if (v2) se_flag[idx2] <= (tsum == SUM_W'(1));
          if (!last_fetch) begin
            if (idx == COL_W'(N - 1)) last_fetch <= 1'b1;
            else                      idx <= idx + 1'b1;
          end else if (!v1 && !v2) begin
            state <= D_PICK;
          end
        end

        D_PICK: begin
          if (any_flag) begin
            col_index <= first_col;
            row_index <= one_row;
            state     <= D_ASSIGN;
          end else begin
            done  <= 1'b1;
            state <= D_IDLE;
          end
        end

        D_ASSIGN: begin
          s_o[row_index]   <= cw[col_index];
          rec_o[row_index] <= 1'b1;
          tc               <= cw[col_index];
          state            <= D_CUPD;
        end

        D_CUPD: begin
          for (int n = 0; n < N; n++)
            if (COL_W'(n) != col_index && gw[n][row_index]) cw[n] <= cw[n] ^ tc;
          idx        <= '0;
          last_fetch <= 1'b0;
          v1         <= 1'b0;
          state      <= D_MUPD;
        end

        // tg2 <= column idx; column idx1 <= tg2 with row_index cleared
        D_MUPD: begin
          v1   <= !last_fetch;
          tg2  <= gw[idx];
          idx1 <= idx;
          if (v1) begin
            gw[idx1]            <= tg2;
            gw[idx1][row_index] <= 1'b0;
          end
          if (!last_fetch) begin
            if (idx == COL_W'(N - 1)) last_fetch <= 1'b1;
            else                      idx <= idx + 1'b1;
          end else if (!v1) begin
            se_flag    <= '0;
            idx        <= '0;
            last_fetch <= 1'b0;
            v2         <= 1'b0;
            state      <= D_SCAN;
          end
        end

        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
