// dwt_col_proc: vertical (column) lifting processor, Vertical_H / Vertical_L.
//
// The row processors deliver one column of row coefficients (all H, or
// all L, of column pass k) from top to bottom, two rows per arrival: the
// even row 2m and the odd row 2m+1, one arrival every three clocks. This
// unit runs the 1-D 5/3 lifting down that column:
//   hi(m) = Y(2m+1) - floor((Y(2m) + Y(2m+2)) / 2)
//   lo(m) = Y(2m)   + floor((hi(m-1) + hi(m) + 2) / 4)
// with the symmetric extension Y(N) = Y(N-2) and hi(-1) = hi(0). Because the
// column arrives in order, only the previous pair and the previous hi are
// kept: no line memory is needed here.
//
// Schedule (one shared shift-and-add unit): when pair m >= 1 arrives, the
// predict for pair m-1 runs in the arrival cycle and its update in the next
// cycle. When the last pair of a column arrives, pair N/2-1 is finished in
// the two cycles after that (predict, update); the fourth cycle coincides with
// the arrival of pair 0 of the next column, which needs no arithmetic.
// Outputs: `out_valid` for one cycle with the pair (out_hi, out_lo) of
// subband row `out_row` and column `out_col`, registered, one cycle after the
// update. `out_last` marks the last pair of the last column. In Vertical_H the
// pair is (HH, HL); in Vertical_L it is (LH, LL).
// The lifting equations and the unit's role follow the document; the
// scheduling and the flush at the column end are this design's own.
module dwt_col_proc
  import dwt_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  coef_t                in_even,
  input  coef_t                in_odd,
  output logic                 out_valid,
  output coef_t                out_hi,
  output coef_t                out_lo,
  output logic [$clog2(N)-2:0] out_row,
  output logic [$clog2(N)-2:0] out_col,
  output logic                 out_last
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned HW   = $clog2(N) - 1;

  typedef enum logic [1:0] {
    S_IDLE,   // nothing to compute
    S_UPD,    // update step of pair op_row
    S_FPRED,  // predict step of the column's last pair
    S_FUPD    // update step of the column's last pair
  } state_t;

  state_t        state;
  logic [HW-1:0] m_cnt, k_cnt;
  coef_t         ce, co, pe;
  coef_t         hi_q, hi_old;
  logic [HW-1:0] op_row, op_col;
  logic          op_first, op_fin;
  logic          arr_pred;
  mac_op_t       op;
  coef_t         m_in1, m_in2, m_in3, m_out;

  // An arrival of pair m >= 1 starts the predict of pair m-1.
  assign arr_pred = in_valid && (m_cnt != '0);

  always_comb begin
    unique case (state)
      S_UPD: begin
        op    = OP_UPDATE;
        m_in1 = op_first ? hi_q : hi_old;
        m_in2 = pe;
        m_in3 = hi_q;
      end
      S_FPRED: begin
        op    = OP_PREDICT;
        m_in1 = ce;
        m_in2 = co;
        m_in3 = ce;
      end
      S_FUPD: begin
        op    = OP_UPDATE;
        m_in1 = hi_old;
        m_in2 = pe;
        m_in3 = hi_q;
      end
      default: begin
        op    = OP_PREDICT;
        m_in1 = ce;
        m_in2 = co;
        m_in3 = in_even;
      end
    endcase
  end

  dwt_mac u_mac (.op, .in1(m_in1), .in2(m_in2), .in3(m_in3), .out(m_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      m_cnt     <= '0;
      k_cnt     <= '0;
      ce        <= '0;
      co        <= '0;
      pe        <= '0;
      hi_q      <= '0;
      hi_old    <= '0;
      op_row    <= '0;
      op_col    <= '0;
      op_first  <= 1'b0;
      op_fin    <= 1'b0;
      out_valid <= 1'b0;
      out_hi    <= '0;
      out_lo    <= '0;
      out_row   <= '0;
      out_col   <= '0;
      out_last  <= 1'b0;
    end else if (clear) begin
      state     <= S_IDLE;
      m_cnt     <= '0;
      k_cnt     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;

      unique case (state)
        S_UPD, S_FUPD: begin
          out_valid <= 1'b1;
          out_hi    <= hi_q;
          out_lo    <= m_out;
          out_row   <= op_row;
          out_col   <= op_col;
          out_last  <= (state == S_FUPD) && (op_col == HW'(HALF - 1));
          state     <= (state == S_UPD && op_fin) ? S_FPRED : S_IDLE;
        end
        S_FPRED: begin
          hi_old   <= hi_q;
          hi_q     <= m_out;
          pe       <= ce;
          op_row   <= HW'(HALF - 1);
          op_first <= 1'b0;
          state    <= S_FUPD;
        end
        default: begin
          if (arr_pred) begin
            hi_old   <= hi_q;
            hi_q     <= m_out;
            pe       <= ce;
            op_row   <= m_cnt - 1'b1;
            op_col   <= k_cnt;
            op_first <= (m_cnt == HW'(1));
            op_fin   <= (m_cnt == HW'(HALF - 1));
            state    <= S_UPD;
          end
        end
      endcase

      if (in_valid) begin
        ce <= in_even;
        co <= in_odd;
        if (m_cnt == HW'(HALF - 1)) begin
          m_cnt <= '0;
          k_cnt <= (k_cnt == HW'(HALF - 1)) ? '0 : k_cnt + 1'b1;
        end else begin
          m_cnt <= m_cnt + 1'b1;
        end
      end
    end
  end

  // Arrivals that need arithmetic must find the shared unit free.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n || clear)
                                   arr_pred |-> state == S_IDLE);

endmodule
