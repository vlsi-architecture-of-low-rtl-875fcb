// dwt_ctrl: control unit generating the interlaced read scan (IRSA) order.
//
// The image is read row by row but processed column pass by column pass.
// Pass k (k = 0 .. N/2-1) covers pixel columns 2k, 2k+1 and 2k+2 of every
// row. Two row processors work in parallel on a pair of rows (2m and 2m+1);
// each receives one pixel per clock, so one step of three clocks (phases
// A, B, C) reads X(r,2k), X(r,2k+1), X(r,2k+2) for both rows, and the next
// step moves to the next row pair. After the last row pair the scan returns
// to the first pair for pass k+1, re-reading column 2k+2 as its column 2k.
// A full image takes 3 * (N/2) * (N/2) = (3/4)N^2 clocks of input.
//
// Interface: a one-cycle `start` pulse (ignored while busy) launches one
// image. While `pix_valid` is high the unit requests pixel (row1, col) for
// processor 1 and (row2, col) for processor 2; the pixel is expected on the
// same clock. `first_pass`/`last_pass` mark pass 0 and pass N/2-1. On the
// last pass the phase-C column would be N, outside the image: the symmetric
// extension mirrors it to N-2 = 2k, which is what `col` then shows (the
// input unit substitutes that pixel itself). `in_done` pulses with the last
// input cycle. The IRSA order and the two-row parallel scheme follow the
// document; the counter structure is this design's own. N must be even
// and at least 4.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 pix_valid,
  output phase_t               phase,
  output logic [$clog2(N)-1:0] row1,
  output logic [$clog2(N)-1:0] row2,
  output logic [$clog2(N)-1:0] col,
  output logic                 first_pass,
  output logic                 last_pass,
  output logic                 in_done
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned AW   = $clog2(N);
  localparam int unsigned HW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [HW-1:0] m_q;   // row pair
  logic [HW-1:0] k_q;   // column pass
  phase_t        ph_q;
  logic          run_q;

  logic last_step;
  assign last_pass = (k_q == HW'(HALF - 1));
  assign first_pass = (k_q == '0);
  assign last_step = last_pass && (m_q == HW'(HALF - 1)) && (ph_q == PH_C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      m_q   <= '0;
      k_q   <= '0;
      ph_q  <= PH_A;
    end else if (!run_q) begin
      if (start) begin
        run_q <= 1'b1;
        m_q   <= '0;
        k_q   <= '0;
        ph_q  <= PH_A;
      end
    end else begin
      unique case (ph_q)
        PH_A:    ph_q <= PH_B;
        PH_B:    ph_q <= PH_C;
        default: begin
          ph_q <= PH_A;
          if (m_q == HW'(HALF - 1)) begin
            m_q <= '0;
            if (last_pass) begin
              k_q   <= '0;
              run_q <= 1'b0;
            end else begin
              k_q <= k_q + 1'b1;
            end
          end else begin
            m_q <= m_q + 1'b1;
          end
        end
      endcase
    end
  end

  logic [AW-1:0] col_even;
  assign col_even = AW'({k_q, 1'b0});

  always_comb begin
    unique case (ph_q)
      PH_A:    col = col_even;
      PH_B:    col = col_even + AW'(1);
      default: col = last_pass ? col_even : col_even + AW'(2);
    endcase
  end

  assign pix_valid = run_q;
  assign phase     = ph_q;
  assign row1      = AW'({m_q, 1'b0});
  assign row2      = AW'({m_q, 1'b1});
  assign in_done   = run_q && last_step;

  initial begin
    assert (N % 2 == 0 && N >= 4) else $error("dwt_ctrl: N must be even and >= 4");
  end

endmodule
