// dwt2d_top: one-level 2-D lossless 5/3 lifting DWT of an N x N image.
//
// The interlaced read scan (IRSA) reads the image row by row but walks it
// in column passes: pass k reads pixel columns 2k..2k+2 of every row before
// moving on. Two row processors (Image_1 for even rows, Image_2 for odd rows)
// each take one pixel per clock and turn every three pixels into one row
// high-pass H and one row low-pass L coefficient. Because the rows of one
// pass come out top to bottom, each pass yields a complete column of H and
// of L in column order, so the vertical lifting can follow at once without
// a transpose memory: Vertical_H lifts the H column into HH and HL, Vertical_L
// the L column into LH and LL (first letter: row filter, second: column
// filter). The only storage proportional to the image is the two row
// queues of N/2 words each, N words in all.
//
// Interface: pulse `start` for one clock, while idle or in the cycle
// of `done` (back-to-back images); a start during a run is ignored. The design then requests pixels
// for (rd_row1, rd_col) on `pix1` and (rd_row2, rd_col) on `pix2` while
// `rd_valid` is high and expects them in the same cycle (an asynchronous-read
// frame memory outside this design). Coefficients appear on the two output
// groups, each with a valid strobe and its subband coordinates (row, col in
// 0..N/2-1). `done` pulses with the last LL coefficient. Bit 0 of rd_row1
// is always 0 and of rd_row2 always 1 (even and odd rows).
// Timing: (3/4)N^2 input clocks; the last output is valid 5 clocks after
// the last input, so an image takes (3/4)N^2 + 6 clocks counting the first
// input clock and the clock of the last output (54 for N = 8).
// The architecture (two row processors, two vertical processors, crossing
// of H and L, the memory of N words) and the cycle count follow the
// document; the handshake and output format are this design's own.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 rd_valid,
  output logic [$clog2(N)-1:0] rd_row1,
  output logic [$clog2(N)-1:0] rd_row2,
  output logic [$clog2(N)-1:0] rd_col,
  input  pixel_t               pix1,
  input  pixel_t               pix2,
  output logic                 vh_valid,
  output coef_t                hh,
  output coef_t                hl,
  output logic [$clog2(N)-2:0] vh_row,
  output logic [$clog2(N)-2:0] vh_col,
  output logic                 vl_valid,
  output coef_t                lh,
  output coef_t                ll,
  output logic [$clog2(N)-2:0] vl_row,
  output logic [$clog2(N)-2:0] vl_col,
  output logic                 done
);

  logic   pix_valid, first_pass, last_pass;
  phase_t phase;
  logic   clear;
  logic   run_q;

  logic   h1_valid, l1_valid, h2_valid, l2_valid;
  coef_t  h1, l1, h2, l2;
  logic   vh_last, vl_last;

  // A new image may start while idle or in the cycle of `done`.
  assign clear = start && (!run_q || done);

  dwt_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start(clear),
    .pix_valid, .phase,
    .row1(rd_row1), .row2(rd_row2), .col(rd_col),
    .first_pass, .last_pass, .in_done()
  );

  dwt_row_proc #(.N(N)) u_image_1 (
    .clk, .rst_n, .clear, .pix_valid, .phase, .first_pass, .last_pass,
    .pix(pix1), .h_valid(h1_valid), .h(h1), .l_valid(l1_valid), .l(l1)
  );

  dwt_row_proc #(.N(N)) u_image_2 (
    .clk, .rst_n, .clear, .pix_valid, .phase, .first_pass, .last_pass,
    .pix(pix2), .h_valid(h2_valid), .h(h2), .l_valid(l2_valid), .l(l2)
  );

  // H of both rows to Vertical_H, L of both rows to Vertical_L.
  dwt_col_proc #(.N(N)) u_vertical_h (
    .clk, .rst_n, .clear, .in_valid(h1_valid), .in_even(h1), .in_odd(h2),
    .out_valid(vh_valid), .out_hi(hh), .out_lo(hl),
    .out_row(vh_row), .out_col(vh_col), .out_last(vh_last)
  );

  dwt_col_proc #(.N(N)) u_vertical_l (
    .clk, .rst_n, .clear, .in_valid(l1_valid), .in_even(l1), .in_odd(l2),
    .out_valid(vl_valid), .out_hi(lh), .out_lo(ll),
    .out_row(vl_row), .out_col(vl_col), .out_last(vl_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    run_q <= 1'b0;
    else if (clear)                run_q <= 1'b1;
    else if (vl_valid && vl_last)  run_q <= 1'b0;
  end

  assign busy     = run_q;
  assign rd_valid = pix_valid;
  assign done     = vl_valid && vl_last;

  // Vertical_L receives its last pair one clock after Vertical_H, so it
  // finishes the image exactly one clock later.
  a_last_order: assert property (@(posedge clk) disable iff (!rst_n)
                                 vh_valid && vh_last |=> vl_valid && vl_last);

  // Both row processors run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               h1_valid == h2_valid && l1_valid == l2_valid);

endmodule
