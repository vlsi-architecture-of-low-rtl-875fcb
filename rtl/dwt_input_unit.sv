// dwt_input_unit: input signal unit of one row processor.
//
// The IRSA read order delivers one pixel per clock, three per step:
// X(2k) (phase A), X(2k+1) (phase B) and X(2k+2) (phase C) of one row.
// The unit holds A and B in registers and, during the phase-C cycle,
// presents the complete triple {a, b, c} together with `triple_valid`, so the
// predict step can run in that same cycle. On the last column pass
// (`last_pass`, 2k+2 = N) the pixel X(N) lies outside the image; the
// symmetric extension of JPEG2000 mirrors it to X(N-2), which is the held A
// pixel, so the bus value is ignored and A is presented as c.
//
// Pixels are zero-extended to the signed coefficient width, so the top
// COEF_W-PIXEL_W bits of a, b and c are always zero. That the input
// unit assigns the pixels and where the extension is made follow the
// document; the register/mux arrangement is this design's own.
module dwt_input_unit
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_valid,
  input  phase_t phase,
  input  logic   last_pass,
  input  pixel_t pix,
  output logic   triple_valid,
  output coef_t  a,
  output coef_t  b,
  output coef_t  c
);

  coef_t a_q, b_q, pix_c;

  assign pix_c = coef_t'({1'b0, pix});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (pix_valid) begin
      if (phase == PH_A) a_q <= pix_c;
      if (phase == PH_B) b_q <= pix_c;
    end
  end

  assign triple_valid = pix_valid && (phase == PH_C);
  assign a = a_q;
  assign b = b_q;
  assign c = last_pass ? a_q : pix_c;

endmodule
