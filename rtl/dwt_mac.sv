// dwt_mac: the shift-and-add lifting unit ("MAC") of the 5/3 DWT.
//
// One lifting step of the reversible 5/3 filter, with no multiplier:
//   predict: out = in2 - floor((in1 + in3) / 2)        high-pass d
//   update : out = in2 + floor((in1 + in3 + 2) / 4)    low-pass  s
// in1 and in3 are the two neighbours (even pixels for predict, high-pass
// coefficients for update), in2 is the sample being lifted. The neighbours
// are added (with the rounding constant 2 on update), shifted right
// arithmetically by 1 or 2 (floor for negative values too), and the result is
// subtracted from or added to in2. Purely combinational; the processors
// that use it register its output and share it between predict and update
// in different clock cycles.
//
// The three inputs, the adders, subtractor and shifter and the formulas follow
// the document; the op select and the rounding input are this design's
// way of sharing one unit between both steps. The 5/3 reversible
// filter has no scaling step (k = 1), so no scaling multiplier exists.
module dwt_mac
  import dwt_pkg::*;
(
  input  mac_op_t op,
  input  coef_t   in1,
  input  coef_t   in2,
  input  coef_t   in3,
  output coef_t   out
);

  // One guard bit so in1 + in3 + 2 never wraps.
  logic signed [COEF_W:0] rnd;
  logic signed [COEF_W:0] sum;
  logic signed [COEF_W:0] shifted;

  always_comb begin
    rnd     = (op == OP_UPDATE) ? (COEF_W+1)'(signed'(2)) : '0;
    sum     = (COEF_W+1)'(in1) + (COEF_W+1)'(in3) + rnd;
    shifted = (op == OP_UPDATE) ? (sum >>> 2) : (sum >>> 1);
    if (op == OP_UPDATE) out = coef_t'((COEF_W+1)'(in2) + shifted);
    else                 out = coef_t'((COEF_W+1)'(in2) - shifted);
  end

endmodule
