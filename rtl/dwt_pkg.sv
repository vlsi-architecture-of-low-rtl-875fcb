// dwt_pkg: types and constants shared by the 2-D 5/3 lifting DWT.
//
// Pixels are unsigned PIXEL_W-bit samples. Every wavelet coefficient, in
// the row and in the column stage, is a signed COEF_W-bit value. For 8-bit
// pixels the reversible 5/3 transform needs at most 11 signed bits
// (row L in [-128,383], LL in [-384,639], LH/HL/HH within +-511); one bit
// of margin is kept. Both widths are this design's choice.
package dwt_pkg;

  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned COEF_W  = 12;

  typedef logic        [PIXEL_W-1:0] pixel_t;
  typedef logic signed [COEF_W-1:0]  coef_t;

  // Operation of the shift-and-add lifting unit.
  typedef enum logic {
    OP_PREDICT = 1'b0,  // out = in2 - floor((in1 + in3) / 2)
    OP_UPDATE  = 1'b1   // out = in2 + floor((in1 + in3 + 2) / 4)
  } mac_op_t;

  // Position of a pixel inside one three-pixel IRSA read.
  typedef enum logic [1:0] {
    PH_A = 2'd0,  // even pixel X(2k)
    PH_B = 2'd1,  // odd pixel  X(2k+1)
    PH_C = 2'd2   // even pixel X(2k+2)
  } phase_t;

endpackage
