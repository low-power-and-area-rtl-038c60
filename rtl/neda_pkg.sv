// neda_pkg -- constants shared by the NEDA 9/7 DWT modules.
//
// The 9/7 analysis filters use integer coefficients: the floating-point 9/7
// taps multiplied by 100 and rounded (low pass h0..h4 = 60, 26, -7, -1, 2;
// high pass g0..g3 = 55, -29, -2, 4). They are stored as two's complement
// COEF_W-bit patterns, element k multiplying the folded input r(k+1), where
// r(1) is the outermost tap pair (X(n) + X(n-T+1)) and the last r is the
// centre tap. Seven bits are the least that hold 60 and 55 as signed values.
//
// LP_COEFS_6B / HP_COEFS_6B are the six-bit patterns of the published
// coefficient table read as two's complement with the top bit as sign. They
// form the 6x5 DA matrix of the worked NEDA example (result 97 for
// r = 1..5) and are kept so that example can be reproduced bit for bit;
// note that as signed values they are (-4, 26, 9, 3, 2) and (-9, -29, 6, 4),
// not the 9/7 taps.
package neda_pkg;

  localparam int unsigned DATA_W  = 4;   // pixel width (x[3:0], e1[3:0])
  localparam int unsigned COEF_W  = 7;   // coefficient width (signed)
  localparam int unsigned LP_TAPS = 9;
  localparam int unsigned HP_TAPS = 7;
  localparam int unsigned LP_NR   = (LP_TAPS + 1) / 2;  // 5 folded inputs
  localparam int unsigned HP_NR   = (HP_TAPS + 1) / 2;  // 4 folded inputs
  localparam int unsigned OUT_W   = 20;  // 2-D output width (yl1/yh1[19:0])

  // element [k] multiplies r(k+1)
  localparam logic [LP_NR-1:0][COEF_W-1:0] LP_COEFS = '{
    7'sd2, -7'sd1, -7'sd7, 7'sd26, 7'sd60
  };
  localparam logic [HP_NR-1:0][COEF_W-1:0] HP_COEFS = '{
    7'sd4, -7'sd2, -7'sd29, 7'sd55
  };

  localparam logic [LP_NR-1:0][5:0] LP_COEFS_6B = '{
    6'b000010, 6'b000011, 6'b001001, 6'b011010, 6'b111100
  };
  localparam logic [HP_NR-1:0][5:0] HP_COEFS_6B = '{
    6'b000100, 6'b000110, 6'b100011, 6'b110111
  };

endpackage
