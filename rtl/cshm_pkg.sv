// cshm_pkg: constants and the DCT coefficient table shared by the
// computation sharing multiplier (CSHM) and the 8x8 DCT built from it.
//
// The multiplier splits its operand X into 4-bit groups ("nibbles"), as the
// published low-power CSHM architecture does for 8-bit pixels. A coefficient C is a signed
// fixed-point number with COEF_FRAC fraction bits. The DCT basis is
//   c(k,n) = a(k) * cos((2n+1) k pi / 16),  a(0) = 1/(2*sqrt(2)), a(k>0) = 1/2
// so that applying it along rows and then columns gives the orthonormal 8x8
// DCT. The integer table below is round(256 * 0.5 * cos(m pi / 16)) for
// m = 0..8, with entry 0 replaced by round(256 / (2*sqrt(2))) = 91 for the DC
// row; coefficient widths and this scaling are choices of this design.
package cshm_pkg;

  localparam int unsigned NIB_W     = 4;   // bits per group of X
  localparam int unsigned NUM_PRE   = 8;   // precomputers: 1C,3C,...,15C
  localparam int unsigned COEF_W    = 8;   // signed coefficient width
  localparam int unsigned COEF_FRAC = 8;   // fraction bits of a coefficient
  localparam int unsigned DCT_N     = 8;   // DCT points / block edge

  // Bits needed to hold 15*C for a COEF_W-bit signed C.
  localparam int unsigned PRE_W = COEF_W + NIB_W;

  // |0.5*cos(m*pi/16)| * 256, m = 0..8 (index 0 holds the DC scale instead).
  function automatic int cos_mag(input int unsigned m);
    case (m)
      0: return 91;
      1: return 126;
      2: return 118;
      3: return 106;
      4: return 91;
      5: return 71;
      6: return 49;
      7: return 25;
      default: return 0;
    endcase
  endfunction

  // Signed DCT coefficient c(k,n) scaled by 2**COEF_FRAC.
  function automatic logic signed [COEF_W-1:0] dct_coef(input int unsigned k,
                                                         input int unsigned n);
    int unsigned m;
    logic signed [COEF_W-1:0] mag;
    m = ((2 * n + 1) * k) % 32;
    if (k == 0)        mag = COEF_W'(cos_mag(0));
    else if (m <= 8)   mag = COEF_W'(cos_mag(m));
    else if (m <= 16)  mag = -COEF_W'(cos_mag(16 - m));
    else if (m <= 24)  mag = -COEF_W'(cos_mag(m - 16));
    else               mag = COEF_W'(cos_mag(32 - m));
    return mag;
  endfunction

endpackage
