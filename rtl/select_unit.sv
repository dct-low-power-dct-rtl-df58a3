// select_unit: multiplies the coefficient by one 4-bit group of X using the
// precomputed odd multiples. The SHIFTER stage writes the nibble as
// odd * 2**s (for example 0100 = 01 * 2**2), the 8:1 MUX picks (odd)*C from
// the bank (select = odd >> 1) and the ISHIFTER shifts it left by s.
// A zero nibble gives zero. Combinational. Output width PRE_W + 3 would hold
// 8 * 15C, but the largest result is 15C, so PRE_W bits are enough.
module select_unit
  import cshm_pkg::*;
(
  input  logic signed [PRE_W-1:0] pre [NUM_PRE],
  input  logic [NIB_W-1:0]        nib,
  output logic signed [PRE_W-1:0] pp
);
  logic [2:0] sel;     // which odd multiple
  logic [1:0] sh;      // left shift
  logic       zero;

  // SHIFTER: strip trailing zeros.
  always_comb begin
    zero = (nib == '0);
    sh   = 2'd0;
    sel  = 3'd0;
    if      (nib[0]) begin sh = 2'd0; sel = 3'(nib >> 1); end
    else if (nib[1]) begin sh = 2'd1; sel = 3'(nib >> 2); end
    else if (nib[2]) begin sh = 2'd2; sel = 3'(nib >> 3); end
    else             begin sh = 2'd3; sel = 3'd0;         end
  end

  // MUX (8:1) and ISHIFTER.
  logic signed [PRE_W-1:0] m;
  assign m  = pre[sel];
  assign pp = zero ? '0 : (m <<< sh);
endmodule
