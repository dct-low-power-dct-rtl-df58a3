// final_adder: combines the partial products of the NNIB nibble lanes into
// the product: sum over n of pp[n] * 2**(4n). When the operand X is signed
// (SIGNED_X = 1, two's complement) its top bit weighs -2**(W-1) instead of
// +2**(W-1), so C * 2**W is subtracted when that bit is set; this signed
// extension is this design's own (the 8-bit pixel multiplier is unsigned).
// Combinational.
module final_adder
  import cshm_pkg::*;
#(
  parameter int unsigned NNIB     = 2,
  parameter bit          SIGNED_X = 1'b0,
  localparam int unsigned XW      = NNIB * NIB_W,
  localparam int unsigned PW      = XW + COEF_W
) (
  input  logic signed [PRE_W-1:0]  pp [NNIB],
  input  logic                     x_msb,
  input  logic signed [COEF_W-1:0] c,
  output logic signed [PW-1:0]     p
);
  always_comb begin
    logic signed [PW-1:0] acc;
    acc = '0;
    for (int n = 0; n < NNIB; n++)
      acc += PW'(pp[n]) <<< (NIB_W * n);
    if (SIGNED_X && x_msb)
      acc -= PW'(c) <<< XW;
    p = acc;
  end
endmodule
