// precomputer_bank: the bank of eight precomputers that computes the odd
// multiples 1C, 3C, 5C, ..., 15C of the coefficient once, so that every
// select unit sharing the coefficient only has to pick and shift one of them.
// Output pre[i] holds (2i+1)*C. Combinational.
module precomputer_bank
  import cshm_pkg::*;
(
  input  logic signed [COEF_W-1:0] c,
  output logic signed [PRE_W-1:0]  pre [NUM_PRE]
);
  for (genvar i = 0; i < NUM_PRE; i++) begin : g_pre
    precomputer #(.K(2 * i + 1)) u_pre (.c(c), .kc(pre[i]));
  end
endmodule
