// carry_select_adder: W-bit adder built from BLK-bit blocks. Every block
// above the lowest computes its sum twice, once for carry-in 0 and once for
// carry-in 1, and the carry out of the block below picks one, so the carry
// ripples only through the block multiplexers. It is the final adder of a
// precomputer (the wide adder under the half/full-adder row). Purely
// combinational; the result is the low W bits of a + b.
module carry_select_adder #(
  parameter int unsigned W   = 12,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] c;     // carry into each block; c[NB], the carry out, is dropped
  assign c[0] = 1'b0;

  for (genvar g = 0; g < NB; g++) begin : g_blk
    localparam int unsigned LO = g * BLK;
    localparam int unsigned HI = ((g + 1) * BLK > W) ? W - 1 : (g + 1) * BLK - 1;
    localparam int unsigned BW = HI - LO + 1;
    logic [BW:0] s0, s1;
    assign s0 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]};
    assign s1 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{BW{1'b0}}, 1'b1};
    assign s[HI:LO] = c[g] ? s1[BW-1:0] : s0[BW-1:0];
    assign c[g+1]   = c[g] ? s1[BW]     : s0[BW];
  end
endmodule
