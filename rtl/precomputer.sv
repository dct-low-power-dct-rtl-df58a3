// precomputer: forms one odd multiple K*C of the signed coefficient C using
// only shifts and adds. The shifted copies C<<b, one for each set bit b of K,
// are reduced by rows of full adders (carry-save: sum = a^b^c, carry =
// majority, carry moved one place left) until two words remain; a carry select
// adder adds those. For K = 11 this is 8C + 2C + C: one adder row and the
// carry select adder, the structure of the published precomputer. K = 15 needs two
// rows, K = 3, 5, 9 only the carry select adder, K = 1 is a wire.
// Sign extension of C and the word width PRE_W are this design's choices.
// Combinational; the result is exact for every C because PRE_W bits hold
// 15 * C.
module precomputer
  import cshm_pkg::*;
#(
  parameter int unsigned K = 11
) (
  input  logic signed [COEF_W-1:0] c,
  output logic signed [PRE_W-1:0]  kc
);
  localparam int unsigned NT = 32'(K[0]) + 32'(K[1]) + 32'(K[2]) + 32'(K[3]);

  if (K < 1 || K > 15 || K % 2 == 0) begin : g_bad
    $error("precomputer: K must be odd and in 1..15");
  end

  // Shifted copies of C, packed in the order of the set bits of K.
  logic [PRE_W-1:0] t [4];
  always_comb begin
    int idx;
    idx = 0;
    for (int i = 0; i < 4; i++) t[i] = '0;
    for (int b = 0; b < 4; b++) begin
      if (K[b]) begin
        t[idx] = PRE_W'(signed'(c)) << b;
        idx++;
      end
    end
  end

  // One carry-save row: three words in, two words out.
  function automatic void csa(input  logic [PRE_W-1:0] a, b, d,
                              output logic [PRE_W-1:0] s, cy);
    s  = a ^ b ^ d;
    cy = ((a & b) | (a & d) | (b & d)) << 1;
  endfunction

  logic [PRE_W-1:0] x, y;
  always_comb begin
    logic [PRE_W-1:0] s1, c1;
    s1 = '0;
    c1 = '0;
    case (NT)
      1: begin x = t[0]; y = '0; end
      2: begin x = t[0]; y = t[1]; end
      3: csa(t[0], t[1], t[2], x, y);
      default: begin
        csa(t[0], t[1], t[2], s1, c1);
        csa(s1, c1, t[3], x, y);
      end
    endcase
  end

  logic [PRE_W-1:0] sum;
  carry_select_adder #(.W(PRE_W), .BLK(4)) u_csel (.a(x), .b(y), .s(sum));

  assign kc = signed'(sum);
endmodule
