// cshm_multiplier: the modified computation sharing multiplier, p = C * X.
//
// X is cut into NNIB 4-bit groups. A bank of precomputers forms 1C..15C once;
// each group has a select unit that picks and shifts one of those multiples,
// and a final adder sums the groups with their 4-bit weights. On top of this
// plain CSHM, each group has a comparator and a skipper: when the group equals
// the same group of the previous operand, and the coefficient has not changed
// since (same_coef), the partial product stored in the skipper register is
// reused instead of the select-unit result, so the precomputer and select
// unit of that group see no new work. SKIP_EN chooses which groups may skip:
// the default lets both groups of an 8-bit pixel skip; 2'b10 is the
// upper-group-only variant.
//
// The same_coef input is this design's addition: the stored partial products
// are only valid for the coefficient they were computed with, so the user
// must clear same_coef on the first operand after a coefficient change.
// SIGNED_X (two's complement X) is also this design's extension, used for
// the wider second DCT pass.
//
// Timing: one operand per cycle when in_valid is high; p, skip and out_valid
// appear one clock later (product register).
module cshm_multiplier
  import cshm_pkg::*;
#(
  parameter int unsigned     NNIB     = 2,
  parameter bit              SIGNED_X = 1'b0,
  parameter logic [NNIB-1:0] SKIP_EN  = '1,
  localparam int unsigned    XW       = NNIB * NIB_W,
  localparam int unsigned    PW       = XW + COEF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [XW-1:0]            x,
  input  logic signed [COEF_W-1:0] c,
  input  logic                     same_coef,
  output logic                     out_valid,
  output logic signed [PW-1:0]     p,
  output logic [NNIB-1:0]          skip
);
  logic signed [PRE_W-1:0] pre [NUM_PRE];
  logic signed [PRE_W-1:0] fresh [NNIB];
  logic signed [PRE_W-1:0] pp [NNIB];
  logic [NNIB-1:0]         same, skip_now;

  precomputer_bank u_bank (.c(c), .pre(pre));

  for (genvar n = 0; n < NNIB; n++) begin : g_nib
    select_unit u_sel (
      .pre (pre),
      .nib (x[NIB_W*n +: NIB_W]),
      .pp  (fresh[n])
    );
    nibble_comparator u_cmp (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (in_valid),
      .cur   (x[NIB_W*n +: NIB_W]),
      .same  (same[n])
    );
    assign skip_now[n] = SKIP_EN[n] && same_coef && same[n];
    skipper u_skip (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (in_valid),
      .skip  (skip_now[n]),
      .fresh (fresh[n]),
      .pp    (pp[n])
    );
  end

  logic signed [PW-1:0] p_d;
  final_adder #(.NNIB(NNIB), .SIGNED_X(SIGNED_X)) u_fadd (
    .pp    (pp),
    .x_msb (x[XW-1]),
    .c     (c),
    .p     (p_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
      skip      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p    <= p_d;
        skip <= skip_now;
      end
    end
  end
endmodule
