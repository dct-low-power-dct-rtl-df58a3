// dct2d_cshm: low-power 8x8 DCT whose multipliers skip repeated work.
//
// Pixels (8-bit, unsigned) enter one per valid cycle, 64 per block, in
// column order: x(0,0), x(1,0), ..., x(7,0), x(0,1), ... The first pass
// (eight modified CSHM multipliers with 2 nibble groups) forms the 1-D DCT of
// every row; because one coefficient meets the eight vertically neighbouring
// pixels of a column in a row, the multipliers skip the 4-bit groups that
// repeat. A block buffer turns the row results (rounded to 12 bits) around and
// feeds them, again in column order, to the second pass (signed 12-bit
// operands, 3 nibble groups), which forms the column DCTs. A second block
// buffer streams out the coefficients Y(u,v), in column order: Y(0,0),
// Y(1,0), ..., Y(7,0), Y(0,1), ...
//   Y(u,v) = sum_{i,j} c(u,i) c(v,j) x(i,j),   c from cshm_pkg
// with each pass rounded to the nearest integer after its 2**-8 coefficient
// scale.
//
// Throughput is one pixel per clock with no gaps required; in_valid may drop
// at any time. The first coefficient of a block leaves 68 clocks after its
// last pixel was accepted when pixels arrive back to back. The per-multiplier
// skip flags of both passes are brought out for activity measurement.
// The multiplier internals (precomputers, select units, comparators,
// skippers, final adder) follow the published low-power CSHM DCT; the
// row-column organisation, coefficient scaling, widths and stream orders are
// this design's own.
module dct2d_cshm
  import cshm_pkg::*;
#(
  parameter logic [1:0] SKIP_EN1 = 2'b11,   // 2'b10: upper-nibble skip only
  parameter logic [2:0] SKIP_EN2 = 3'b111
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [7:0]          pixel,
  output logic                out_valid,
  output logic                out_first,
  output logic signed [15:0]  coef_out,
  output logic                skip1_valid,
  output logic [1:0]          skip1 [DCT_N],
  output logic                skip2_valid,
  output logic [2:0]          skip2 [DCT_N]
);
  localparam int unsigned MID_W = 12;

  logic                    done1, done2, mid_valid, mid_first;
  logic signed [MID_W-1:0] res1 [DCT_N][DCT_N];
  logic signed [MID_W-1:0] mid;
  logic signed [15:0]      res2 [DCT_N][DCT_N];

  dct_1d_pass #(.NNIB(2), .SIGNED_X(1'b0), .SKIP_EN(SKIP_EN1), .OUT_W(MID_W)) u_row (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x          (pixel),
    .done       (done1),
    .res        (res1),
    .skip_valid (skip1_valid),
    .skip       (skip1)
  );

  block_buffer #(.W(MID_W)) u_transpose (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (done1),
    .din       (res1),
    .out_valid (mid_valid),
    .first     (mid_first),
    .dout      (mid)
  );

  dct_1d_pass #(.NNIB(3), .SIGNED_X(1'b1), .SKIP_EN(SKIP_EN2), .OUT_W(16)) u_col (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (mid_valid),
    .x          (mid),
    .done       (done2),
    .res        (res2),
    .skip_valid (skip2_valid),
    .skip       (skip2)
  );

  block_buffer #(.W(16)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (done2),
    .din       (res2),
    .out_valid (out_valid),
    .first     (out_first),
    .dout      (coef_out)
  );

  logic unused_mid_first;
  assign unused_mid_first = mid_first;
endmodule
