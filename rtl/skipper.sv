// skipper: the "precomputer and select unit skipper" of one nibble lane. A
// REGISTER keeps the last partial product the select unit produced and a 2:1
// MUX passes either that stored value (skip = 1, the nibble repeats) or the
// fresh select-unit output (skip = 0). The register loads only on accepted
// inputs that are not skipped, so a run of repeated nibbles keeps reusing one
// computed value. Combinational output; the register updates on the clock.
module skipper
  import cshm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    skip,
  input  logic signed [PRE_W-1:0] fresh,
  output logic signed [PRE_W-1:0] pp
);
  logic signed [PRE_W-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            held <= '0;
    else if (en && !skip)  held <= fresh;
  end

  assign pp = skip ? held : fresh;
endmodule
