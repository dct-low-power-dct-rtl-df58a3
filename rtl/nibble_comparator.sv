// nibble_comparator: reports whether a 4-bit group of the current input X
// equals the same group of the previous input. It holds the previous group
// in a register loaded on every accepted input (en), and compares bit by bit
// (equal = every bit pair equal). 'same' is valid in the same cycle as
// 'cur' and is forced low until a first group has been stored after reset.
module nibble_comparator
  import cshm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [NIB_W-1:0] cur,
  output logic             same
);
  logic [NIB_W-1:0] prev;
  logic             prev_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= '0;
      prev_ok <= 1'b0;
    end else if (en) begin
      prev    <= cur;
      prev_ok <= 1'b1;
    end
  end

  assign same = prev_ok && (&(~(cur ^ prev)));
endmodule
