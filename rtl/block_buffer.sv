// block_buffer: holds the 64 results of a DCT pass and sends them out
// transposed, one per cycle. On 'load' it copies din, indexed
// din[k][i] (frequency k of line i), and then outputs din[t mod 8][t div 8]
// for t = 0..63: the eight frequencies of line 0 first, then line 1, and so
// on. Placed between the two passes it is the transpose memory of the
// row-column 8x8 DCT; placed after the second pass it serialises the
// coefficients. The storage and stream order are this design's choices.
//
// Timing: dout/out_valid start the cycle after load and run for 64
// consecutive cycles. A new load is allowed in the cycle of the last output
// or later (an assertion checks this); first marks t = 0.
module block_buffer
  import cshm_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] din [DCT_N][DCT_N],
  output logic                out_valid,
  output logic                first,
  output logic signed [W-1:0] dout
);
  logic signed [W-1:0] mem [DCT_N][DCT_N];
  logic [5:0]          t;
  logic                busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t    <= '0;
      busy <= 1'b0;
      for (int a = 0; a < DCT_N; a++)
        for (int b = 0; b < DCT_N; b++)
          mem[a][b] <= '0;
    end else if (load) begin
      mem  <= din;
      t    <= '0;
      busy <= 1'b1;
    end else if (busy) begin
      t    <= t + 6'd1;
      busy <= (t != 6'd63);
    end
  end

  assign out_valid = busy;
  assign first     = busy && (t == 6'd0);
  assign dout      = mem[t[2:0]][t[5:3]];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (!busy || t == 6'd63))
    else $error("block_buffer: load while a block is still streaming out");
endmodule
