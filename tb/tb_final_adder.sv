// tb_final_adder: gives the final adder the partial products nibble*C of
// random operands and checks the product C*X, for the 8-bit unsigned form
// (2 nibbles) and the 12-bit two's-complement form (3 nibbles).
module tb_final_adder;
  import cshm_pkg::*;
  int checks = 0, failures = 0;
  logic signed [COEF_W-1:0] c;
  logic signed [PRE_W-1:0]  pp2 [2];
  logic signed [PRE_W-1:0]  pp3 [3];
  logic [7:0]               x2;
  logic [11:0]              x3;
  logic signed [15:0]       p2;
  logic signed [19:0]       p3;

  final_adder #(.NNIB(2), .SIGNED_X(1'b0)) u2 (.pp(pp2), .x_msb(x2[7]),  .c(c), .p(p2));
  final_adder #(.NNIB(3), .SIGNED_X(1'b1)) u3 (.pp(pp3), .x_msb(x3[11]), .c(c), .p(p3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3000; s++) begin
      c  = COEF_W'($urandom);
      x2 = 8'($urandom);
      x3 = 12'($urandom);
      for (int n = 0; n < 2; n++) pp2[n] = PRE_W'(int'(x2[4*n +: 4]) * int'(c));
      for (int n = 0; n < 3; n++) pp3[n] = PRE_W'(int'(x3[4*n +: 4]) * int'(c));
      #1;
      checks += 2;
      if (int'(p2) != int'(x2) * int'(c)) begin
        failures++;
        if (failures < 10) $display("FAIL u x=%0d c=%0d p=%0d", x2, c, p2);
      end
      if (int'(p3) != int'(signed'(x3)) * int'(c)) begin
        failures++;
        if (failures < 10) $display("FAIL s x=%0d c=%0d p=%0d", signed'(x3), c, p3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
