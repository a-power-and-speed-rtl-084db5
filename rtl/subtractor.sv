// subtractor - two's-complement subtractor, d = a - b.
//
// Built on the parallel-prefix adder as a + ~b + 1. In the multiplier it takes
// Ar*Br away from the sum Ar*B + Br*A. That difference is never negative
// (each rounded operand is at least three quarters of the operand it
// replaces), so no borrow leaves the block; borrow is still given, as the
// inverse of the adder's carry-out. Using the prefix adder here is this
// implementation's choice.
//
// Purely combinational.
module subtractor #(
  parameter int unsigned W = 17   // width, at least 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d,      // a - b modulo 2^W
  output logic         borrow  // 1 when b > a
);

  logic cout;

  prefix_adder #(.W(W)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .s   (d),
    .cout(cout)
  );

  assign borrow = ~cout;

endmodule
