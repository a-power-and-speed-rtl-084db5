// sign_set - gives the approximate product its sign.
//
// The sign of the product is the XOR of the two operand signs. When it is
// negative the unsigned product magnitude is negated in two's complement;
// otherwise it passes on. With SIGNED = 0 both signs are zero and the block
// passes the magnitude through. The XOR of the signs and the two's-complement
// output are this implementation's choices; the design description says only
// that this block sets the sign of the final result.
//
// Purely combinational.
module sign_set #(
  parameter int unsigned W      = 17,   // result width
  parameter bit          SIGNED = 1'b1
) (
  input  logic [W-1:0] mag,     // unsigned product magnitude
  input  logic         sign_a,
  input  logic         sign_b,
  output logic [W-1:0] y        // signed (two's complement) product
);

  logic neg;

  always_comb begin
    neg = SIGNED & (sign_a ^ sign_b);
    y   = neg ? (~mag + W'(1)) : mag;
  end

endmodule
