// sign_detector - splits an operand into its sign and its magnitude.
//
// In the signed configuration the most significant bit is the sign: 0 means
// positive, 1 means negative. A negative two's-complement operand is negated
// so that the rest of the multiplier works on the unsigned magnitude |A|.
// The most negative value -2^(N-1) gives the magnitude 2^(N-1), which still
// fits the N-bit unsigned output. In the unsigned configuration (SIGNED = 0)
// the sign is always 0 and the operand passes on unchanged.
//
// Purely combinational. Taking the MSB as the sign follows the design
// description; negating in two's complement to form |A| is this
// implementation's choice.
module sign_detector #(
  parameter int unsigned N      = 8,  // operand width
  parameter bit          SIGNED = 1'b1 // 1: two's-complement operand
) (
  input  logic [N-1:0] x,    // operand
  output logic         sign, // 1 when the operand is negative
  output logic [N-1:0] mag   // |x|, unsigned
);

  always_comb begin
    sign = SIGNED ? x[N-1] : 1'b0;
    mag  = sign ? (~x + N'(1)) : x;
  end

endmodule
