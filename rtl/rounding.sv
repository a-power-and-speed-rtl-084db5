// rounding - rounds an unsigned value to the nearest power of two.
//
// Bit i of the rounded value R is set in one of two cases, with every input
// bit above i zero:
//   case 1: x[i] = 1 and x[i-1] = 0
//   case 2: x[i] = 0 and x[i-1] = x[i-2] = 1
// Bits below index 0 and above N-1 read as zero. The result is one-hot (or
// zero when x is zero). A value exactly half-way, 3*2^(k-2), rounds up to 2^k,
// which keeps the logic to these two cases. R can reach 2^N (for x >= 3*2^(N-2)),
// so it is N+1 bits wide.
//
// Besides the one-hot value the block gives its exponent k (R = 2^k) as a
// binary number, which drives the barrel shifters, and a flag that R is not
// zero. The two cases follow the design description; the binary exponent
// output is this implementation's addition for the shifters.
//
// Purely combinational.
module rounding #(
  parameter int unsigned N  = 8,                 // input width
  localparam int unsigned EW = $clog2(N + 1)     // exponent width
) (
  input  logic [N-1:0]  x,    // unsigned input
  output logic [N:0]    r,    // rounded value, one-hot or zero
  output logic [EW-1:0] k,    // r = 2**k when nz
  output logic          nz    // r is not zero
);

  // input extended with zeros: bit N+2 .. above, bits 0..1 below the LSB
  logic [N+2:0] xe;   // xe[j+2] = x[j]
  logic [N+2:0] above_zero; // above_zero[j+2]: every bit of x above j is zero

  always_comb begin
    xe = {1'b0, x, 2'b00};
    above_zero[N+2] = 1'b1;
    for (int j = N + 1; j >= 0; j--)
      above_zero[j] = above_zero[j+1] & ~xe[j+1];
  end

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      // position i of x is xe[i+2]; i-1 is xe[i+1]; i-2 is xe[i]
      r[i] = above_zero[i+2] &
             (( xe[i+2] & ~xe[i+1]) |
              (~xe[i+2] &  xe[i+1] & xe[i]));
    end
  end

  // one-hot to binary: bit b of k is the OR of r at positions with bit b set
  always_comb begin
    k = '0;
    for (int i = 0; i <= N; i++)
      for (int b = 0; b < EW; b++)
        if (((i >> b) & 1) == 1) k[b] = k[b] | r[i];
    nz = |r;
  end

endmodule
