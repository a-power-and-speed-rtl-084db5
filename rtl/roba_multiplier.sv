// roba_multiplier - rounding-based approximate (RoBA) multiplier.
//
// Idea: round each operand to its nearest power of two, Ar and Br, and use
//     A * B  ~=  Ar*B + Br*A - Ar*Br
// The error is exactly (A - Ar)(B - Br), so it is small when either operand is
// close to a power of two. Every product on the right has a power-of-two
// factor, so the multiplication becomes three shifts, one addition and one
// subtraction.
//
// Datapath, all combinational:
//   sign_detector x2  -> |A|, |B| and the operand signs
//   rounding x2       -> Ar, Br (one-hot) and their exponents ka, kb
//   barrel_shifter x3 -> Br*A = |A| << kb, Ar*B = |B| << ka, Ar*Br = Ar << kb
//   prefix_adder      -> Br*A + Ar*B
//   subtractor        -> (Br*A + Ar*B) - Ar*Br
//   sign_set          -> negated when exactly one operand is negative
//
// Interface: N-bit operands a and b, two's complement when SIGNED = 1 (the
// default, with the sign detector and sign set of the block diagram) or
// unsigned when SIGNED = 0. The product p is 2N+1 bits wide, two's complement
// when SIGNED = 1: 2N+1 is the width the unsigned intermediate sum needs. The
// 8-bit operands and 17-bit product are the sizes of the design's own
// simulation; the datapath is generic in N.
module roba_multiplier #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned PW    = 2 * N + 1,        // product width
  localparam int unsigned EW    = $clog2(N + 1)     // exponent width
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] p
);

  logic          sa, sb;
  logic [N-1:0]  ma, mb;
  logic [N:0]    ar, br;
  logic [EW-1:0] ka, kb;
  logic          nza, nzb;
  logic [PW-1:0] br_a, ar_b, ar_br, sum, mag;
  logic          sum_cout, sub_borrow;

  sign_detector #(.N(N), .SIGNED(SIGNED)) u_sd_a (.x(a), .sign(sa), .mag(ma));
  sign_detector #(.N(N), .SIGNED(SIGNED)) u_sd_b (.x(b), .sign(sb), .mag(mb));

  rounding #(.N(N)) u_rnd_a (.x(ma), .r(ar), .k(ka), .nz(nza));
  rounding #(.N(N)) u_rnd_b (.x(mb), .r(br), .k(kb), .nz(nzb));

  barrel_shifter #(.DW(N),   .SW(EW), .OW(PW)) u_sh_bra  (.d(ma), .sh(kb), .en(nzb), .y(br_a));
  barrel_shifter #(.DW(N),   .SW(EW), .OW(PW)) u_sh_arb  (.d(mb), .sh(ka), .en(nza), .y(ar_b));
  barrel_shifter #(.DW(N+1), .SW(EW), .OW(PW)) u_sh_arbr (.d(ar), .sh(kb), .en(nzb), .y(ar_br));

  prefix_adder #(.W(PW)) u_add (
    .a(br_a), .b(ar_b), .cin(1'b0), .s(sum), .cout(sum_cout)
  );

  subtractor #(.W(PW)) u_sub (
    .a(sum), .b(ar_br), .d(mag), .borrow(sub_borrow)
  );

  sign_set #(.W(PW), .SIGNED(SIGNED)) u_ss (
    .mag(mag), .sign_a(sa), .sign_b(sb), .y(p)
  );

  // Br*A + Ar*B < 2^(2N+1) and the difference is never negative, so neither
  // the adder's carry-out nor the subtractor's borrow is ever set.
  // Neither is used further. Br itself is only needed through its exponent
  // kb, since Ar*Br is Ar shifted left by kb.
  logic unused_flags;
  assign unused_flags = sum_cout ^ sub_borrow ^ (^br);

endmodule
