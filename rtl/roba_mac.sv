// roba_mac - multiply-accumulate unit built on the RoBA multiplier.
//
// Each cycle with en high the unit forms the approximate product of a and b
// (see roba_multiplier) and adds it to the accumulator register; the
// register feeds its value back to the adder for the next product. The
// product is also brought out combinationally as prod.
//
// Interface: a, b are N-bit two's-complement operands (unsigned when
// SIGNED = 0); prod is the 2N+1-bit product of the current operands; acc is
// the ACC_W-bit running sum. clr empties the sum synchronously, rst_n
// asynchronously.
//
// Timing: the product of the operands applied in cycle t is added at the
// rising edge that ends cycle t, so acc shows it one cycle later; one new
// product can be taken every cycle.
//
// The multiplier -> adder -> accumulator arrangement follows the design
// description. The default 8-bit operands match the design's simulation;
// the accumulator width and the clr/en controls are this implementation's
// choices.
module roba_mac #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  parameter int unsigned ACC_W  = 2 * N + 1 + 8,
  localparam int unsigned PW    = 2 * N + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [PW-1:0]    prod,
  output logic [ACC_W-1:0] acc
);

  roba_multiplier #(.N(N), .SIGNED(SIGNED)) u_mul (
    .a(a), .b(b), .p(prod)
  );

  accumulator #(.IW(PW), .AW(ACC_W), .SIGNED(SIGNED)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .din(prod), .acc(acc)
  );

endmodule
