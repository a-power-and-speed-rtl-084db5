// accumulator - register and adder that sum a stream of products.
//
// Each clock with en high the register takes acc + din, where din is the
// multiplier's product widened to AW bits (sign-extended when SIGNED = 1,
// zero-extended otherwise). The adder is the same parallel-prefix adder the
// multiplier uses. The sum wraps modulo 2^AW; AW = 2N+1+8 by default in the
// MAC, room for 256 worst-case unsigned 8-bit products.
//
// Timing: one cycle. A product presented with en in cycle t is in acc after
// the rising edge that ends cycle t. clr (synchronous, priority over en)
// empties the register; rst_n (asynchronous, active low) does the same.
// The register-plus-adder structure follows the design description; the
// widths, en, clr and reset are this implementation's choices.
module accumulator #(
  parameter int unsigned IW     = 17,   // product width
  parameter int unsigned AW     = 25,   // accumulator width, AW >= IW
  parameter bit          SIGNED = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,   // empty the accumulator
  input  logic          en,    // add din this cycle
  input  logic [IW-1:0] din,
  output logic [AW-1:0] acc
);

  logic [AW-1:0] din_ext, sum;
  logic          cout;

  assign din_ext = SIGNED ? AW'($signed(din)) : AW'(din);

  prefix_adder #(.W(AW)) u_add (
    .a(acc), .b(din_ext), .cin(1'b0), .s(sum), .cout(cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= sum;
  end

  // The sum wraps modulo 2^AW; the carry-out is not used.
  logic unused_cout;
  assign unused_cout = cout;

endmodule
