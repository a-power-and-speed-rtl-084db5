// barrel_shifter - logarithmic left shifter that multiplies by a power of two.
//
// Multiplying an operand by a rounded value 2^k is a left shift by k. The
// shifter has one stage per bit of the shift amount; stage s shifts by 2^s
// when bit s of the amount is set. The input is widened to the output width
// first, so no bit is lost as long as OW covers DW plus the largest shift.
// When en is low (the rounded value is zero) the output is zero.
//
// The design uses three of these to form Ar*B, Br*A and Ar*Br. The
// logarithmic stage structure is this implementation's choice.
//
// Purely combinational.
module barrel_shifter #(
  parameter int unsigned DW = 8,   // data width
  parameter int unsigned SW = 4,   // shift amount width
  parameter int unsigned OW = 17   // output width
) (
  input  logic [DW-1:0] d,    // data
  input  logic [SW-1:0] sh,   // shift amount
  input  logic          en,   // 0 forces a zero result
  output logic [OW-1:0] y     // d << sh
);

  logic [SW:0][OW-1:0] stage;

  assign stage[0] = OW'(d);

  for (genvar s = 0; s < SW; s++) begin : g_stage
    assign stage[s+1] = sh[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  assign y = en ? stage[SW] : '0;

endmodule
