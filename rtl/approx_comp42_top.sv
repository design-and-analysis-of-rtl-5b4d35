// approx_comp42_top -- top level of the approximate 4:2 compressor design.
//
// The design is a single approximate 4:2 compressor cell (approx_comp42),
// intended as the column-reduction element of an approximate multiplier. This
// top presents it with the interface of the published schematic: one 4-bit
// bus x carrying the four column bits, and the two outputs SUM and CARRY.
//
// Bit mapping: A1 = x[3], A2 = x[2], A3 = x[1], A4 = x[0]. The schematic
// labels only the bus and the bit numbers at each gate; this mapping is the
// one under which its CARRY gate (fed by bits 2 and 3) is CARRY = A1 | A2, so
// the pattern A1A2A3A4 written as a binary number equals x. The mapping is
// this design's reading, not a printed statement.
//
// Outputs: carry has weight 2 and sum weight 1; carry*2 + sum approximates
// the number of ones in x (exact for 11 of the 16 values of x, off by one for
// x = 3, 4, 8, 12 and 15). Purely combinational, no clock, no reset.
module approx_comp42_top (
  input  logic [3:0] x,
  output logic       sum,
  output logic       carry
);

  approx_comp42 u_comp (
    .a1   (x[3]),
    .a2   (x[2]),
    .a3   (x[1]),
    .a4   (x[0]),
    .sum  (sum),
    .carry(carry)
  );

endmodule
