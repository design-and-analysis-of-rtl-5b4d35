// approx_comp42 -- power-efficient approximate 4:2 compressor.
//
// A 4:2 compressor reduces four bits of equal weight (one column of a
// partial-product array) to a SUM bit of weight 1 and a CARRY bit of weight 2.
// An exact compressor needs a carry-in and a carry-out to represent counts up
// to 4; this approximate one drops both and accepts a wrong result for five of
// the sixteen input patterns in return for a very small gate count:
//
//   CARRY = A1 | A2
//   SUM   = A1&A2 | A3&A4 | ~A1&~A2&(A3|A4)
//
// Read as CARRY*2 + SUM, the output is the exact bit count except for the
// inputs A1A2A3A4 = 0011 (gives 1 instead of 2), 0100 and 1000 (2 instead of
// 1), 1100 (3 instead of 2) and 1111 (3 instead of 4). The error distance is
// never more than 1, and errors in both directions occur, so they partly
// cancel when many columns are summed.
//
// Structure: the gates follow the published schematic of the compressor --
// two 2-input ANDs (c3 = A1&A2, c4 = A3&A4), a 2-input OR (c5 = A3|A4), a
// 3-input AND (wide_and0) that passes c5 only while A1 and A2 are both low,
// a 3-input OR producing SUM and a 2-input OR producing CARRY. The
// inversion of A1 and A2 at wide_and0 is this design's reading of the
// schematic, chosen because it is the only one that reproduces the published
// truth-table rows 0001, 0010 and 0011 (SUM = 1 with A1 = A2 = 0).
//
// Interface: four single-bit inputs a1..a4, outputs sum and carry.
// Timing: purely combinational, no clock, no reset; the critical path is two
// gate levels to SUM and one to CARRY.
module approx_comp42 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic sum,
  output logic carry
);

  logic c3;         // A1 & A2
  logic c4;         // A3 & A4
  logic c5;         // A3 | A4
  logic wide_and0;  // (A3 | A4) while A1 = A2 = 0

  always_comb begin
    c3        = a1 & a2;
    c4        = a3 & a4;
    c5        = a3 | a4;
    wide_and0 = c5 & ~a1 & ~a2;
    sum       = c3 | wide_and0 | c4;
    carry     = a1 | a2;
  end

endmodule
