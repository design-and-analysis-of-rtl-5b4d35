// tb_approx_comp42 -- self-checking testbench for approx_comp42.
//
// Applies all sixteen input patterns A1A2A3A4 (in order, then 200 more in
// random order) and compares SUM and CARRY with a reference truth table
// written out as two 16-bit constants, bit i holding the output for the
// pattern whose binary value is i. It also checks the error behaviour that
// defines the cell: CARRY*2 + SUM must equal the number of ones in the
// input except for exactly the patterns 0011, 0100, 1000, 1100 and 1111, and
// never be off by more than one. A watchdog ends the run with a failure if
// it does not finish in time.
module tb_approx_comp42;

  // Reference truth table, bit index = {A1,A2,A3,A4}.
  localparam logic [15:0] SUM_REF   = 16'b1111_1000_1000_1110;
  localparam logic [15:0] CARRY_REF = 16'b1111_1111_1111_0000;
  // Patterns at which the compressor is expected to be inexact.
  localparam logic [15:0] ERR_SET   = 16'b1001_0001_0001_1000;

  logic a1, a2, a3, a4;
  logic sum, carry;
  int   checks   = 0;
  int   failures = 0;
  int   n_err    = 0;

  approx_comp42 dut (
    .a1(a1), .a2(a2), .a3(a3), .a4(a4),
    .sum(sum), .carry(carry)
  );

  task automatic check_pattern(input logic [3:0] p, input bit tally);
    int ones, approx, diff;
    {a1, a2, a3, a4} = p;
    #1;
    checks++;
    if (sum !== SUM_REF[p] || carry !== CARRY_REF[p]) begin
      failures++;
      $display("FAIL pattern %04b: sum=%0d carry=%0d, expected sum=%0d carry=%0d",
               p, sum, carry, SUM_REF[p], CARRY_REF[p]);
    end
    ones   = int'(p[3]) + int'(p[2]) + int'(p[1]) + int'(p[0]);
    approx = 2 * int'(carry) + int'(sum);
    diff   = approx - ones;
    checks++;
    if ((diff != 0) !== ERR_SET[p] || diff > 1 || diff < -1) begin
      failures++;
      $display("FAIL pattern %04b: approx=%0d exact=%0d", p, approx, ones);
    end
    if (tally && diff != 0) n_err++;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) check_pattern(4'(i), 1'b1);
    checks++;
    if (n_err != 5) begin
      failures++;
      $display("FAIL inexact patterns: %0d, expected 5", n_err);
    end
    for (int i = 0; i < 200; i++) check_pattern(4'($urandom_range(0, 15)), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
