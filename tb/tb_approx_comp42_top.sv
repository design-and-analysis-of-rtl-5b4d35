// tb_approx_comp42_top -- end-to-end testbench for approx_comp42_top.
//
// Runs the top at its default configuration (it has no parameters): first an
// exhaustive sweep of the 4-bit input x, then 2000 random values. The
// reference is written independently of the RTL as a rule on the bit count:
// the output value carry*2 + sum is the number of ones in x, except that
// x = 3 yields 1, x = 4 and x = 8 yield 2, x = 12 yields 3 and x = 15 yields
// 3. Over the exhaustive sweep it checks the published error figures: five
// inexact patterns out of sixteen, total error distance 5, three
// over-estimates and two under-estimates. It counts each behaviour of the
// cell (exact result, over-estimate, under-estimate, saturation at the
// all-ones input) and fails if any of them never occurred. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_approx_comp42_top;

  logic [3:0] x;
  logic       sum, carry;
  int checks   = 0;
  int failures = 0;
  int n_exact  = 0;
  int n_over   = 0;
  int n_under  = 0;
  int n_sat    = 0;
  int ed_total = 0;

  approx_comp42_top dut (.x(x), .sum(sum), .carry(carry));

  function automatic int ref_value(input logic [3:0] v);
    int ones;
    ones = $countones(v);
    case (v)
      4'd3:            return 1;
      4'd4, 4'd8:      return 2;
      4'd12, 4'd15:    return 3;
      default:         return ones;
    endcase
  endfunction

  task automatic apply(input logic [3:0] v, input bit tally);
    int got, diff;
    x = v;
    #1;
    got  = 2 * int'(carry) + int'(sum);
    diff = got - $countones(v);
    checks++;
    if (got != ref_value(v)) begin
      failures++;
      $display("FAIL x=%04b: carry=%0d sum=%0d, expected value %0d",
               v, carry, sum, ref_value(v));
    end
    if (diff == 0) n_exact++;
    else if (diff > 0) n_over++;
    else n_under++;
    if (v == 4'hF) n_sat++;
    if (tally) ed_total += (diff < 0) ? -diff : diff;
  endtask

  initial begin
    int n_exact_sweep, n_over_sweep, n_under_sweep;
    for (int i = 0; i < 16; i++) apply(4'(i), 1'b1);
    n_exact_sweep = n_exact;
    n_over_sweep  = n_over;
    n_under_sweep = n_under;
    checks++;
    if (n_exact_sweep != 11 || n_over_sweep != 3 || n_under_sweep != 2) begin
      failures++;
      $display("FAIL sweep: exact=%0d over=%0d under=%0d, expected 11/3/2",
               n_exact_sweep, n_over_sweep, n_under_sweep);
    end
    checks++;
    if (ed_total != 5) begin
      failures++;
      $display("FAIL total error distance %0d, expected 5", ed_total);
    end
    for (int i = 0; i < 2000; i++) apply(4'($urandom_range(0, 15)), 1'b0);

    $display("exact=%0d over_estimate=%0d under_estimate=%0d saturation=%0d",
             n_exact, n_over, n_under, n_sat);
    checks++;
    if (n_exact == 0 || n_over == 0 || n_under == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a behaviour of the cell was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
