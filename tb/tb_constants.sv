// tb_constants: self-checking test of the shared constants package.
// Checks the design sizes (N = 4, M = 32, 12-bit words with 10 fraction
// bits, a 32-entry table), that the phase step is 2*pi/32, and that
// and_vector is 1 for the all-ones vector and 0 for each of the other 15
// four-bit vectors.
module tb_constants;
  import constants_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  table_t t;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(N == 4, "N");
    check(M == 32, "M");
    check(NBITS == 12, "NBITS");
    check(NDEC == 10, "NDEC");
    check($bits(word_t) == 12, "word width");
    check($size(t) == 32, "table size");
    check(DELTA_PHI > 0.19634 && DELTA_PHI < 0.19635, "phase step 2*pi/32");
    for (int v = 0; v < 16; v++) begin
      logic exp;
      exp = (v == 15);
      check(and_vector(4'(v)) == exp, $sformatf("and_vector(%b)", 4'(v)));
    end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
