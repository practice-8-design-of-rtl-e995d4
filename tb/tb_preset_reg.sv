// tb_preset_reg: self-checking test of the preset flip-flop.
// Drives random d for many cycles and checks that q follows d one edge
// later; asserts preset in the middle of a clock period and checks that q is
// 1 at once and stays 1 across clock edges while preset is held.
module tb_preset_reg;
  logic clk = 1'b0, preset, d, q;
  int   checks = 0, failures = 0;

  preset_reg dut (.clk(clk), .preset(preset), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    preset = 1'b0; d = 1'b0;
    #1 preset = 1'b1;
    #1 check(1'b1, "preset at time 0");
    repeat (2) @(posedge clk);
    #1 check(1'b1, "preset holds over clock edges");
    preset = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      exp = d;
      @(posedge clk);
      #1 check(exp, "q follows d");
      if (i % 37 == 20) begin
        // asynchronous preset in mid-period
        d = 1'b0;
        #2 preset = 1'b1;
        #1 check(1'b1, "asynchronous preset");
        @(posedge clk);
        #1 check(1'b1, "preset dominates clock");
        @(negedge clk) preset = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
