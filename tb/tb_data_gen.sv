// tb_data_gen: self-checking test of the pseudo-random data generator.
// A reference model written as integer arithmetic on a 4-bit state (first
// stage gets stage0 XOR stage3, the rest shift) predicts data and sync every
// cycle. The test also checks that the sequence period is 2**4 - 1 = 15,
// that every non-zero state is visited, that sync is high once per period,
// and that an asynchronous reset in mid-sequence restores the all-ones state.
module tb_data_gen;
  logic clk = 1'b0, reset, data, sync;
  int   checks = 0, failures = 0;
  int   state;         // bit i = stage i
  int   seen;          // bitmask of visited states
  int   sync_count, last_sync, period;

  data_gen dut (.clk(clk), .reset(reset), .data(data), .sync(sync));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (state %0h) at %0t", what, got, exp, state, $time);
    end
  endtask

  function automatic int next_state(input int s);
    int fb;
    fb = ((s >> 0) & 1) ^ ((s >> 3) & 1);
    return ((s << 1) & 'he) | fb;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0;
    #1 reset = 1'b1;
    state = 'hf;
    #1;
    check(data, 1'b1, "data after reset");
    check(sync, 1'b1, "sync after reset");
    @(negedge clk) reset = 1'b0;
    seen = 0; sync_count = 0; last_sync = 0;
    for (int cyc = 1; cyc <= 100; cyc++) begin
      @(posedge clk);
      state = next_state(state);
      seen |= (1 << state);
      #1;
      check(data, 1'((state >> 3) & 1), "data");
      check(sync, 1'(state == 'hf), "sync");
      if (sync) begin
        sync_count++;
        if (last_sync != 0) begin
          period = cyc - last_sync;
          checks++;
          if (period != 15) begin
            failures++;
            $display("FAIL period %0d, expected 15", period);
          end
        end
        last_sync = cyc;
      end
    end
    checks++;
    if (seen != 'hfffe) begin
      failures++;
      $display("FAIL visited states %h, expected all 15 non-zero states", seen);
    end
    checks++;
    if (sync_count != 6) begin
      failures++;
      $display("FAIL sync seen %0d times in 100 cycles, expected 6", sync_count);
    end
    // asynchronous reset mid-sequence
    repeat (3) @(posedge clk);
    #2 reset = 1'b1;
    state = 'hf;
    #1;
    check(data, 1'b1, "data after mid-run reset");
    check(sync, 1'b1, "sync after mid-run reset");
    @(negedge clk) reset = 1'b0;
    for (int cyc = 0; cyc < 20; cyc++) begin
      @(posedge clk);
      state = next_state(state);
      #1 check(data, 1'((state >> 3) & 1), "data after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
