// tb_com_dac: self-checking test of the DAC SPI master.
// The test acts as the DAC: it shifts spi_mosi in on every rising edge of
// spi_sck while dac_cs is low and, when dac_cs returns high, compares the
// 32 received bits with the word it expects ({8'h00, 4'b0011, 4'b0000,
// data, 4'h0}), where data is the value presented on the clk edge that
// opened the frame. data is changed again in the middle of each frame to
// check that only the load edge matters. It also checks: 32 bits per
// frame; a frame every 64 clk cycles; chip select low for exactly 32 cycles;
// the count_out sequence 1..63,0; spi_sck = ~clk; dac_clr = ~reset; and a
// clean restart after a reset in mid-frame.
module tb_com_dac;
  logic        clk = 1'b0, reset;
  logic [11:0] data;
  logic        dac_cs, dac_clr, spi_mosi, spi_sck;
  logic [6:0]  count_out;
  int          checks = 0, failures = 0;

  logic [31:0] rx;
  int          nbits, frames, cycle, last_fall, cs_low_cycles;
  logic [11:0] loaded;
  logic [6:0]  exp_count;
  logic        prev_cs;

  com_dac dut (.clk(clk), .reset(reset), .data(data), .dac_cs(dac_cs),
               .dac_clr(dac_clr), .spi_mosi(spi_mosi), .spi_sck(spi_sck),
               .count_out(count_out));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DAC side: capture on the rising edge of spi_sck
  always @(posedge spi_sck) begin
    if (!reset && !dac_cs) begin
      rx <= {rx[30:0], spi_mosi};
      nbits <= nbits + 1;
    end
  end

  // Clock-side bookkeeping: cycle count, frame starts and ends, counter
  always @(posedge clk) begin
    #1;
    if (!reset) begin
      cycle++;
      check(count_out == exp_count, $sformatf("count_out %0d expected %0d", count_out, exp_count));
      exp_count = (exp_count == 7'd63) ? 7'd0 : exp_count + 7'd1;
      if (!dac_cs) cs_low_cycles++;
      if (prev_cs && !dac_cs) begin
        if (last_fall >= 0)
          check(cycle - last_fall == 64, $sformatf("frame period %0d", cycle - last_fall));
        last_fall = cycle;
        loaded = data_at_edge;
        nbits = 0;
      end
      if (!prev_cs && dac_cs) begin
        frames++;
        check(nbits == 32, $sformatf("bits in frame %0d", nbits));
        check(cs_low_cycles == 32, $sformatf("cs low for %0d cycles", cs_low_cycles));
        check(rx == {8'h00, 4'b0011, 4'b0000, loaded, 4'h0},
              $sformatf("word %h, expected data %h", rx, loaded));
        cs_low_cycles = 0;
      end
      prev_cs = dac_cs;
    end
  end

  // data as it was just before each rising clk edge
  logic [11:0] data_at_edge;
  always @(posedge clk) data_at_edge <= data;

  always @(negedge clk) begin
    check(spi_sck == 1'b1, "spi_sck is inverted clk (low clk)");
    check(dac_clr == ~reset, "dac_clr is inverted reset");
  end

  initial begin
    reset = 1'b0; data = 12'h000;
    #1 reset = 1'b1;
    nbits = 0; frames = 0; cycle = 0; last_fall = -1; cs_low_cycles = 0;
    exp_count = 7'd1; prev_cs = 1'b1;
    #35;
    check(dac_cs == 1'b1, "cs high in reset");
    check(dac_clr == 1'b0, "dac_clr low in reset");
    @(negedge clk) reset = 1'b0;
    for (int f = 0; f < 40; f++) begin
      // new data before the load edge, disturbance in mid-frame
      data = 12'($urandom);
      repeat (20) @(negedge clk);
      data = 12'($urandom);
      repeat (44) @(negedge clk);
    end
    check(frames == 40, $sformatf("frames %0d", frames));
    // reset in the middle of a frame, then restart
    repeat (10) @(negedge clk);
    reset = 1'b1;
    #1 check(dac_cs == 1'b1, "cs high after mid-frame reset");
    @(negedge clk);
    reset = 1'b0;
    exp_count = 7'd1; prev_cs = 1'b1; last_fall = -1; cs_low_cycles = 0;
    frames = 0;
    for (int f = 0; f < 5; f++) begin
      data = 12'($urandom);
      repeat (64) @(negedge clk);
    end
    check(frames == 5, $sformatf("frames after reset %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
