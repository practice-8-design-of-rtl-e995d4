// tb_bpsk_modulator: self-checking test of the BPSK modulator.
// Two instances: the default one (32 samples, divide by 64, offset DAC
// code) and a small one (8 samples, divide by 4, signed output). For each,
// the expected pulse trains are worked out from the edge number k after
// reset: clk_bpsk is high after edge k when (k-1) is a multiple of DIVIDE,
// clk_data when (k-1) is a multiple of DIVIDE*SAMPLES, and the table index is
// ((k-1)/DIVIDE) mod SAMPLES (SAMPLES-1 before the first edge). The expected
// sample is computed here with $sin and $floor: the magnitude of
// 2*sin(2*pi*i/SAMPLES)*1024, floored and capped at 2047, with the sign of the
// sine, then negated for serial_data = 1 and, for the default instance,
// offset by 2048. serial_data is changed at random twice per cycle. Pulse
// counts per period, clk_spi = clk and an asynchronous reset in mid-run are
// checked too.
module tb_bpsk_modulator;
  logic        clk = 1'b0, reset, serial_data;
  logic        a_clk_data, a_clk_spi, a_clk_bpsk;
  logic [11:0] a_data;
  logic        b_clk_data, b_clk_spi, b_clk_bpsk;
  logic [11:0] b_data;
  int          checks = 0, failures = 0;
  int          k;                      // clk edges since reset release
  int          a_bpsk_pulses, a_data_pulses;

  bpsk_modulator dut_a (
    .clk(clk), .reset(reset), .serial_data(serial_data),
    .clk_data(a_clk_data), .clk_spi(a_clk_spi), .clk_bpsk(a_clk_bpsk), .data(a_data));

  bpsk_modulator #(.SAMPLES(8), .DIVIDE(4), .DAC_OFFSET(1'b0)) dut_b (
    .clk(clk), .reset(reset), .serial_data(serial_data),
    .clk_data(b_clk_data), .clk_spi(b_clk_spi), .clk_bpsk(b_clk_bpsk), .data(b_data));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (k=%0d)", what, $time, k);
    end
  endtask

  function automatic int ref_sample(input int i, input int m);
    real s, mag;
    int  code;
    s    = 2.0 * $sin(2.0 * 3.14159265358979 * real'(i) / real'(m));
    mag  = (s < 0.0 ? -s : s) * 1024.0;
    code = int'($floor(mag));
    if (code > 2047) code = 2047;
    return (s < 0.0) ? -code : code;
  endfunction

  function automatic logic [11:0] ref_code(input int i, input int m, input logic bit_in,
                                           input bit offset);
    int v;
    v = ref_sample(i, m);
    if (bit_in) v = -v;
    if (offset) v = v + 2048;
    return 12'(v);
  endfunction

  task automatic check_outputs();
    int pa, pb;
    pa = (k == 0) ? 31 : ((k - 1) / 64) % 32;
    pb = (k == 0) ? 7  : ((k - 1) / 4) % 8;
    check(a_data == ref_code(pa, 32, serial_data, 1'b1),
          $sformatf("A data %0d expected %0d (index %0d, bit %0b)", a_data,
                    ref_code(pa, 32, serial_data, 1'b1), pa, serial_data));
    check(b_data == ref_code(pb, 8, serial_data, 1'b0),
          $sformatf("B data %0d expected %0d (index %0d)", $signed(b_data),
                    $signed(ref_code(pb, 8, serial_data, 1'b0)), pb));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    check(a_clk_spi == 1'b0 && b_clk_spi == 1'b0, "clk_spi low with clk");
    serial_data = 1'($urandom);
    #1 check_outputs();
  end

  always @(posedge clk) begin
    #1;
    check(a_clk_spi == 1'b1 && b_clk_spi == 1'b1, "clk_spi high with clk");
    if (!reset) begin
      k++;
      check(a_clk_bpsk == ((k - 1) % 64 == 0), "A clk_bpsk");
      check(a_clk_data == ((k - 1) % 2048 == 0), "A clk_data");
      check(b_clk_bpsk == ((k - 1) % 4 == 0), "B clk_bpsk");
      check(b_clk_data == ((k - 1) % 32 == 0), "B clk_data");
      if (a_clk_bpsk) a_bpsk_pulses++;
      if (a_clk_data) a_data_pulses++;
      serial_data = 1'($urandom);
      #1 check_outputs();
    end
  end

  initial begin
    k = 0; a_bpsk_pulses = 0; a_data_pulses = 0;
    serial_data = 1'b0;
    reset = 1'b0;
    #1 reset = 1'b1;
    #30;
    check(a_clk_bpsk == 1'b0 && a_clk_data == 1'b0, "pulses low in reset");
    check_outputs();
    @(negedge clk) reset = 1'b0;
    repeat (3 * 2048) @(posedge clk);
    #5;
    check(a_bpsk_pulses == 3 * 32, $sformatf("clk_bpsk pulses %0d in 3 periods", a_bpsk_pulses));
    check(a_data_pulses == 3, $sformatf("clk_data pulses %0d in 3 periods", a_data_pulses));
    // asynchronous reset in mid-run
    repeat (777) @(posedge clk);
    #3 reset = 1'b1;
    k = 0;
    #1 check(a_clk_bpsk == 1'b0 && a_clk_data == 1'b0, "pulses cleared by reset");
    check_outputs();
    @(negedge clk) reset = 1'b0;
    repeat (2048 + 100) @(posedge clk);
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
