// tb_real2bit: self-checking test of the fixed-point helpers and the sine
// table.
// truncate: 1.5 with 7 fraction bits is 00001.1000000 (192), -1.5 is
// 11110.1000000 (-192); values are truncated toward zero; magnitudes that do
// not fit are held at 2047. extract: hand-worked products of two words with
// 10 fraction bits. The table: every entry against
// floor(|2*sin(2*pi*i/32)| * 1024), capped at 2047, with the sine's sign,
// computed here with $sin, and the values of a few entries worked by hand.
module tb_real2bit;
  import constants_pkg::*;
  import real2bit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_sample(input int i);
    real s, mag;
    int  code;
    s    = 2.0 * $sin(2.0 * 3.14159265358979 * real'(i) / 32.0);
    mag  = (s < 0.0 ? -s : s) * 1024.0;
    code = int'($floor(mag));
    if (code > 2047) code = 2047;
    return (s < 0.0) ? -code : code;
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    double_t d;
    w = truncate(1.5, 7);    check(w == 12'sb0000_1100_0000, $sformatf("truncate(1.5,7) = %b", w));
    w = truncate(-1.5, 7);   check(w == 12'sb1111_0100_0000, $sformatf("truncate(-1.5,7) = %b", w));
    w = truncate(1.5);       check(w == 12'sd1536, $sformatf("truncate(1.5) = %0d", w));
    w = truncate(0.3);       check(w == 12'sd307,  $sformatf("truncate(0.3) = %0d", w));   // 307.2
    w = truncate(-0.3);      check(w == -12'sd307, $sformatf("truncate(-0.3) = %0d", w));
    w = truncate(2.0);       check(w == 12'sd2047, $sformatf("truncate(2.0) = %0d", w));
    w = truncate(-7.0);      check(w == -12'sd2047, $sformatf("truncate(-7.0) = %0d", w));
    w = truncate(0.0);       check(w == 12'sd0, "truncate(0.0)");
    // 1.5 * -1.25 = -1.875
    d = 24'(1536 * -1280);   w = extract(d); check(w == -12'sd1920, $sformatf("extract(1.5*-1.25) = %0d", w));
    // 0.5 * 0.5 = 0.25
    d = 24'(512 * 512);      w = extract(d); check(w == 12'sd256, $sformatf("extract(0.5*0.5) = %0d", w));
    // 1.75 * 1.0 = 1.75
    d = 24'(1792 * 1024);    w = extract(d); check(w == 12'sd1792, $sformatf("extract(1.75*1) = %0d", w));
    // 7 fraction bits: 1.5 * 1.5 = 2.25
    d = 24'(192 * 192);      w = extract(d, 7); check(w == 12'sd288, $sformatf("extract(1.5*1.5,7) = %0d", w));
    for (int i = 0; i < 32; i++)
      check(TABLE_WAVE[i] == ref_sample(i),
            $sformatf("table[%0d] = %0d expected %0d", i, TABLE_WAVE[i], ref_sample(i)));
    for (int i = 0; i < 32; i++)
      check(sine_sample(i, 32) == TABLE_WAVE[i], $sformatf("sine_sample(%0d,32)", i));
    check(TABLE_WAVE[0] == 0,      "table[0]");
    check(TABLE_WAVE[8] == 2047,   "table[8] (2.0 held at 2047)");
    check(TABLE_WAVE[16] == 0,     "table[16]");
    check(TABLE_WAVE[24] == -2047, "table[24]");
    check(TABLE_WAVE[4] == 1448,   "table[4] (2*sin(pi/4) = 1.41421)");
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
