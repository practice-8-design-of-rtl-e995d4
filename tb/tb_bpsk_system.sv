// tb_bpsk_system: end-to-end test of the BPSK transmitter at its default
// sizes, with a behavioural LTC2624 model on the SPI pins.
//
// Every DAC update is compared with an independent prediction. Frame n after
// reset (n = 0, 1, ...) carries table index 31 for n = 0 and (n-1) mod 32
// after that, and the data bit that the generator presents after
// j = 0 (n = 0) or (n-1)/32 + 1 shifts; the generator is modelled as a 4-bit
// state (first stage gets stage0 XOR stage3) started at all ones. The
// expected DAC code is 2048 + s or 2048 - s for data 0 or 1, with
// s = floor(|2*sin(2*pi*i/32)| * 1024) capped at 2047 and signed like the
// sine. The test also checks that each frame is 32 bits, that updates come
// every 64 clk cycles, that the data pin matches the model, that the DAC is
// cleared while reset is held, and that operation restarts cleanly after a
// reset in mid-run. Frames the model sees before the first reset (from the
// random power-up state) are not counted.
//
// Events counted, each required at least once: DAC frames, completed sine
// periods, carrier periods sent with data 0 and with data 1, phase flips,
// sync pulses, full generator sequences (15 bits) and mid-run resets.
module tb_bpsk_system;
  logic        clk = 1'b0, reset;
  logic        dac_cs, spi_mosi, spi_sck, dac_clr, data;
  logic        dac_out;
  logic [11:0] code_a, code_b, code_c, code_d;
  logic [31:0] last_word;
  int          updates, bad_frames;
  int          checks = 0, failures = 0;

  // event counters
  int n_frames, n_periods, n_bit0, n_bit1, n_flips, n_sync, n_sequences, n_resets;

  int          frame;      // frame number since reset release
  int          cyc;        // clk cycles since reset release
  int          last_upd_cyc;
  logic        prev_bit;
  int          bad_base;   // bad frames counted before the first reset release

  bpsk_system dut (
    .clk(clk), .reset(reset), .dac_cs(dac_cs), .spi_mosi(spi_mosi),
    .spi_sck(spi_sck), .dac_clr(dac_clr), .data(data));

  ltc2624_model dac (
    .cs_n(dac_cs), .sck(spi_sck), .sdi(spi_mosi), .clr_n(dac_clr), .sdo(dac_out),
    .code_a(code_a), .code_b(code_b), .code_c(code_c), .code_d(code_d),
    .last_word(last_word), .updates(updates), .bad_frames(bad_frames));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int lfsr_bit(input int shifts);
    int s;
    s = 'hf;
    for (int i = 0; i < shifts; i++)
      s = ((s << 1) & 'he) | (((s >> 0) & 1) ^ ((s >> 3) & 1));
    return (s >> 3) & 1;
  endfunction

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) cyc++;

  always @(posedge dut.u_data_gen.sync) if (!reset) n_sync++;

  // every executed DAC write
  always @(updates) begin
    int idx, shifts, b, exp_code;
    if (updates > 0 && !reset) begin
      idx    = (frame == 0) ? 31 : (frame - 1) % 32;
      shifts = (frame == 0) ? 0  : (frame - 1) / 32 + 1;
      b      = lfsr_bit(shifts);
      exp_code = b ? 2048 - ref_sample(idx) : 2048 + ref_sample(idx);
      check(code_a == 12'(exp_code),
            $sformatf("frame %0d: DAC A code %0d expected %0d (index %0d, bit %0d)",
                      frame, code_a, exp_code, idx, b));
      check(last_word[31:24] == 8'h00 && last_word[23:20] == 4'b0011 &&
            last_word[19:16] == 4'b0000 && last_word[3:0] == 4'h0,
            $sformatf("frame %0d: command word %h", frame, last_word));
      if (frame > 0) check(cyc - last_upd_cyc == 64, $sformatf("update interval %0d", cyc - last_upd_cyc));
      last_upd_cyc = cyc;
      n_frames++;
      if (frame > 0 && idx == 31) n_periods++;
      if (frame > 0 && idx == 0) begin
        if (b) n_bit1++; else n_bit0++;
        if (frame > 1 && b != prev_bit) n_flips++;
        if (shifts > 1 && (shifts - 1) % 15 == 0) n_sequences++;
        prev_bit = b;
      end
      frame++;
    end
  end

  // the data pin against the model, at each carrier period boundary
  always @(negedge clk) begin
    if (!reset && cyc > 0 && (cyc - 1) % 2048 == 1)
      check(data == lfsr_bit((cyc - 1) / 2048 + 1),
            $sformatf("data pin %0b at cycle %0d", data, cyc));
  end

  task automatic start();
    frame = 0; cyc = 0; last_upd_cyc = 0;
    @(negedge clk) reset = 1'b0;
  endtask

  initial begin
    n_frames = 0; n_periods = 0; n_bit0 = 0; n_bit1 = 0; n_flips = 0;
    n_sync = 0; n_sequences = 0; n_resets = 0; prev_bit = 1'b0;
    reset = 1'b0;
    #1 reset = 1'b1;
    #40;
    check(dac_clr == 1'b0 && dac_cs == 1'b1, "reset drives dac_clr low and dac_cs high");
    check(data == 1'b1, "generator preset to ones");
    bad_base = bad_frames;
    start();
    // two full generator sequences: 2 * 15 bits * 2048 cycles
    repeat (2 * 15 * 2048 + 100) @(posedge clk);
    // reset in mid-run: the DAC is cleared and the sequence restarts
    @(negedge clk) reset = 1'b1;
    n_resets++;
    #1 check(code_a == 12'd0, "DAC cleared by reset");
    check(data == 1'b1, "generator preset by mid-run reset");
    repeat (3) @(negedge clk);
    start();
    repeat (3 * 2048 + 100) @(posedge clk);
    check(bad_frames == bad_base, $sformatf("%0d frames of wrong length", bad_frames));
    check(updates == n_frames, $sformatf("updates %0d, frames seen %0d", updates, n_frames));
    $display("events: frames=%0d sine_periods=%0d bit0_periods=%0d bit1_periods=%0d phase_flips=%0d sync=%0d sequences=%0d resets=%0d",
             n_frames, n_periods, n_bit0, n_bit1, n_flips, n_sync, n_sequences, n_resets);
    check(n_frames > 0,    "no DAC frame");
    check(n_periods > 0,   "no complete sine period");
    check(n_bit0 > 0,      "no carrier period with data 0");
    check(n_bit1 > 0,      "no carrier period with data 1");
    check(n_flips > 0,     "no phase flip");
    check(n_sync > 0,      "no sync pulse");
    check(n_sequences > 0, "no complete generator sequence");
    check(n_resets > 0,    "no mid-run reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
