// bpsk_modulator: sine-table BPSK modulator and clock generator of the
// transmitter.
//
// A counter on clk runs through DIVIDE*SAMPLES states (64*32 = 2048). Every
// DIVIDE clk cycles it raises clk_bpsk for one clk cycle, and once per
// DIVIDE*SAMPLES cycles it raises clk_data for one cycle, at the same edge
// as a clk_bpsk pulse. DIVIDE = 64 is the length of one DAC interface frame,
// so the sample handed to the DAC interface never changes inside a frame;
// SAMPLES = M makes every data bit last exactly one carrier period.
//
// On each rising edge of clk_bpsk a pointer steps through the SAMPLES
// entries of a table holding 2*sin(2*pi*i/SAMPLES) as signed words (see
// real2bit_pkg). The pointer is preset to SAMPLES-1 by reset, so the first
// clk_bpsk pulse selects entry 0. The selected sample is passed on as is
// when serial_data is 0 and negated when it is 1: a 180-degree phase flip,
// which is binary phase shift keying. With DAC_OFFSET = 1 (the hardware
// build) half of full scale, 2**(NBITS-1), is added so that the DAC, which
// only takes unsigned codes, receives a wave centred at VREF/2; with
// DAC_OFFSET = 0 the signed two's-complement sample is output, which is the
// form that is easier to read in a waveform viewer.
//
// Interface: clk and an active-high asynchronous reset in; serial_data from
// the data generator in. clk_data clocks the data generator, clk_spi (clk
// itself) clocks the DAC interface, clk_bpsk is the internal sample clock
// brought out for observation. data is combinational from the pointer and
// serial_data.
//
// Timing: clk_bpsk and clk_data are registered pulses that rise one clk edge
// after the counter passes a multiple of DIVIDE (resp. zero); they act as
// clocks for the pointer and for the data generator, exactly as in the
// original design, which clocks those registers from divided clocks rather
// than with clock enables. Everything above, including the numbers, follows
// the original design; the parameterisation of DIVIDE and SAMPLES is this
// design's own.
module bpsk_modulator
  import constants_pkg::*;
  import real2bit_pkg::*;
#(
  parameter int unsigned SAMPLES    = M,
  parameter int unsigned DIVIDE     = 64,
  parameter bit          DAC_OFFSET = 1'b1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             serial_data,
  output logic             clk_data,
  output logic             clk_spi,
  output logic             clk_bpsk,
  output logic [NBITS-1:0] data
);

  localparam int unsigned PERIOD = DIVIDE * SAMPLES;
  localparam int unsigned CW     = $clog2(PERIOD);
  localparam int unsigned PW     = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;

  typedef word_t wave_t [SAMPLES];

  function automatic wave_t build_wave();
    wave_t w;
    for (int unsigned i = 0; i < SAMPLES; i++) w[i] = sine_sample(i, SAMPLES);
    return w;
  endfunction

  logic [CW-1:0] count;
  logic [PW-1:0] pointer;
  word_t         sample;
  word_t         value;

  // Clock divider: one-cycle pulses on clk_bpsk every DIVIDE cycles and on
  // clk_data every PERIOD cycles.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      count    <= '0;
      clk_bpsk <= 1'b0;
      clk_data <= 1'b0;
    end else begin
      if (count == '0) begin
        clk_bpsk <= 1'b1;
        clk_data <= 1'b1;
      end else if (count % CW'(DIVIDE) == '0) begin
        clk_bpsk <= 1'b1;
      end else begin
        clk_bpsk <= 1'b0;
        clk_data <= 1'b0;
      end
      count <= (count == CW'(PERIOD - 1)) ? '0 : count + 1'b1;
    end
  end

  // Table pointer, advanced by the sample clock.
  always_ff @(posedge clk_bpsk or posedge reset) begin
    if (reset)                               pointer <= PW'(SAMPLES - 1);
    else if (pointer == PW'(SAMPLES - 1))    pointer <= '0;
    else                                     pointer <= pointer + 1'b1;
  end

  // Sine table: the shared table of real2bit_pkg at the default size, a
  // table of the same form built here for any other SAMPLES.
  if (SAMPLES == M) begin : g_pkg_table
    assign sample = TABLE_WAVE[pointer];
  end else begin : g_own_table
    localparam wave_t WAVE = build_wave();

    assign sample = WAVE[pointer];
  end

  assign value  = serial_data ? -sample : sample;

  if (DAC_OFFSET) begin : g_offset
    assign data = value + word_t'(2 ** (NBITS - 1));
  end else begin : g_signed
    assign data = value;
  end

  assign clk_spi = clk;

endmodule
