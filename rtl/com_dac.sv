// com_dac: SPI master that keeps one channel of an LTC2624 DAC updated.
//
// The interface repeats a 64-cycle frame forever. A counter (count_out)
// runs 1, 2, ..., 63, 0, 1, ... on the rising edges of clk. At count 1 it
// pulls dac_cs low, copies data into bits 15:4 of a 32-bit command word and
// drives bit 31 on spi_mosi; at counts 2 .. 32 it drives bits 30 .. 0, one
// bit per cycle, MSB first. At count 33 dac_cs returns high, which starts
// the conversion in the DAC. Counts 34 .. 63 and 0 are idle time that makes
// the frame as long as one sample period of the modulator.
//
// The command word is: bits 31:24 don't care (sent as 0), 23:20 command
// (CMD = 0011, write and update the addressed channel), 19:16 address
// (ADDR = 0000, channel A), 15:4 the 12-bit unsigned sample, 3:0 don't care
// (sent as 0).
//
// spi_sck is the inverted clk, so spi_mosi changes on the falling edge of
// spi_sck and is stable half a clk period either side of the rising edge on
// which the DAC samples it. dac_clr is the inverted reset, so the DAC is
// cleared while this interface is held in reset. The DAC's serial output
// (the echo of the previous word) is not read: the frame is fire-and-forget.
//
// Interface: clk, active-high asynchronous reset, data[11:0] in; the four SPI
// wires and the 7-bit count_out (for observation) out. data is sampled on
// the clk edge at count 1 only.
//
// The frame timing, word layout and the choice of channel A follow the
// original design. Resetting the whole command word and spi_mosi to 0 (the
// original only sets the command and address fields) is this design's own.
module com_dac #(
  parameter logic [3:0] CMD  = 4'b0011,
  parameter logic [3:0] ADDR = 4'b0000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [11:0] data,
  output logic        dac_cs,
  output logic        dac_clr,
  output logic        spi_mosi,
  output logic        spi_sck,
  output logic [6:0]  count_out
);

  localparam logic [6:0] FRAME_LAST = 7'd64;  // count value that wraps to 0
  localparam logic [6:0] CS_LOW     = 7'd1;   // first bit, chip select low
  localparam logic [6:0] CS_HIGH    = 7'd33;  // after 32 bits, chip select high

  logic [6:0]  count;
  logic [6:0]  count_inc;
  logic [31:0] word;
  logic [4:0]  bit_idx;

  assign count_inc = count + 7'd1;
  // Bit sent at count c (2 .. 32) is 31 - ((c - 1) mod 32).
  assign bit_idx   = 5'd31 - 5'(count_inc - 7'd1);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      count    <= '0;
      word     <= {8'h00, CMD, ADDR, 12'h000, 4'h0};
      dac_cs   <= 1'b1;
      spi_mosi <= 1'b0;
    end else begin
      count <= (count_inc == FRAME_LAST) ? '0 : count_inc;
      unique case (count_inc)
        CS_LOW: begin
          dac_cs      <= 1'b0;
          word[15:4]  <= data;
          word[19:16] <= ADDR;
          spi_mosi    <= word[31];
        end
        CS_HIGH:    dac_cs <= 1'b1;
        FRAME_LAST: ;
        default:    spi_mosi <= word[bit_idx];
      endcase
    end
  end

  assign count_out = count;
  assign spi_sck   = ~clk;
  assign dac_clr   = ~reset;

endmodule
