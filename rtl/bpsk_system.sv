// bpsk_system: complete BPSK transmitter for an FPGA board with an LTC2624
// serial DAC.
//
// Three blocks, wired as in the original block diagram:
//   data_gen        15-bit pseudo-random sequence, one bit per carrier period,
//                   clocked by the modulator's clk_data;
//   bpsk_modulator  divides clk, walks a 32-sample sine table once per data
//                   bit, negates it for a 1 bit and offsets it to an unsigned
//                   12-bit DAC code;
//   com_dac         sends that code to channel A of the DAC in a 32-bit SPI
//                   command every 64 clk cycles, on clk_spi (= clk).
// At a 50 MHz clk the DAC is updated at 781.25 kHz, the carrier is
// 781.25 kHz / 32 = 24.4 kHz and the bit rate equals the carrier frequency.
//
// Interface: clk and an active-high asynchronous reset (also used as the
// generator's preset and, inverted, as the DAC clear); the four SPI wires to
// the DAC; data, the serial bit currently modulating the carrier, for a pin
// or an LED. The generator's sync, the modulator's clk_bpsk and the DAC
// interface's count_out are observation outputs that the system leaves
// unconnected, as the original does.
module bpsk_system
  import constants_pkg::*;
(
  input  logic clk,
  input  logic reset,
  output logic dac_cs,
  output logic spi_mosi,
  output logic spi_sck,
  output logic dac_clr,
  output logic data
);

  logic             clk_data;
  logic             clk_spi;
  logic             serial_data;
  logic [NBITS-1:0] dac_data;

  data_gen u_data_gen (
    .clk   (clk_data),
    .reset (reset),
    .data  (serial_data),
    .sync  ()
  );

  bpsk_modulator u_bpsk (
    .clk         (clk),
    .reset       (reset),
    .serial_data (serial_data),
    .clk_data    (clk_data),
    .clk_spi     (clk_spi),
    .clk_bpsk    (),
    .data        (dac_data)
  );

  com_dac u_com_dac (
    .clk       (clk_spi),
    .reset     (reset),
    .data      (dac_data),
    .dac_cs    (dac_cs),
    .dac_clr   (dac_clr),
    .spi_mosi  (spi_mosi),
    .spi_sck   (spi_sck),
    .count_out ()
  );

  assign data = serial_data;

endmodule
