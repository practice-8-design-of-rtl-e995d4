// data_gen: pseudo-random serial data source of the BPSK transmitter.
//
// NREG preset_reg cells form a shift chain q[0] -> q[1] -> ... -> q[NREG-1].
// The first stage loads q[0] XOR q[NREG-1]; the bit leaving the chain,
// q[NREG-1], is the serial data. With the default NREG = 4 this is a
// maximal-length sequence of 2**4 - 1 = 15 bits. reset presets every stage
// to 1 (the all-ones state; the all-zeros state is never entered), and sync
// is high while all stages are 1, that is once per sequence period, which
// marks its start.
//
// Timing: the chain shifts on every rising edge of clk. In the transmitter
// clk is the modulator's clk_data, one pulse per carrier period, so each
// data bit lasts a whole period of the sine wave. data and sync are register
// outputs (sync through one AND).
//
// The structure (chain, XOR taps on the first and last stage, AND for sync)
// follows the original design.
module data_gen
  import constants_pkg::*;
#(
  parameter int unsigned NREG = N
) (
  input  logic clk,
  input  logic reset,
  output logic data,
  output logic sync
);

  logic [NREG-1:0] q;
  logic            feedback;

  for (genvar i = 0; i < NREG; i++) begin : g_stage
    if (i == 0) begin : g_first
      preset_reg u_reg (.clk(clk), .preset(reset), .d(feedback), .q(q[0]));
    end else begin : g_next
      preset_reg u_reg (.clk(clk), .preset(reset), .d(q[i-1]),   .q(q[i]));
    end
  end

  assign feedback = q[0] ^ q[NREG-1];
  assign data     = q[NREG-1];
  assign sync     = &q;

endmodule
