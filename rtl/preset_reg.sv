// preset_reg: one-bit register with asynchronous preset.
//
// q takes d on every rising edge of clk. While preset is high, q is forced
// to 1 at once, independent of the clock. This is the storage cell of the
// pseudo-random data generator: presetting every stage puts the generator
// in its all-ones start state. Behaviour and port names follow the original
// register cell; there is nothing of the design's own here.
module preset_reg (
  input  logic clk,
  input  logic preset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge preset) begin
    if (preset) q <= 1'b1;
    else        q <= d;
  end

endmodule
