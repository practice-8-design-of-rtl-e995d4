// ltc2624_model: behavioural model of the SPI side of an LTC2624 quad
// 12-bit DAC, for simulation only.
//
// While cs_n is low, sdi is shifted into a 32-bit register on each rising
// edge of sck and the previous word is echoed on sdo, MSB first, changing on
// the falling edge of sck. The rising edge of cs_n executes the word: with
// 32 bits received and command 0011 (write and update), the 12-bit code in
// bits 15:4 goes to the channel given by bits 19:16 (0000 A, 0001 B,
// 0010 C, 0011 D, 1111 all). clr_n low clears all four channels at once.
// The analog outputs are represented by their codes; VOUT = code/4096*VREF.
// updates counts executed writes to channel A; last_word holds the last
// word received; bad_frames counts frames whose length was not 32 bits.
module ltc2624_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        sdi,
  input  logic        clr_n,
  output logic        sdo,
  output logic [11:0] code_a,
  output logic [11:0] code_b,
  output logic [11:0] code_c,
  output logic [11:0] code_d,
  output logic [31:0] last_word,
  output int          updates,
  output int          bad_frames
);
  logic [31:0] shift_in;
  logic [31:0] echo;
  int          nbits;

  initial begin
    code_a = '0; code_b = '0; code_c = '0; code_d = '0;
    shift_in = '0; echo = '0; nbits = 0; sdo = 1'b0;
    last_word = '0; updates = 0; bad_frames = 0;
  end

  always @(negedge cs_n) begin
    nbits = 0;
    sdo   = echo[31];
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      shift_in = {shift_in[30:0], sdi};
      nbits++;
    end
  end

  always @(negedge sck) begin
    if (!cs_n && nbits > 0 && nbits < 32) sdo = echo[31 - nbits];
  end

  always @(posedge cs_n) begin
    if (nbits != 32) bad_frames++;
    else begin
      last_word = shift_in;
      echo      = shift_in;
      if (clr_n && shift_in[23:20] == 4'b0011) begin
        case (shift_in[19:16])
          4'b0000: begin code_a = shift_in[15:4]; updates++; end
          4'b0001: code_b = shift_in[15:4];
          4'b0010: code_c = shift_in[15:4];
          4'b0011: code_d = shift_in[15:4];
          4'b1111: begin
            code_a = shift_in[15:4]; code_b = shift_in[15:4];
            code_c = shift_in[15:4]; code_d = shift_in[15:4];
            updates++;
          end
          default: ;
        endcase
      end
    end
  end

  always @(negedge clr_n) begin
    code_a = '0; code_b = '0; code_c = '0; code_d = '0;
  end
endmodule
