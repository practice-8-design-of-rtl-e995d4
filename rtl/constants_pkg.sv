// constants_pkg: sizes and types shared by the BPSK transmitter.
//
// N      number of stages of the pseudo-random data generator (sequence
//        length 2**N - 1 = 15).
// M      number of samples in one period of the sine carrier.
// NBITS  width of a signed fixed-point sample word.
// NDEC   number of those bits that lie right of the binary point.
//
// word_t is a two's-complement NBITS-bit fixed-point number with NDEC fraction
// bits; table_t holds one carrier period of such words. and_vector() is the
// AND of every bit of an N-bit vector; the data generator uses it to flag the
// all-ones state of its register chain.
//
// The values N = 4, M = 32, NBITS = 12 and NDEC = 10 are the design's own.
// PI and DELTA_PHI (2*pi/M) are only used at elaboration time, to fill the
// sine table; they never become hardware.
package constants_pkg;

  localparam int unsigned N     = 4;
  localparam int unsigned M     = 32;
  localparam int unsigned NBITS = 12;
  localparam int unsigned NDEC  = 10;

  typedef logic signed [NBITS-1:0] word_t;
  typedef word_t table_t [M];

  localparam real PI        = 3.1415927;
  localparam real DELTA_PHI = 2.0 * PI / real'(M);

  // AND of all N bits. Kept as a function, as in the original, so that the
  // data generator's sync output reads as "all stages are one".
  function automatic logic and_vector(input logic [N-1:0] vector);
    logic result;
    result = vector[0];
    for (int i = 1; i < N; i++) result &= vector[i];
    return result;
  endfunction

endpackage
