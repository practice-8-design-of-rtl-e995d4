// real2bit_pkg: elaboration-time conversion between real numbers and the
// signed fixed-point words of constants_pkg, and the sine table of the BPSK
// modulator.
//
// truncate(a, numdec) turns a real into a signed NBITS-bit word with numdec
// fraction bits. The magnitude |a| * 2**numdec is rounded toward zero and
// limited to NBITS-1 bits (at most 2**(NBITS-1) - 1), and the sign of a is
// applied afterwards, so +2.0 with numdec = 10 becomes +2047, not an overflow.
//
// extract(a, numdec) takes the middle NBITS bits of a 2*NBITS-bit product of
// two words, which brings the binary point of the product (at 2*numdec) back
// to numdec. The transmitter does not multiply, so nothing instantiates it;
// it is kept for reuse and is exercised by its testbench.
//
// sine_sample(i, m) is sample i of 2*sin(2*pi*i/m) in that format, and
// initialize_table() fills a full table_t (m = M). With NBITS = 12 and
// NDEC = 10 the samples span -2047 .. +2047, the full signed range, so after
// the half-scale offset the DAC sees 1 .. 4095.
//
// All of this is constant-function code: it runs during elaboration and
// leaves only a table of constants in the hardware.
package real2bit_pkg;

  import constants_pkg::*;

  typedef logic signed [2*NBITS-1:0] double_t;

  function automatic word_t truncate(input real a, input int unsigned numdec = NDEC);
    real         mag;
    int unsigned code;
    mag  = a * (2.0 ** numdec);
    if (mag < 0.0) mag = -mag;
    // Greedy binary search from the top magnitude bit down: keep a bit only
    // if the sum stays at or below the magnitude. This floors the magnitude
    // and saturates it at 2**(NBITS-1) - 1.
    code = 0;
    for (int i = NBITS - 2; i >= 0; i--)
      if (real'(code + (32'd1 << i)) <= mag) code += (32'd1 << i);
    return (a < 0.0) ? word_t'(-int'(code)) : word_t'(code);
  endfunction

  function automatic word_t extract(input double_t a, input int unsigned numdec = NDEC);
    return word_t'(a >>> numdec);
  endfunction

  function automatic word_t sine_sample(input int unsigned i, input int unsigned m);
    return truncate(2.0 * $sin(2.0 * PI / real'(m) * real'(i)));
  endfunction

  function automatic table_t initialize_table();
    table_t result;
    for (int unsigned i = 0; i < M; i++)
      result[i] = truncate(2.0 * $sin(DELTA_PHI * real'(i)));
    return result;
  endfunction

  localparam table_t TABLE_WAVE = initialize_table();

endpackage
