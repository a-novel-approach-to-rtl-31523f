// sine_pkg: shared constants and the formula for the look-up-table sine generator.
//
// One period of a sine wave is sampled at NUM_POINTS evenly spaced phases and
// scaled into the unsigned range 0..MAX_AMP (offset binary, mid-scale at the
// zero crossing):
//
//   sample(i) = round( (MAX_AMP / 2) * (1 + sin(2*pi*i / NUM_POINTS) ) )
//
// with halves rounded up. For 32 points and MAX_AMP = 255 this gives the
// reference table 128,152,176,198,218,234,245,253,255,...,0,...,79,103.
// The function is only used at elaboration time to fill the ROM; no real
// arithmetic reaches the hardware.
package sine_pkg;

  // Default configuration: 32 samples per period, 8-bit samples, full scale 255.
  parameter int unsigned DEF_NUM_POINTS = 32;
  parameter int unsigned DEF_MAX_AMP    = 255;

  localparam real PI = 3.14159265358979323846;

  // Bits needed to hold 0..max_amp.
  function automatic int unsigned amp_width(int unsigned max_amp);
    return (max_amp < 1) ? 1 : $clog2(max_amp + 1);
  endfunction

  // Sample i of a sine period of num_points samples, scaled to 0..max_amp.
  function automatic int unsigned sine_sample(int unsigned idx,
                                              int unsigned num_points,
                                              int unsigned max_amp);
    real r;
    r = (real'(max_amp) / 2.0) *
        (1.0 + $sin(2.0 * PI * real'(idx) / real'(num_points)));
    if (r < 0.0) r = 0.0;
    return int'($floor(r + 0.5));
  endfunction

endpackage
