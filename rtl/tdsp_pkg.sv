// Shared types and constants of the temperature DSP (TDSP).
//
// The TDSP watches an 8-bit on-chip temperature ADC, converts each code to
// degrees Celsius, classes the temperature as low, average or high and
// reports the result to the CPU over an APB slave port. The data width of
// 8 bits is the design's; the limit constants below are this design's own
// choice, picked so that the temperatures the reference simulation shows in
// each range land in that range (-9 C low, 47 C average, 59 C high).
package tdsp_pkg;

  // Width of the ADC code and of every temperature inside the TDSP.
  parameter int unsigned TEMP_W = 8;

  // Temperatures are signed two's-complement degrees Celsius inside the TDSP.
  typedef logic signed [TEMP_W-1:0] temp_t;
  typedef logic        [TEMP_W-1:0] adc_code_t;

  // Default limits of the watchdog, in degrees Celsius.
  parameter int LOW_LIMIT_C    = 0;   // below this: low range
  parameter int HIGH_DEFAULT_C = 50;  // above this: high range, until the host writes a reference

  // Voltage-to-temperature table: temp = slope * code + offset, saturated.
  parameter int LUT_SLOPE  = 2;
  parameter int LUT_OFFSET = -27;

  // Number of PCLK cycles between two ADC samples.
  parameter int unsigned COUNT_CYCLES = 8;

  // Range a temperature falls in.
  typedef enum logic [1:0] {
    RANGE_NONE    = 2'd0,   // no valid sample yet
    RANGE_LOW     = 2'd1,
    RANGE_AVERAGE = 2'd2,
    RANGE_HIGH    = 2'd3
  } temp_range_e;

  // Table entry for one ADC code: slope * code + offset, clipped to the
  // range of a signed number of the given width.
  function automatic int lut_entry(input int code, input int slope, input int offset,
                                   input int width);
    int t;
    t = slope * code + offset;
    if (t > (2 ** (width - 1)) - 1) t = (2 ** (width - 1)) - 1;
    if (t < -(2 ** (width - 1)))    t = -(2 ** (width - 1));
    return t;
  endfunction

endpackage
