// Shared constants and helpers of the polyphase filter bank channelizer.
//
// PROTO28 is the default 28-tap prototype lowpass, one coefficient per tap in
// impulse-response order h(0)..h(27), signed Q1.15. The channelizer's main
// configuration (4 channels, 7 taps per phase) uses a 28-coefficient
// prototype but its values are not published, so this design supplies its own:
// a Hamming-windowed sinc, h(n) = 2*fc*sinc(2*fc*(n-13.5)) *
// (0.54 - 0.46*cos(2*pi*n/27)), cutoff fc = fs/8 (half the channel spacing of
// a 4-channel bank), normalised to a DC gain of 32734/32768 and rounded.
// It is symmetric, so its time-reversed order is the same.
//
// scaled_width() gives the output width of a stage that drops SHIFT LSBs from
// a full-precision result, the optional truncation/scaling every stage offers.
package pfb_pkg;

  localparam int PROTO_TAPS   = 28;
  localparam int PROTO_COEF_W = 16;

  typedef logic [PROTO_TAPS-1:0][PROTO_COEF_W-1:0] proto28_t;

  // Packed array: element [27] is written first, element [0] last.
  localparam proto28_t PROTO28 = {
    -16'sd57,   -16'sd30,   16'sd45,    16'sd172,   16'sd269,   16'sd168,
    -16'sd245,  -16'sd840,  -16'sd1177, -16'sd683,  16'sd976,   16'sd3563,
    16'sd6247,  16'sd7959,  16'sd7959,  16'sd6247,  16'sd3563,  16'sd976,
    -16'sd683,  -16'sd1177, -16'sd840,  -16'sd245,  16'sd168,   16'sd269,
    16'sd172,   16'sd45,    -16'sd30,   -16'sd57
  };

  // Width after dropping SHIFT least significant bits of a FULL_W-bit value.
  function automatic int scaled_width(int full_w, int shift);
    return full_w - shift;
  endfunction

endpackage
