// fx_pkg: shared types and helpers for the signed fixed-point datapath of the
// buck converter HIL model.
//
// Formats are written as in VHDL-2008 sfixed(H downto L): bit index H is the
// sign bit (weight -2^H) and bit index L is the least significant bit (weight
// 2^L), so the word is H-L+1 bits wide. The notation Qa.b used in the tables
// of the design maps to sfixed(a downto -b).
//
// The two enums select the quantisation behaviour of every resize in the
// model. Round-to-nearest (ties to even) with saturation is the default of the
// VHDL-2008 fixed-point library; truncate and wrap are the cheaper options.
package fx_pkg;

  typedef enum logic {
    FX_ROUND    = 1'b0,  // round to nearest, ties to even
    FX_TRUNCATE = 1'b1   // drop the discarded bits (towards minus infinity)
  } fx_round_e;

  typedef enum logic {
    FX_SATURATE = 1'b0,  // clamp to the largest / most negative value
    FX_WRAP     = 1'b1   // drop the excess high bits (sign may change)
  } fx_overflow_e;

  // Width of sfixed(h downto l).
  function automatic int fx_width(input int h, input int l);
    return h - l + 1;
  endfunction

  // Nearest integer code of a real constant in a format whose LSB is 2^l
  // (half-way values rounded away from zero). Used at elaboration time to
  // build the model constants dt/C, dt/L and 1/R.
  function automatic longint fx_code(input real value, input int l);
    real scaled;
    scaled = value * (2.0 ** (-l));
    return (scaled >= 0.0) ? longint'($floor(scaled + 0.5))
                           : -longint'($floor(-scaled + 0.5));
  endfunction

endpackage
