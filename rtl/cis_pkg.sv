// Shared types and constants of the column-parallel dual-CDS readout.
//
// The readout digitises every column with a single-slope ADC whose per-column
// counter is only 5 to 8 bits wide (the "hold-and-go" counter); the 10-bit
// result comes from one global 10-bit counter that every column samples into
// its own 10-bit memory word. The sizes below (10-bit result, 8-bit column
// counter split into a 5-bit basic part and three configurable bits, analog
// gains of 1x/2x/4x/8x selecting 5/6/7/8 bits) follow the published design.
// The 2-bit encoding of the gain setting is this design's own choice.
package cis_pkg;

  // Resolution of the conversion result and of the global counter.
  localparam int unsigned GCNT_W  = 10;
  // Number of ramp steps of the signal conversion that the global counter covers.
  localparam int unsigned GCNT_SPAN = 1 << GCNT_W;   // 1024
  // Column hold-and-go counter: 5-bit basic counter plus 3 configurable bits.
  localparam int unsigned HAG_W   = 8;
  localparam int unsigned BASIC_W = 5;
  localparam int unsigned CFG_W   = HAG_W - BASIC_W;  // C6, C7, C8

  // Analog gain setting of the ramp; selects the hold-and-go counter length.
  typedef enum logic [1:0] {
    GAIN_1X = 2'd0,   // 5-bit counter, 32-cycle reset conversion
    GAIN_2X = 2'd1,   // 6-bit counter, 64 cycles
    GAIN_4X = 2'd2,   // 7-bit counter, 128 cycles
    GAIN_8X = 2'd3    // 8-bit counter, 256 cycles
  } gain_e;

  // Configuration bits C6..C8 (bit 0 = C6). Thermometer code: a gain of
  // 2^g switches on the lowest g configurable stages.
  function automatic logic [CFG_W-1:0] gain_to_cfg(gain_e g);
    logic [CFG_W-1:0] c;
    for (int i = 0; i < int'(CFG_W); i++) c[i] = (i < int'(g));
    return c;
  endfunction

  // Counter length in bits for a gain setting (5..8).
  function automatic int unsigned gain_to_bits(gain_e g);
    return BASIC_W + int'(g);
  endfunction

endpackage
