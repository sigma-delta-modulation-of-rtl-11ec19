// sdm_pkg: constants shared by the multi-phase sigma-delta controller.
//
// The controller reduces an M-bit command (PI regulator output or external
// command) to an N-bit count of active converter phases and spreads that count
// over P = 2**N parallel phases. The defaults below are the eight-phase system
// of the design: a 12-bit command, a 3-bit modulator output and eight phases,
// a 4-bit balancer rotation divider, and a 24 MHz clock divided by 13 to give
// the ~1.85 MHz sample rate. The PI gain format (16-bit unsigned, 8 fraction
// bits) is this implementation's own choice.
package sdm_pkg;
  localparam int unsigned DEF_M        = 12;  // command width (bits)
  localparam int unsigned DEF_N        = 3;   // modulator output width (bits)
  localparam int unsigned DEF_DIV_W    = 4;   // balancer divider width (bits)
  localparam int unsigned DEF_CLK_DIV  = 13;  // system clocks per sample
  localparam int unsigned DEF_GAIN_W   = 16;  // PI gain width
  localparam int unsigned DEF_FRAC     = 8;   // PI gain fraction bits

  // Largest command the N-bit output can follow on average: every phase but
  // one of the 2**N phases on, i.e. (2**N - 1) * 2**(M-N).
  function automatic int unsigned cmd_max(int unsigned m, int unsigned n);
    return ((1 << n) - 1) << (m - n);
  endfunction
endpackage
