// dmps_pkg: shared types and constants of the divide-by-32/33 dual-modulus
// pre-scaler.
//
// The pre-scaler has one mode-control input. A high level selects the
// divide-by-32 ratio and a low level the divide-by-33 ratio, as in the
// published circuit. The enum below names the two levels so that
// testbenches and users of the pre-scaler do not have to remember the
// polarity. The ratio constants follow from the structure: a 2/3 pre-scaler
// followed by DIV_STAGES divide-by-2 stages divides by 2 * 2**DIV_STAGES, or
// by one input cycle more when one 2/3 cycle is stretched to three.
package dmps_pkg;

  // Mode-control levels (1 = divide by 32, 0 = divide by 33).
  typedef enum logic {
    MODE_DIV33 = 1'b0,
    MODE_DIV32 = 1'b1
  } dmps_mode_e;

  // Number of divide-by-2 stages after the 2/3 pre-scaler in the 32/33 design.
  localparam int unsigned DEFAULT_DIV_STAGES = 4;

  // Division ratio for a given number of divide-by-2 stages and mode.
  function automatic int unsigned div_ratio(int unsigned stages, dmps_mode_e mode);
    return (2 << stages) + ((mode == MODE_DIV33) ? 1 : 0);
  endfunction

endpackage
