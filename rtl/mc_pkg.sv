// mc_pkg: shared definitions for the 2's-complement magnitude comparator.
//
// The comparator can be built around any of five full-adder circuit styles.
// They all compute the same Boolean full-adder function; what differs is the
// gate/switch structure that each style uses to get there, which this RTL
// mirrors node for node so the netlists stay recognisable. fa_style_e names
// the style; the comparator's default is the gate-diffusion-input (GDI) style,
// the one the design is built for.
package mc_pkg;

  // Full-adder circuit style.
  typedef enum logic [2:0] {
    FA_MGL = 3'd0,  // majority-gate logic (static CMOS, 32 transistors)
    FA_MAL = 3'd1,  // mirror-adder logic (28 transistors)
    FA_CPL = 3'd2,  // complementary pass-transistor logic
    FA_TGL = 3'd3,  // transmission-gate logic (20 transistors)
    FA_GDI = 3'd4   // gate-diffusion-input logic (10 transistors)
  } fa_style_e;

endpackage
