// qdi_pkg: types shared by the dual-rail QDI pipeline.
//
// A dual-rail (DR) bit is a pair of wires {t, f}. {0,0} is the spacer
// (null phase), {1,0} is a logic 1, {0,1} a logic 0 and {1,1} is the illegal
// code word that a transient fault can create. Words are packed arrays of
// dr_bit_t, bit 0 at the right.
//
// wchb_style_e selects the half-buffer variant built by wchb_stage:
//   WCHB_CLASSIC      plain weak-conditioned half buffer (the reference form)
//   WCHB_DEADLOCKING  cross-coupled asymmetric C gates that refuse to return
//                     to null once both rails of a bit are set (fail stop)
//   WCHB_INTERLOCKING cross-coupled asymmetric C gates where the first rail to
//                     rise locks the other rail at zero
package qdi_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_bit_t;

  typedef enum logic [1:0] {
    WCHB_CLASSIC      = 2'd0,
    WCHB_DEADLOCKING  = 2'd1,
    WCHB_INTERLOCKING = 2'd2
  } wchb_style_e;

  // Encode a binary value bit into a dual-rail data token.
  function automatic dr_bit_t dr_encode(input logic b);
    dr_encode.t = b;
    dr_encode.f = ~b;
  endfunction

endpackage
