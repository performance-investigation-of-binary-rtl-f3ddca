// sbc_pkg: constants and types shared by the clock-gated synchronous binary
// counters (SBC-1T, SBC-2T, SBC-4T) and their building blocks.
//
// SBC_WIDTH is the counter size the design is presented at (4 bits); the
// same counters are also meant to be built at 8 and 16 bits by overriding
// the WIDTH parameter. edge_e selects the clock edge a T flip-flop reacts to:
// the SBC-4T counter needs a rising-edge LSB and falling-edge upper stages,
// and the SBC-2T counter (this design's choice) uses falling edges throughout.
package sbc_pkg;

  localparam int unsigned SBC_WIDTH = 4;

  typedef enum logic {
    EDGE_RISE = 1'b0,
    EDGE_FALL = 1'b1
  } edge_e;

endpackage
