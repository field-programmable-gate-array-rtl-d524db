// changeover_pkg: types and constants shared by the power changeover controller.
//
// The controller watches four supply sources: the three phases of the public
// mains, named R, Y and B, and a standby generator, G. The mains phases are
// ranked R (phase 1) above Y (phase 2) above B (phase 3); the generator ranks
// lowest. This ranking and the R, Y, B, G naming follow the source design.
// The numeric encoding of the selected source is this design's own choice:
// 0 means no source is live, otherwise the value is the source's rank, which
// is also the bit index of its contactor output (to_contactor[1..4]).
package changeover_pkg;

  // Number of mains phases and of supply sources in total (mains + generator).
  localparam int unsigned N_MAINS   = 3;
  localparam int unsigned N_SOURCES = N_MAINS + 1;

  // Selected source; value equals the contactor bit that it closes.
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,  // nothing live: every contactor open
    SRC_R    = 3'd1,  // mains phase 1, highest priority
    SRC_Y    = 3'd2,  // mains phase 2
    SRC_B    = 3'd3,  // mains phase 3
    SRC_GEN  = 3'd4   // generator, lowest priority
  } source_e;

endpackage
