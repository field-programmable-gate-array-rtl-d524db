// phase_priority_mux: priority selection of one supply source out of N.
//
// src_live[i] is high while source i+1 delivers voltage; index 0 is the
// highest priority (mains phase R), index N_SOURCES-1 the lowest (the
// generator). The block passes exactly one live source through to the load:
// the first live one in priority order. Its contactor bit in to_contactor is
// driven high and all others low, so two sources are never connected at once.
// When no source is live, every contactor is open and sel reports SRC_NONE.
//
// The source design describes the selector as a 4:1 multiplexer over the
// inputs R, Y, B, G with phase 1 > phase 2 > phase 3 > generator; the one-hot
// contactor output and the source code output sel are this design's choices.
//
// Timing: purely combinational, no clock. The source design has no clock pin;
// a change on src_live reaches to_contactor after gate delay only.
module phase_priority_mux
  import changeover_pkg::*;
#(
  parameter int unsigned N = N_SOURCES  // number of sources, priority = index order
) (
  input  logic [N-1:0] src_live,      // bit i: source of rank i+1 is present
  output logic [N:1]   to_contactor,  // bit k: close the contactor of rank k
  output logic [$clog2(N+1)-1:0] sel  // rank of the chosen source, 0 = none
);

  always_comb begin
    to_contactor = '0;
    sel          = '0;
    // Walk from the lowest priority up so the highest live source wins.
    for (int i = N - 1; i >= 0; i--) begin
      if (src_live[i]) begin
        to_contactor      = '0;
        to_contactor[i+1] = 1'b1;
        sel               = ($clog2(N+1))'(i + 1);
      end
    end
  end

  // Never more than one contactor closed.
  always_comb assert ($onehot0(to_contactor))
    else $error("phase_priority_mux: more than one contactor closed");

endmodule
