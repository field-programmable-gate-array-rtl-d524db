// fpga_changeover: automatic power changeover controller (top level).
//
// The controller decides which supply feeds the load. Four presence signals
// come in, one per source: the mains phases R_phase (phase 1), Y_phase
// (phase 2), B_phase (phase 3) and the generator, Gen_phase. Each is high
// while that source delivers voltage. Out go four contactor drives,
// to_contactor[1..4] for R, Y, B and the generator in that order, and the
// generator start solenoid.
//
//  * phase_priority_mux closes exactly one contactor, that of the highest
//    priority live source (R > Y > B > generator), and opens all of them
//    when nothing is live.
//  * gen_start_control energizes the generator solenoid while no mains phase
//    is live and drops it as soon as one returns.
//
// The port names of the four inputs and of to_contactor follow the pin list
// of the source design; gen_solenoid and active_source are this design's
// own outputs (the source design describes the solenoid signal but lists no
// pin for it). The sensing of 220 V phases into logic levels and the
// contactors themselves are outside this logic.
//
// Timing: purely combinational; there is no clock. Outputs follow the inputs
// after gate delay, far inside the sub-second switching time the source
// design reports for the whole system.
module fpga_changeover
  import changeover_pkg::*;
(
  input  logic        R_phase,        // mains phase 1 present
  input  logic        Y_phase,        // mains phase 2 present
  input  logic        B_phase,        // mains phase 3 present
  input  logic        Gen_phase,      // generator output present
  output logic [4:1]  to_contactor,   // 1 = close: [1] R, [2] Y, [3] B, [4] generator
  output logic        gen_solenoid,   // 1 = energize the generator start solenoid
  output logic [2:0]  active_source   // source_e code of the source feeding the load
);

  logic [N_MAINS-1:0]   mains_live;
  logic [N_SOURCES-1:0] src_live;

  // Priority order: index 0 is the highest.
  assign mains_live = {B_phase, Y_phase, R_phase};
  assign src_live   = {Gen_phase, mains_live};

  phase_priority_mux #(.N(N_SOURCES)) u_mux (
    .src_live     (src_live),
    .to_contactor (to_contactor),
    .sel          (active_source)
  );

  gen_start_control #(.NM(N_MAINS)) u_gen (
    .mains_live   (mains_live),
    .gen_solenoid (gen_solenoid)
  );

endmodule
