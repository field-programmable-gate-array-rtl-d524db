// gen_start_control: start signal for the standby generator.
//
// The generator solenoid is energized while no mains phase is live, which
// starts the generator, and de-energized as soon as any mains phase returns.
// The source design states this rule; the output is the NOR of the mains
// presence inputs. Whether the generator itself is running plays no part.
//
// Timing: purely combinational, no clock.
module gen_start_control
  import changeover_pkg::N_MAINS;
#(
  parameter int unsigned NM = N_MAINS  // number of mains phases
) (
  input  logic [NM-1:0] mains_live,   // bit i: mains phase i+1 is present
  output logic          gen_solenoid  // 1: energize the generator solenoid
);

  always_comb gen_solenoid = ~|mains_live;

endmodule
