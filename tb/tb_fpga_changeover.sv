// tb_fpga_changeover: end-to-end test of the changeover controller.
//
// Part 1 replays the measured input cases of the reference result table: each
// row gives which of R, Y, B and the generator are on and which source must
// feed the load (rank 1..3 for the mains phases, 4 for the generator, 0 for
// none). The rows are typed in here as data, not derived from the design.
// The three combinations the table omits (two mains phases plus generator
// with phase 1 or 2 leading) are added under the same priority rule.
//
// Part 2 runs an outage story in time: mains present, mains lost, generator
// solenoid energized, generator comes up and takes the load, mains returns
// phase by phase and takes the load back while the solenoid drops.
//
// Every output is checked 1 ns after its input change, which bounds the
// switching time far below the one second the system must meet. The count of
// every mechanism (each source selected, nothing selected, solenoid on,
// solenoid off while the generator runs, mains-to-generator and
// generator-to-mains changeover) must be non-zero. The top is used at its
// defaults, so this is also the full-size test.
module tb_fpga_changeover;
  import changeover_pkg::*;

  int checks = 0;
  int failures = 0;

  logic R_phase, Y_phase, B_phase, Gen_phase;
  logic [4:1] to_contactor;
  logic       gen_solenoid;
  logic [2:0] active_source;

  fpga_changeover dut (.*);

  // Mechanism counters.
  int n_sel[5];          // times each source code (0..4) was observed
  int n_sol_on = 0;      // solenoid energized
  int n_sol_drop = 0;    // solenoid off while the generator is still running
  int n_to_gen = 0;      // load moved from a mains phase to the generator
  int n_to_mains = 0;    // load moved from the generator back to mains

  logic [2:0] prev_src = 3'd0;

  // One row of the result table: {R, Y, B, G} on/off and the expected rank.
  typedef struct packed {
    logic [3:0] on;    // {R, Y, B, G}
    logic [2:0] rank;
  } row_t;

  localparam int NROWS = 16;
  localparam row_t TABLE [NROWS] = '{
    '{4'b1000, 3'd1},  // phase 1 only
    '{4'b0100, 3'd2},  // phase 2 only
    '{4'b0010, 3'd3},  // phase 3 only
    '{4'b0001, 3'd4},  // generator only
    '{4'b1100, 3'd1},  // phases 1, 2
    '{4'b1010, 3'd1},  // phases 1, 3
    '{4'b1001, 3'd1},  // phase 1 and generator
    '{4'b0110, 3'd2},  // phases 2, 3
    '{4'b0101, 3'd2},  // phase 2 and generator
    '{4'b0011, 3'd3},  // phase 3 and generator
    '{4'b1110, 3'd1},  // all mains phases
    '{4'b1111, 3'd1},  // everything on
    '{4'b0000, 3'd0},  // nothing on
    '{4'b1101, 3'd1},  // not in the table: phases 1, 2 and generator
    '{4'b1011, 3'd1},  // not in the table: phases 1, 3 and generator
    '{4'b0111, 3'd2}   // not in the table: phases 2, 3 and generator
  };

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Apply one input set, wait 1 ns, check every output against the rank.
  task automatic apply(input logic [3:0] on, input logic [2:0] rank, input string tag);
    logic [4:1] exp_con;
    {R_phase, Y_phase, B_phase, Gen_phase} = on;
    #1;
    exp_con = (rank == 0) ? 4'b0000 : 4'(1 << (rank - 1));
    chk({tag, " contactor"}, 8'(to_contactor), 8'(exp_con));
    chk({tag, " source"}, 8'(active_source), 8'(rank));
    chk({tag, " solenoid"}, 8'(gen_solenoid), 8'(on[3:1] == 3'b000));
    n_sel[active_source > 4 ? 0 : active_source]++;
    if (gen_solenoid) n_sol_on++;
    if (!gen_solenoid && Gen_phase) n_sol_drop++;
    if (prev_src inside {3'd1, 3'd2, 3'd3} && active_source == 3'(SRC_GEN)) n_to_gen++;
    if (prev_src == 3'(SRC_GEN) && active_source inside {3'd1, 3'd2, 3'd3}) n_to_mains++;
    prev_src = active_source;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_sel[i]) n_sel[i] = 0;
    {R_phase, Y_phase, B_phase, Gen_phase} = 4'b0000;
    #1;

    // Part 1: the result table.
    foreach (TABLE[i]) apply(TABLE[i].on, TABLE[i].rank, $sformatf("table row %0d", i));

    // Part 2: an outage and recovery, step by step.
    apply(4'b1110, 3'd1, "mains healthy");
    apply(4'b0110, 3'd2, "phase 1 lost");
    apply(4'b0010, 3'd3, "phase 2 lost");
    apply(4'b0000, 3'd0, "mains lost, generator starting");
    apply(4'b0001, 3'd4, "generator up");
    apply(4'b0011, 3'd3, "phase 3 back");
    apply(4'b0111, 3'd2, "phase 2 back");
    apply(4'b1111, 3'd1, "phase 1 back");
    apply(4'b1110, 3'd1, "generator stopped");
    apply(4'b0100, 3'd2, "phases 1 and 3 lost");
    apply(4'b0101, 3'd2, "generator running with phase 2");
    apply(4'b0001, 3'd4, "phase 2 lost, straight to generator");
    apply(4'b1001, 3'd1, "phase 1 back");

    // Random walk over the inputs, checked against the priority rule.
    for (int i = 0; i < 200; i++) begin
      logic [3:0] on;
      logic [2:0] rank;
      on = 4'($urandom_range(0, 15));
      rank = on[3] ? 3'd1 : on[2] ? 3'd2 : on[1] ? 3'd3 : on[0] ? 3'd4 : 3'd0;
      apply(on, rank, $sformatf("random %0d", i));
    end

    $display("mechanisms: R=%0d Y=%0d B=%0d GEN=%0d none=%0d solenoid_on=%0d solenoid_drop=%0d to_gen=%0d to_mains=%0d",
             n_sel[1], n_sel[2], n_sel[3], n_sel[4], n_sel[0], n_sol_on, n_sol_drop, n_to_gen, n_to_mains);
    for (int k = 0; k < 5; k++) chk($sformatf("source %0d selected at least once", k), 8'(n_sel[k] > 0), 8'd1);
    chk("solenoid energized at least once", 8'(n_sol_on > 0), 8'd1);
    chk("solenoid dropped with generator running", 8'(n_sol_drop > 0), 8'd1);
    chk("changeover mains to generator", 8'(n_to_gen > 0), 8'd1);
    chk("changeover generator to mains", 8'(n_to_mains > 0), 8'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
