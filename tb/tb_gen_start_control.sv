// tb_gen_start_control: self-checking test of the generator start signal.
//
// Applies every combination of the three mains presence inputs and checks
// that the solenoid is energized exactly when all three are absent. The
// signal is combinational, so each vector is checked 1 ns after it changes.
// A watchdog ends the run if it hangs.
module tb_gen_start_control;
  int checks = 0;
  int failures = 0;

  logic [2:0] mains;
  logic       sol;

  gen_start_control dut (.mains_live(mains), .gen_solenoid(sol));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    // Go round twice so that every vector is reached from a different one.
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 8; i++) begin
        mains = 3'(pass == 0 ? i : 7 - i);
        #1;
        exp = (mains == 3'b000);
        checks++;
        if (sol !== exp) begin
          failures++;
          $display("FAIL mains=%b solenoid=%b expected %b", mains, sol, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
