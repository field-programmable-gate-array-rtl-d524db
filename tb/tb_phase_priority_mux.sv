// tb_phase_priority_mux: self-checking test of the priority source selector.
//
// Two instances are tested: the four-source configuration of the changeover
// controller, over every input combination, and a six-source instance over
// every combination, to exercise the parameter. The expected contactor and
// rank are computed here from the lowest set bit of the input (x & -x), not
// by the loop the block uses. Since the block is combinational, each vector
// is checked 1 ns after it is applied. A watchdog ends the run if it hangs.
module tb_phase_priority_mux;
  import changeover_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] live4;
  logic [4:1] con4;
  logic [2:0] sel4;

  logic [5:0] live6;
  logic [6:1] con6;
  logic [2:0] sel6;

  phase_priority_mux dut4 (.src_live(live4), .to_contactor(con4), .sel(sel4));
  phase_priority_mux #(.N(6)) dut6 (.src_live(live6), .to_contactor(con6), .sel(sel6));

  function automatic int rank_of(input logic [7:0] lowbit);
    for (int k = 0; k < 8; k++) if (lowbit[k]) return k + 1;
    return 0;
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, low;
    live4 = '0;
    live6 = '0;
    // Four sources: R, Y, B, generator.
    for (int i = 0; i < 16; i++) begin
      live4 = 4'(i);
      #1;
      v   = 8'(i);
      low = v & (~v + 8'd1);
      check($sformatf("N=4 contactor, live=%b", live4), 8'(con4), low);
      check($sformatf("N=4 sel, live=%b", live4), 8'(sel4), 8'(rank_of(low)));
    end
    // Named cases of the changeover rules.
    live4 = 4'b1000; #1; check("generator alone", 8'(sel4), 8'(SRC_GEN));
    live4 = 4'b1001; #1; check("R beats generator", 8'(sel4), 8'(SRC_R));
    live4 = 4'b1110; #1; check("Y beats B and generator", 8'(sel4), 8'(SRC_Y));
    live4 = 4'b1100; #1; check("B beats generator", 8'(sel4), 8'(SRC_B));
    live4 = 4'b0000; #1; check("nothing live", 8'(sel4), 8'(SRC_NONE));
    // Six sources.
    for (int i = 0; i < 64; i++) begin
      live6 = 6'(i);
      #1;
      v   = 8'(i);
      low = v & (~v + 8'd1);
      check($sformatf("N=6 contactor, live=%b", live6), 8'(con6), low);
      check($sformatf("N=6 sel, live=%b", live6), 8'(sel6), 8'(rank_of(low)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
