// tb_rcs2_top_5x3: the crossbar built with 5 inputs and 3 outputs, to
// exercise the port-count parameters and the drop of packets whose
// pre-header names an output that does not exist (destination 3). Same
// scenario and model as tb_rcs2_top (see tb_rcs2_top_body.svh).
module tb_rcs2_top_5x3;
  import rcs2_pkg::*;
  localparam int NI = 5;
  localparam int NO = 3;
  localparam int N_STEPS = 20000;
  localparam bit EXPECT_BAD_DEST = 1'b1;

  `include "tb_rcs2_top_body.svh"

  initial begin
    #(10 * (2 * N_STEPS + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (body_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rcs2_top #(.N_IN(NI), .N_OUT(NO)) dut (.*);
endmodule
