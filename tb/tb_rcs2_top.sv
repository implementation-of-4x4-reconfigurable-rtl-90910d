// tb_rcs2_top: end-to-end testbench of the 4 x 4 crossbar at its default
// parameters. Runs the routing example of two packets contending for one
// output, a broadcast through a line of circuit nodes, locking by the
// Reconfiguration Unit and refusal of an instruction, a latency check, and
// then random traffic and reconfiguration against a cycle-accurate model
// (see tb_rcs2_top_body.svh).
module tb_rcs2_top;
  import rcs2_pkg::*;
  localparam int NI = 4;
  localparam int NO = 4;
  localparam int N_STEPS = 20000;
  localparam bit EXPECT_BAD_DEST = 1'b0;  // every 2-bit destination exists

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

  rcs2_top dut (.*);
endmodule
