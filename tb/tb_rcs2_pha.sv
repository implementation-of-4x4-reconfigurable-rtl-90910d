// tb_rcs2_pha: self-checking testbench for the pre-header analyzer.
// Drives random packet words into two instances, the default 4-output one
// and a 3-output one (where destination 3 does not exist), and checks the
// registered destination, payload, valid and bad_dest one cycle later
// against fields cut out of the driven word by the testbench itself.
module tb_rcs2_pha;
  localparam int DATA_W = 8;
  localparam int PRE_W  = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic pkt_valid;
  logic [PRE_W+DATA_W-1:0] pkt;

  logic       v4, bad4, v3, bad3;
  logic [1:0] d4, d3;
  logic [DATA_W-1:0] p4, p3;

  int checks = 0, failures = 0;
  int n_bad = 0;

  rcs2_pha #(.N_OUT(4)) dut4 (.clk, .rst_n, .pkt_valid, .pkt,
    .valid(v4), .dest(d4), .payload(p4), .bad_dest(bad4));
  rcs2_pha #(.N_OUT(3)) dut3 (.clk, .rst_n, .pkt_valid, .pkt,
    .valid(v3), .dest(d3), .payload(p3), .bad_dest(bad3));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic             exp_v;
    logic [1:0]       exp_d;
    logic [DATA_W-1:0] exp_p;
    rst_n = 1'b0; pkt_valid = 1'b0; pkt = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!v4 && !bad4 && !v3 && !bad3, "outputs clear after reset");
    rst_n = 1'b1;
    // the two words of the source design's simulation
    pkt = 16'b0000011011111111; pkt_valid = 1'b1;
    @(posedge clk); #1;
    check(v4 && d4 == 2'b10 && p4 == 8'b11111111, "packet1: dest 10, payload ff");
    pkt = 16'b0000101000001111;
    @(posedge clk); #1;
    check(v4 && d4 == 2'b10 && p4 == 8'b00001111, "packet2: dest 10, payload 0f");
    for (int k = 0; k < 400; k++) begin
      pkt_valid = 1'($urandom_range(0, 3) != 0);
      pkt = 16'($urandom);
      exp_v = pkt_valid;
      exp_d = pkt[9:8];
      exp_p = pkt[7:0];
      @(posedge clk); #1;
      check(v4 == exp_v && bad4 == 1'b0, "4-output valid");
      if (exp_v) check(d4 == exp_d && p4 == exp_p, "4-output dest/payload");
      check(v3 == (exp_v && exp_d != 2'd3), "3-output valid");
      check(bad3 == (exp_v && exp_d == 2'd3), "3-output bad_dest");
      if (v3) check(d3 == exp_d && p3 == exp_p, "3-output dest/payload");
      if (bad3) n_bad++;
    end
    check(n_bad > 0, "an out-of-range destination was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
