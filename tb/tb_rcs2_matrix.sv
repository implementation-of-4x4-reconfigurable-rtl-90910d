// tb_rcs2_matrix: self-checking testbench for the connection matrix.
// Writes node configurations through the write-enable port, drives random
// payloads and destinations on the four inputs and checks, one cycle later,
// every output word, its source and the per-input served flags against a
// model of the routing rules (circuit nodes before routed nodes, highest
// input first). Also checks the reset configuration (all nodes 01), that a
// write lands on exactly the nodes enabled, and that a line of circuit nodes
// broadcasts its input to every output.
module tb_rcs2_matrix;
  import rcs2_pkg::*;
  localparam int N = 4;
  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic       node_we   [N][N];
  logic [1:0] node_wdata;
  logic [1:0] node_cfg  [N][N];
  logic       in_valid  [N];
  logic [1:0] in_dest   [N];
  logic [W-1:0] in_data [N];
  logic       out_valid [N];
  logic [W-1:0] out_data [N];
  logic [1:0] out_src   [N];
  logic       in_served [N];

  int checks = 0, failures = 0;
  int n_contention = 0, n_broadcast = 0, n_circuit_win = 0;

  rcs2_matrix dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic no_writes();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) node_we[r][c] = 1'b0;
  endtask

  // model: expected outputs for the present inputs and configuration
  logic         e_valid [N];
  logic [W-1:0] e_data  [N];
  logic [1:0]   e_src   [N];
  logic         e_served [N];
  task automatic model(input logic [1:0] cfg [N][N]);
    int nreq;
    for (int r = 0; r < N; r++) e_served[r] = 0;
    for (int c = 0; c < N; c++) begin
      e_valid[c] = 0; e_data[c] = 0; e_src[c] = 0; nreq = 0;
      for (int r = 0; r < N; r++)
        if (in_valid[r] && (cfg[r][c] >= 2'b10 || (cfg[r][c] == 2'b01 && in_dest[r] == c[1:0])))
          nreq++;
      if (nreq > 1) n_contention++;
      for (int r = N - 1; r >= 0 && !e_valid[c]; r--)
        if (in_valid[r] && cfg[r][c] >= 2'b10) begin
          e_valid[c] = 1; e_src[c] = r[1:0]; e_data[c] = in_data[r];
        end
      if (e_valid[c]) begin
        for (int r = 0; r < N; r++)
          if (in_valid[r] && cfg[r][c] == 2'b01 && in_dest[r] == c[1:0]) n_circuit_win++;
      end
      for (int r = N - 1; r >= 0 && !e_valid[c]; r--)
        if (in_valid[r] && cfg[r][c] == 2'b01 && in_dest[r] == c[1:0]) begin
          e_valid[c] = 1; e_src[c] = r[1:0]; e_data[c] = in_data[r];
        end
      if (e_valid[c]) e_served[e_src[c]] = 1;
    end
  endtask

  task automatic compare(input string tag);
    for (int c = 0; c < N; c++) begin
      check(out_valid[c] == e_valid[c], {tag, " out_valid"});
      check(out_data[c] == e_data[c], {tag, " out_data"});
      if (e_valid[c]) check(out_src[c] == e_src[c], {tag, " out_src"});
    end
    for (int r = 0; r < N; r++) check(in_served[r] == e_served[r], {tag, " in_served"});
  endtask

  logic [1:0] shadow [N][N];

  initial begin
    int outs;
    rst_n = 0; no_writes(); node_wdata = 0;
    for (int r = 0; r < N; r++) begin in_valid[r] = 0; in_dest[r] = 0; in_data[r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        check(node_cfg[r][c] == 2'b01, "reset configuration is 01");
        shadow[r][c] = 2'b01;
      end

    // source design example: inputs 1 and 2 both aimed at output 3
    in_valid[0] = 1; in_dest[0] = 2'b10; in_data[0] = 8'b11111111;
    in_valid[1] = 1; in_dest[1] = 2'b10; in_data[1] = 8'b00001111;
    model(shadow);
    @(posedge clk); #1;
    compare("example");
    check(out_valid[2] && out_data[2] == 8'b00001111 && !out_valid[0] && !out_valid[1]
          && !out_valid[3], "example: output 3 carries 00001111, others idle");

    // broadcast: line 0 all circuit nodes
    in_valid[1] = 0;
    for (int c = 0; c < N; c++) node_we[0][c] = 1;
    node_wdata = 2'b10;
    @(posedge clk); #1;
    no_writes();
    for (int c = 0; c < N; c++) begin
      check(node_cfg[0][c] == 2'b10, "line write");
      shadow[0][c] = 2'b10;
    end
    for (int c = 0; c < N; c++) check(node_cfg[1][c] == 2'b01, "other lines untouched");
    in_data[0] = 8'hA5;
    model(shadow);
    @(posedge clk); #1;
    compare("broadcast");
    outs = 0;
    for (int c = 0; c < N; c++) outs += int'(out_valid[c] && out_data[c] == 8'hA5);
    check(outs == N, "broadcast reaches all outputs");
    if (outs == N) n_broadcast++;

    // random configurations and traffic
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 3) == 0) begin
        node_wdata = 2'($urandom);
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) node_we[r][c] = 1'($urandom_range(0, 2) == 0);
      end
      for (int r = 0; r < N; r++) begin
        in_valid[r] = 1'($urandom_range(0, 3) != 0);
        in_dest[r]  = 2'($urandom);
        in_data[r]  = 8'($urandom);
      end
      model(shadow);
      @(posedge clk); #1;
      compare("random");
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) if (node_we[r][c]) shadow[r][c] = node_wdata;
      no_writes();
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) check(node_cfg[r][c] == shadow[r][c], "configuration");
    end
    $display("contention=%0d circuit_over_routed=%0d broadcast=%0d",
             n_contention, n_circuit_win, n_broadcast);
    check(n_contention > 0 && n_circuit_win > 0, "contention cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
