// rcs2_matrix: connection matrix of the RCS-2 crossbar.
//
// An N_IN x N_OUT grid of crosspoint nodes. Each node holds two
// configuration bits (rcs2_pkg::node_cfg_e) that decide whether it connects
// its input line to its output column:
//   00 open; 01 closed only for a packet whose destination is this column;
//   10 and 11 closed as a circuit for every valid word of the input.
// A line configured 10 on every node therefore broadcasts its input to all
// outputs, and any pattern of circuit nodes forms a fixed topology that stays
// in place until it is reconfigured.
//
// Output contention: when several inputs reach one output in the same cycle,
// circuit nodes (10/11) win over pre-header routed nodes (01), and among
// nodes of the same kind the highest-numbered input wins. The losing words
// are dropped; in_served tells, per input, whether its word left by at least
// one output. The source design's simulation shows two packets aimed at the
// same output with the second one delivered, which the highest-index rule
// reproduces; the circuit-first rule is this design's choice.
//
// Timing: outputs are registered. A word on in_valid/in_dest/in_data in
// cycle t appears on out_valid/out_data/out_src in cycle t+1, routed with
// the configuration held during cycle t. Configuration writes (node_we,
// node_wdata, from rcs2_decoder) take effect at the same clock edge for all
// nodes addressed. Synchronous active-low reset sets every node to RESET_CFG
// (default 01: a plain pre-header routed crossbar) and clears the outputs.
// An output with no word has out_valid = 0 and out_data = 0; this stands in
// for the high-impedance state the source design's outputs show.
module rcs2_matrix
  import rcs2_pkg::*;
#(
  parameter int unsigned N_IN      = 4,
  parameter int unsigned N_OUT     = 4,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned DEST_W    = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  parameter int unsigned SRC_W     = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  parameter logic [1:0]  RESET_CFG = NODE_ROUTED
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration writes
  input  logic              node_we   [N_IN][N_OUT],
  input  logic [1:0]        node_wdata,
  output logic [1:0]        node_cfg  [N_IN][N_OUT],
  // input lines (from the pre-header analyzers)
  input  logic              in_valid  [N_IN],
  input  logic [DEST_W-1:0] in_dest   [N_IN],
  input  logic [DATA_W-1:0] in_data   [N_IN],
  // output columns
  output logic              out_valid [N_OUT],
  output logic [DATA_W-1:0] out_data  [N_OUT],
  output logic [SRC_W-1:0]  out_src   [N_OUT],
  output logic              in_served [N_IN]
);

  // Node configuration registers.
  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < N_IN; r++) begin
      for (int unsigned c = 0; c < N_OUT; c++) begin
        if (!rst_n)
          node_cfg[r][c] <= RESET_CFG;
        else if (node_we[r][c])
          node_cfg[r][c] <= node_wdata;
      end
    end
  end

  // Which nodes are closed this cycle, and who wins each column.
  logic              circ_req [N_IN][N_OUT];
  logic              rout_req [N_IN][N_OUT];
  logic              win      [N_IN][N_OUT];
  logic              col_valid [N_OUT];
  logic [SRC_W-1:0]  col_src   [N_OUT];
  logic [DATA_W-1:0] col_data  [N_OUT];
  logic              row_served [N_IN];

  always_comb begin
    for (int unsigned r = 0; r < N_IN; r++) begin
      for (int unsigned c = 0; c < N_OUT; c++) begin
        circ_req[r][c] = in_valid[r] && circuit_format(node_cfg[r][c]);
        rout_req[r][c] = in_valid[r] && (node_cfg[r][c] == NODE_ROUTED)
                         && (32'(in_dest[r]) == c);
        win[r][c]      = 1'b0;
      end
    end
    for (int unsigned c = 0; c < N_OUT; c++) begin
      logic found;
      found        = 1'b0;
      col_src[c]   = '0;
      // circuit nodes first, highest input first
      for (int r = int'(N_IN) - 1; r >= 0; r--) begin
        if (!found && circ_req[r][c]) begin
          found      = 1'b1;
          win[r][c]  = 1'b1;
          col_src[c] = SRC_W'(r);
        end
      end
      for (int r = int'(N_IN) - 1; r >= 0; r--) begin
        if (!found && rout_req[r][c]) begin
          found      = 1'b1;
          win[r][c]  = 1'b1;
          col_src[c] = SRC_W'(r);
        end
      end
      col_valid[c] = found;
      col_data[c]  = found ? in_data[col_src[c]] : '0;
    end
    for (int unsigned r = 0; r < N_IN; r++) begin
      row_served[r] = 1'b0;
      for (int unsigned c = 0; c < N_OUT; c++)
        row_served[r] = row_served[r] || win[r][c];
    end
  end

  // Output registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < N_OUT; c++) begin
        out_valid[c] <= 1'b0;
        out_data[c]  <= '0;
        out_src[c]   <= '0;
      end
      for (int unsigned r = 0; r < N_IN; r++)
        in_served[r] <= 1'b0;
    end else begin
      for (int unsigned c = 0; c < N_OUT; c++) begin
        out_valid[c] <= col_valid[c];
        out_data[c]  <= col_data[c];
        out_src[c]   <= col_src[c];
      end
      for (int unsigned r = 0; r < N_IN; r++)
        in_served[r] <= row_served[r];
    end
  end

  // Each output is driven by at most one input in a cycle.
  always_comb begin
    for (int unsigned c = 0; c < N_OUT; c++) begin
      int unsigned n;
      n = 0;
      for (int unsigned r = 0; r < N_IN; r++) n += 32'(win[r][c]);
      assert (n <= 1) else $error("rcs2_matrix: output %0d granted to %0d inputs", c, n);
    end
  end

endmodule
