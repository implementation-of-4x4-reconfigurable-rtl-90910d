// rcs2_top: RCS-2, a reconfigurable N_IN x N_OUT crossbar switch for a
// network processor (4 x 4 at the defaults).
//
// Three kinds of block, as in the source design:
//   * one pre-header analyzer (rcs2_pha) per input, which reads the output
//     destination from the packet's pre-header and strips it;
//   * the decoder (rcs2_decoder), which turns a reconfiguration request
//     (type, address, data) into writes of the 2-bit node configurations of
//     one node, one line or one column;
//   * the connection matrix (rcs2_matrix), which holds those configurations
//     and moves payloads from inputs to outputs through the closed nodes.
// The port count is the first level of reconfiguration (parameters N_IN and
// N_OUT); the node configuration bits, rewritten at run time, are the second.
//
// Interface:
//   pkt_valid/pkt[i]  one packet word per input per cycle, pre-header in the
//                     upper PRE_W bits, payload in the lower DATA_W bits.
//   cfg_*             reconfiguration request, one per cycle. cfg_priv = 1
//                     marks the Reconfiguration Unit, 0 an instruction of the
//                     network processor (see rcs2_decoder for the rules).
//   out_valid/out_data/out_src[o]  payload leaving output o and the input
//                     it came from.
//   in_served[i]      the word of input i left by at least one output.
//   in_bad_dest[i]    the word of input i named a non-existent output.
//   cfg_reject        the request in this cycle was refused in part or whole.
//   node_cfg          the present configuration of every node.
// Timing: a packet word clocked into the PHA register at edge t is routed
// in the following cycle and appears on the outputs after edge t+1 (two
// register stages). in_served lines up with the outputs; in_bad_dest with
// the PHA stage. A reconfiguration request is written at the next edge, to
// every node it addresses at once, and governs the words routed after it.
// All of these are this design's choices; the source design gives no timing.
module rcs2_top
  import rcs2_pkg::*;
#(
  parameter int unsigned N_IN      = 4,
  parameter int unsigned N_OUT     = 4,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned PRE_W     = 8,
  parameter logic [1:0]  RESET_CFG = NODE_ROUTED,
  parameter int unsigned ROW_W     = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  parameter int unsigned COL_W     = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  parameter int unsigned ADDR_W    = ROW_W + COL_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // packets in
  input  logic                    pkt_valid [N_IN],
  input  logic [PRE_W+DATA_W-1:0] pkt       [N_IN],
  // reconfiguration requests
  input  logic                    cfg_valid,
  input  logic                    cfg_priv,
  input  cfg_type_e               cfg_type,
  input  logic [ADDR_W-1:0]       cfg_addr,
  input  logic [1:0]              cfg_data,
  output logic                    cfg_reject,
  output logic [1:0]              node_cfg  [N_IN][N_OUT],
  // payloads out
  output logic                    out_valid [N_OUT],
  output logic [DATA_W-1:0]       out_data  [N_OUT],
  output logic [ROW_W-1:0]        out_src   [N_OUT],
  output logic                    in_served [N_IN],
  output logic                    in_bad_dest [N_IN]
);

  logic              pha_valid   [N_IN];
  logic [COL_W-1:0]  pha_dest    [N_IN];
  logic [DATA_W-1:0] pha_payload [N_IN];
  logic              node_we     [N_IN][N_OUT];
  logic [1:0]        node_wdata;

  for (genvar i = 0; i < N_IN; i++) begin : g_pha
    rcs2_pha #(
      .N_OUT (N_OUT),
      .DATA_W(DATA_W),
      .PRE_W (PRE_W),
      .DEST_W(COL_W)
    ) u_pha (
      .clk      (clk),
      .rst_n    (rst_n),
      .pkt_valid(pkt_valid[i]),
      .pkt      (pkt[i]),
      .valid    (pha_valid[i]),
      .dest     (pha_dest[i]),
      .payload  (pha_payload[i]),
      .bad_dest (in_bad_dest[i])
    );
  end

  rcs2_decoder #(
    .N_IN  (N_IN),
    .N_OUT (N_OUT),
    .ROW_W (ROW_W),
    .COL_W (COL_W),
    .ADDR_W(ADDR_W)
  ) u_decoder (
    .cfg_valid (cfg_valid),
    .cfg_priv  (cfg_priv),
    .cfg_type  (cfg_type),
    .cfg_addr  (cfg_addr),
    .cfg_data  (cfg_data),
    .node_cfg  (node_cfg),
    .node_we   (node_we),
    .node_wdata(node_wdata),
    .cfg_reject(cfg_reject)
  );

  rcs2_matrix #(
    .N_IN     (N_IN),
    .N_OUT    (N_OUT),
    .DATA_W   (DATA_W),
    .DEST_W   (COL_W),
    .SRC_W    (ROW_W),
    .RESET_CFG(RESET_CFG)
  ) u_matrix (
    .clk       (clk),
    .rst_n     (rst_n),
    .node_we   (node_we),
    .node_wdata(node_wdata),
    .node_cfg  (node_cfg),
    .in_valid  (pha_valid),
    .in_dest   (pha_dest),
    .in_data   (pha_payload),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_src   (out_src),
    .in_served (in_served)
  );

endmodule
