// rcs2_decoder: reconfiguration decoder of the RCS-2 crossbar.
//
// A reconfiguration request carries three fields, as in the source design:
// a configuration type (node, line or column), an address and 2 bits of
// data. For a node request the address is {row, column} and the one node
// there is written. For a line request the low ROW_W address bits pick an
// input and every node of that line is written; for a column request the low
// COL_W bits pick an output and every node of that column is written. All
// nodes of a line or column are written in parallel, in the same clock edge.
//
// Requests come from two agents, told apart by cfg_priv:
//   cfg_priv = 1  Reconfiguration Unit: may write any format to any node.
//   cfg_priv = 0  an instruction of the network processor: may only write
//                 formats 01 and 10, and only over nodes that currently hold
//                 01 or 10. A node holding 00 or 11 is left unchanged.
// The decoder is combinational. It reads the present node configuration
// (node_cfg) to apply the rule above and drives one write enable per node
// plus the shared write data, which the connection matrix registers.
// cfg_reject is high in the cycle of a request that writes fewer nodes than
// it addresses (forbidden format, locked node, address out of range or an
// unused type code 11).
// What the source design gives: the three request fields, the three types
// and the 01/10 versus 00/11 rule. The request handshake (single-cycle
// cfg_valid, no back-pressure), the address layout, the priv flag and the
// reject flag are this design's choices.
module rcs2_decoder
  import rcs2_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned ROW_W = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  parameter int unsigned COL_W = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  parameter int unsigned ADDR_W = ROW_W + COL_W
) (
  input  logic              cfg_valid,
  input  logic              cfg_priv,
  input  cfg_type_e         cfg_type,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [1:0]        cfg_data,
  input  logic [1:0]        node_cfg [N_IN][N_OUT],
  output logic              node_we  [N_IN][N_OUT],
  output logic [1:0]        node_wdata,
  output logic              cfg_reject
);

  logic [ROW_W-1:0] node_row;
  logic [COL_W-1:0] node_col;
  logic [ROW_W-1:0] line_sel;
  logic [COL_W-1:0] col_sel;

  assign node_row   = cfg_addr[ROW_W+COL_W-1:COL_W];
  assign node_col   = cfg_addr[COL_W-1:0];
  assign line_sel   = cfg_addr[ROW_W-1:0];
  assign col_sel    = cfg_addr[COL_W-1:0];
  assign node_wdata = cfg_data;

  always_comb begin
    logic addressed;
    logic allowed;
    logic any_addr;
    logic any_block;
    any_addr  = 1'b0;
    any_block = 1'b0;
    for (int unsigned r = 0; r < N_IN; r++) begin
      for (int unsigned c = 0; c < N_OUT; c++) begin
        unique case (cfg_type)
          CFG_NODE:   addressed = (32'(node_row) == r) && (32'(node_col) == c);
          CFG_LINE:   addressed = (32'(line_sel) == r);
          CFG_COLUMN: addressed = (32'(col_sel)  == c);
          default:    addressed = 1'b0;
        endcase
        addressed = addressed && cfg_valid;
        allowed   = cfg_priv || (instr_format(cfg_data) && instr_format(node_cfg[r][c]));
        node_we[r][c] = addressed && allowed;
        any_addr  = any_addr  || addressed;
        any_block = any_block || (addressed && !allowed);
      end
    end
    cfg_reject = cfg_valid && (any_block || !any_addr);
  end

endmodule
