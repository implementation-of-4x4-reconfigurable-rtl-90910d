// rcs2_pkg: types shared by the blocks of the RCS-2 reconfigurable crossbar.
//
// Every crosspoint node of the connection matrix carries two configuration
// bits. The four formats and their meaning are this design's choice; the
// only rule taken from the source design is that instructions of the network
// processor may write only formats 01 and 10, while 00 and 11 belong to the
// Reconfiguration Unit:
//   00 NODE_OPEN    node open, locked (Reconfiguration Unit only)
//   01 NODE_ROUTED  node closes for a packet whose pre-header names this output
//   10 NODE_CIRCUIT node closed as a circuit for every valid word of its input
//   11 NODE_LOCKED  node closed as a circuit, locked (Reconfiguration Unit only)
// A reconfiguration request addresses one node, one whole line (all nodes of
// one input) or one whole column (all nodes of one output).
package rcs2_pkg;

  typedef enum logic [1:0] {
    NODE_OPEN    = 2'b00,
    NODE_ROUTED  = 2'b01,
    NODE_CIRCUIT = 2'b10,
    NODE_LOCKED  = 2'b11
  } node_cfg_e;

  typedef enum logic [1:0] {
    CFG_NODE   = 2'b00,
    CFG_LINE   = 2'b01,
    CFG_COLUMN = 2'b10
  } cfg_type_e;

  // True for the formats an instruction of the network processor may read
  // over and write; the others belong to the Reconfiguration Unit.
  function automatic logic instr_format(input logic [1:0] fmt);
    return (fmt == NODE_ROUTED) || (fmt == NODE_CIRCUIT);
  endfunction

  // True for formats that keep a node closed regardless of the pre-header.
  function automatic logic circuit_format(input logic [1:0] fmt);
    return (fmt == NODE_CIRCUIT) || (fmt == NODE_LOCKED);
  endfunction

endpackage
