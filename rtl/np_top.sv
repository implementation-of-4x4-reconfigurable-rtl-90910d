// np_top: the two pieces of hardware of this design, side by side.
//
//   u_rcs  the 4 x 4 reconfigurable crossbar switch RCS-2 (rcs2_top): packets
//          with a pre-header are routed from four inputs to four outputs
//          through a connection matrix whose 2-bit node configurations are
//          rewritten at run time by node, line or column requests.
//   u_rx / u_ctl  the receive and control path of the frame-processing network
//          processor the crossbar is meant to serve: Rx2Mem (np_rx2mem)
//          counts and measures incoming frames, Control (np_control) stores
//          them, feeds them to the Process module, stores the processed
//          frames and transmits them.
// The source design does not say which network-processor circuits the
// crossbar's ports join, so the two are not wired to each other; every port
// of each is brought out. The Process module (instruction fetch and frame
// editing) is outside this RTL: its side of Control is brought out as the
// p_* / m2p_* / p2m_* ports. So is the Reconfiguration Unit, which drives
// the cfg_* ports with cfg_priv = 1.
// Port timing is that of the blocks: see rcs2_top, np_rx2mem and np_control.
module np_top
  import rcs2_pkg::*;
#(
  parameter int unsigned N_IN     = 4,
  parameter int unsigned N_OUT    = 4,
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned PRE_W    = 8,
  parameter int unsigned ROW_W    = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  parameter int unsigned COL_W    = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  parameter int unsigned MEM_AW   = 11,
  parameter int unsigned LEN_W    = 11,
  parameter int unsigned N_FRAMES = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---- crossbar: packets, reconfiguration, outputs
  input  logic                    pkt_valid [N_IN],
  input  logic [PRE_W+DATA_W-1:0] pkt       [N_IN],
  input  logic                    cfg_valid,
  input  logic                    cfg_priv,
  input  cfg_type_e               cfg_type,
  input  logic [ROW_W+COL_W-1:0]  cfg_addr,
  input  logic [1:0]              cfg_data,
  output logic                    cfg_reject,
  output logic [1:0]              node_cfg  [N_IN][N_OUT],
  output logic                    out_valid [N_OUT],
  output logic [DATA_W-1:0]       out_data  [N_OUT],
  output logic [ROW_W-1:0]        out_src   [N_OUT],
  output logic                    in_served [N_IN],
  output logic                    in_bad_dest [N_IN],
  // ---- network processor: receive from the adapter
  input  logic                    rx_valid,
  input  logic [7:0]              rx_data,
  input  logic                    rx_last,
  output logic [31:0]             frame_count,
  output logic                    rx_overrun,
  // ---- network processor: Process module side of Control
  output logic                    p_frame_valid,
  output logic [LEN_W-1:0]        p_frame_len,
  output logic                    p_rd_ready,
  input  logic                    p_rd_req,
  input  logic                    p_rd_whole,
  input  logic [LEN_W-1:0]        p_rd_offset,
  output logic                    m2p_valid,
  output logic [7:0]              m2p_data,
  output logic                    m2p_last,
  input  logic                    p_wr_valid,
  input  logic [7:0]              p_wr_data,
  input  logic                    p_wr_last,
  output logic                    p2m_done,
  output logic signed [LEN_W:0]   p2m_len_delta,
  output logic                    tx_overrun,
  // ---- network processor: transmit to the adapter
  output logic                    tx_valid,
  output logic [7:0]              tx_data,
  output logic                    tx_sof,
  output logic                    tx_last
);

  rcs2_top #(
    .N_IN  (N_IN),
    .N_OUT (N_OUT),
    .DATA_W(DATA_W),
    .PRE_W (PRE_W),
    .ROW_W (ROW_W),
    .COL_W (COL_W)
  ) u_rcs (
    .clk, .rst_n, .pkt_valid, .pkt,
    .cfg_valid, .cfg_priv, .cfg_type, .cfg_addr, .cfg_data, .cfg_reject, .node_cfg,
    .out_valid, .out_data, .out_src, .in_served, .in_bad_dest
  );

  logic             byte_valid, byte_sof, frame_end;
  logic [7:0]       byte_data;
  logic [LEN_W-1:0] frame_len;

  np_rx2mem #(
    .LEN_W(LEN_W),
    .CNT_W(32)
  ) u_rx (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_last,
    .byte_valid, .byte_data, .byte_sof, .frame_end, .frame_len, .frame_count
  );

  np_control #(
    .MEM_AW  (MEM_AW),
    .LEN_W   (LEN_W),
    .N_FRAMES(N_FRAMES)
  ) u_ctl (
    .clk, .rst_n,
    .byte_valid, .byte_data, .byte_sof, .frame_end, .frame_len, .rx_overrun,
    .p_frame_valid, .p_frame_len, .p_rd_ready, .p_rd_req, .p_rd_whole, .p_rd_offset,
    .m2p_valid, .m2p_data, .m2p_last,
    .p_wr_valid, .p_wr_data, .p_wr_last, .p2m_done, .p2m_len_delta, .tx_overrun,
    .tx_valid, .tx_data, .tx_sof, .tx_last
  );

endmodule
