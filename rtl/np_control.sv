// np_control: Control module of the frame-processing network processor.
//
// Stores received frames, feeds them to the Process module, stores the
// processed frames it gets back and sends them out again. As in the source
// design it has four parts, one per leg of the datapath:
//   R2M  (receive to memory)  writes the bytes coming from Rx2Mem into the
//        receive memory and, when a frame ends, records its start address
//        and length in the receive frame table.
//   M2P  (memory to process)  on a request from Process, reads either the
//        whole oldest pending frame or one byte of it at a given offset and
//        streams it to Process, one byte per cycle.
//   P2M  (process to memory)  writes the processed frame that Process
//        returns into the transmit memory, counts its bytes, records it in
//        the transmit frame table, reports how much the length changed
//        (Add or Remove instructions lengthen or shorten a frame) and
//        retires the received frame.
//   M2T  (memory to transmit) streams each recorded processed frame back to
//        the network adapter with start and end markers.
//
// Memories: two byte-wide memories of 2**MEM_AW bytes (received and
// processed frames), each with one write and one registered read port, and
// two frame tables of N_FRAMES entries used as circular queues. Both
// memories are written circularly: the frames pending in one memory must not
// exceed its size (not checked). A frame that ends while its table is full
// is not recorded and raises rx_overrun or tx_overrun for one cycle.
//
// Timing: a read request accepted at edge t (p_rd_req while p_rd_ready)
// delivers its first byte at edge t+1 and one byte per cycle after that; the
// transmit stream starts one cycle after a processed frame is recorded. No
// back-pressure: Process and the adapter take one byte per cycle.
// The split into four parts and their duties follow the source design; the
// sizes, the queue discipline (oldest frame first), the two memories and all
// handshakes are this design's choices.
module np_control #(
  parameter int unsigned MEM_AW   = 11,
  parameter int unsigned LEN_W    = 11,
  parameter int unsigned N_FRAMES = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from Rx2Mem
  input  logic                   byte_valid,
  input  logic [7:0]             byte_data,
  input  logic                   byte_sof,
  input  logic                   frame_end,
  input  logic [LEN_W-1:0]       frame_len,
  output logic                   rx_overrun,
  // M2P: frame data to Process
  output logic                   p_frame_valid,  // a received frame is pending
  output logic [LEN_W-1:0]       p_frame_len,    // length of the oldest one
  output logic                   p_rd_ready,
  input  logic                   p_rd_req,
  input  logic                   p_rd_whole,     // 1: whole frame, 0: one byte
  input  logic [LEN_W-1:0]       p_rd_offset,
  output logic                   m2p_valid,
  output logic [7:0]             m2p_data,
  output logic                   m2p_last,
  // P2M: processed frame from Process
  input  logic                   p_wr_valid,
  input  logic [7:0]             p_wr_data,
  input  logic                   p_wr_last,
  output logic                   p2m_done,
  output logic signed [LEN_W:0]  p2m_len_delta,  // new length - old length
  output logic                   tx_overrun,
  // M2T: processed frames to the adapter
  output logic                   tx_valid,
  output logic [7:0]             tx_data,
  output logic                   tx_sof,
  output logic                   tx_last
);

  localparam int unsigned FI_W = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1;

  typedef struct packed {
    logic [MEM_AW-1:0] start;
    logic [LEN_W-1:0]  len;
  } frame_info_t;

  // ------------------------------------------------------------------ R2M
  logic [7:0]        rx_mem [2**MEM_AW];
  frame_info_t       rx_tab [N_FRAMES];
  logic [MEM_AW-1:0] rx_wp;
  logic [MEM_AW-1:0] rx_cur_start;
  logic [MEM_AW-1:0] rx_start_sel;
  logic [FI_W:0]     rx_head, rx_tail, rx_count;
  logic              rx_retire;

  assign rx_count     = rx_head - rx_tail;
  assign rx_start_sel = byte_sof ? rx_wp : rx_cur_start;

  always_ff @(posedge clk) begin
    if (byte_valid) rx_mem[rx_wp] <= byte_data;
    if (frame_end && rx_count < (FI_W+1)'(N_FRAMES))
      rx_tab[rx_head[FI_W-1:0]] <= '{start: rx_start_sel, len: frame_len};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_wp        <= '0;
      rx_cur_start <= '0;
      rx_head      <= '0;
      rx_overrun   <= 1'b0;
    end else begin
      rx_overrun <= 1'b0;
      if (byte_valid) rx_wp <= rx_wp + 1'b1;
      if (byte_valid && byte_sof) rx_cur_start <= rx_wp;
      if (frame_end) begin
        if (rx_count < (FI_W+1)'(N_FRAMES)) rx_head <= rx_head + 1'b1;
        else                                rx_overrun <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ M2P
  frame_info_t       rx_oldest;
  logic              m2p_busy;
  logic [MEM_AW-1:0] m2p_addr;
  logic [LEN_W-1:0]  m2p_left;

  assign rx_oldest     = rx_tab[rx_tail[FI_W-1:0]];
  assign p_frame_valid = (rx_count != '0);
  assign p_frame_len   = rx_oldest.len;
  assign p_rd_ready    = p_frame_valid && !m2p_busy;

  always_ff @(posedge clk) begin
    if (m2p_busy) m2p_data <= rx_mem[m2p_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m2p_busy  <= 1'b0;
      m2p_addr  <= '0;
      m2p_left  <= '0;
      m2p_valid <= 1'b0;
      m2p_last  <= 1'b0;
    end else begin
      m2p_valid <= m2p_busy;
      m2p_last  <= m2p_busy && (m2p_left == LEN_W'(1));
      if (m2p_busy) begin
        m2p_addr <= m2p_addr + 1'b1;
        m2p_left <= m2p_left - 1'b1;
        if (m2p_left == LEN_W'(1)) m2p_busy <= 1'b0;
      end else if (p_rd_req && p_rd_ready) begin
        m2p_busy <= 1'b1;
        if (p_rd_whole) begin
          m2p_addr <= rx_oldest.start;
          m2p_left <= rx_oldest.len;
        end else begin
          m2p_addr <= rx_oldest.start + MEM_AW'(p_rd_offset);
          m2p_left <= LEN_W'(1);
        end
      end
    end
  end

  // ------------------------------------------------------------------ P2M
  logic [7:0]        tx_mem [2**MEM_AW];
  frame_info_t       tx_tab [N_FRAMES];
  logic [MEM_AW-1:0] tx_wp;
  logic [MEM_AW-1:0] tx_cur_start;
  logic              p2m_in_frame;
  logic [LEN_W-1:0]  p2m_len;
  logic [LEN_W-1:0]  p2m_len_next;
  logic [FI_W:0]     tx_head, tx_tail, tx_count;

  assign tx_count     = tx_head - tx_tail;
  assign p2m_len_next = p2m_in_frame ? p2m_len + 1'b1 : LEN_W'(1);
  assign rx_retire    = p_wr_valid && p_wr_last;

  always_ff @(posedge clk) begin
    if (p_wr_valid) tx_mem[tx_wp] <= p_wr_data;
    if (p_wr_valid && p_wr_last && tx_count < (FI_W+1)'(N_FRAMES))
      tx_tab[tx_head[FI_W-1:0]] <= '{start: p2m_in_frame ? tx_cur_start : tx_wp,
                                     len:   p2m_len_next};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_wp         <= '0;
      tx_cur_start  <= '0;
      p2m_in_frame  <= 1'b0;
      p2m_len       <= '0;
      tx_head       <= '0;
      rx_tail       <= '0;
      p2m_done      <= 1'b0;
      p2m_len_delta <= '0;
      tx_overrun    <= 1'b0;
    end else begin
      p2m_done   <= 1'b0;
      tx_overrun <= 1'b0;
      if (p_wr_valid) begin
        tx_wp        <= tx_wp + 1'b1;
        p2m_len      <= p2m_len_next;
        p2m_in_frame <= !p_wr_last;
        if (!p2m_in_frame) tx_cur_start <= tx_wp;
      end
      if (rx_retire) begin
        p2m_done      <= 1'b1;
        p2m_len_delta <= $signed({1'b0, p2m_len_next}) - $signed({1'b0, rx_oldest.len});
        rx_tail       <= rx_tail + 1'b1;
        if (tx_count < (FI_W+1)'(N_FRAMES)) tx_head <= tx_head + 1'b1;
        else                                tx_overrun <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ M2T
  logic              m2t_busy;
  logic              m2t_first;
  logic [MEM_AW-1:0] m2t_addr;
  logic [LEN_W-1:0]  m2t_left;
  frame_info_t       tx_oldest;

  assign tx_oldest = tx_tab[tx_tail[FI_W-1:0]];

  always_ff @(posedge clk) begin
    if (m2t_busy) tx_data <= tx_mem[m2t_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m2t_busy  <= 1'b0;
      m2t_first <= 1'b0;
      m2t_addr  <= '0;
      m2t_left  <= '0;
      tx_tail   <= '0;
      tx_valid  <= 1'b0;
      tx_sof    <= 1'b0;
      tx_last   <= 1'b0;
    end else begin
      tx_valid <= m2t_busy;
      tx_sof   <= m2t_busy && m2t_first;
      tx_last  <= m2t_busy && (m2t_left == LEN_W'(1));
      if (m2t_busy) begin
        m2t_first <= 1'b0;
        m2t_addr  <= m2t_addr + 1'b1;
        m2t_left  <= m2t_left - 1'b1;
        if (m2t_left == LEN_W'(1)) m2t_busy <= 1'b0;
      end else if (tx_count != '0) begin
        m2t_busy  <= 1'b1;
        m2t_first <= 1'b1;
        m2t_addr  <= tx_oldest.start;
        m2t_left  <= tx_oldest.len;
        tx_tail   <= tx_tail + 1'b1;
      end
    end
  end

  // Process may only return a frame while a received one is pending.
  always_ff @(posedge clk) begin
    if (rst_n && rx_retire)
      assert (p_frame_valid) else $error("np_control: processed frame with no frame pending");
  end

  initial begin
    assert (N_FRAMES == (1 << FI_W)) else $error("np_control: N_FRAMES must be a power of two");
    assert (LEN_W <= MEM_AW + 1) else $error("np_control: LEN_W too wide for the memory");
  end

endmodule
