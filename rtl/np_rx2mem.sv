// np_rx2mem: receive stage (Rx2Mem) of the frame-processing network processor.
//
// Sits between the network adapter and the Control module. It does the three
// things the source design gives it: it counts every frame received, it
// measures the length of each frame in bytes, and it marks the first byte of
// each frame so that Control can note where that frame starts in its data
// memory.
//
// Interface: the adapter delivers one byte per cycle on rx_valid/rx_data,
// with rx_last on the final byte of a frame (this byte-stream interface is
// this design's choice). Towards Control the same bytes come out one cycle
// later on byte_valid/byte_data with byte_sof on the first byte of a frame
// and frame_end on the last; frame_len, valid with frame_end, is the length
// of that frame, and frame_count is the number of frames completed so far
// (it includes the frame ending in this cycle).
// A frame longer than 2**LEN_W - 1 bytes saturates its length. Reset is
// synchronous, active low.
module np_rx2mem #(
  parameter int unsigned LEN_W = 11,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  input  logic [7:0]       rx_data,
  input  logic             rx_last,
  output logic             byte_valid,
  output logic [7:0]       byte_data,
  output logic             byte_sof,
  output logic             frame_end,
  output logic [LEN_W-1:0] frame_len,
  output logic [CNT_W-1:0] frame_count
);

  logic             in_frame;  // a frame has started and not yet ended
  logic [LEN_W-1:0] len_cnt;   // bytes of the current frame so far
  logic [LEN_W-1:0] len_next;

  assign len_next = in_frame ? ((len_cnt == '1) ? len_cnt : len_cnt + 1'b1)
                             : LEN_W'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame    <= 1'b0;
      len_cnt     <= '0;
      byte_valid  <= 1'b0;
      byte_data   <= '0;
      byte_sof    <= 1'b0;
      frame_end   <= 1'b0;
      frame_len   <= '0;
      frame_count <= '0;
    end else begin
      byte_valid <= rx_valid;
      byte_sof   <= rx_valid && !in_frame;
      frame_end  <= rx_valid && rx_last;
      if (rx_valid) begin
        byte_data <= rx_data;
        len_cnt   <= len_next;
        in_frame  <= !rx_last;
        if (rx_last) begin
          frame_len   <= len_next;
          frame_count <= frame_count + 1'b1;
        end
      end
    end
  end

endmodule
