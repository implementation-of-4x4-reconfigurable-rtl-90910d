// np_process_model: behavioural stand-in for the Process module of the
// network processor, for testbenches only (its instruction set is not part
// of this RTL).
//
// For each pending frame it asks Control for the whole frame, then asks for
// one byte at offset (length / 2) and compares it with the copy it holds,
// then writes a processed frame back. The "instruction" applied is picked
// from the low two bits of the frame's first byte:
//   0 keep the frame as it is
//   1 Add:    append one byte, the bitwise inverse of the last byte
//   2 Remove: drop the last byte (frames of one byte are kept)
//   3 rewrite the first byte to its bitwise inverse
// Counters of reads, writes and byte-read mismatches are outputs.
module np_process_model #(
  parameter int unsigned LEN_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             p_frame_valid,
  input  logic [LEN_W-1:0] p_frame_len,
  input  logic             p_rd_ready,
  output logic             p_rd_req,
  output logic             p_rd_whole,
  output logic [LEN_W-1:0] p_rd_offset,
  input  logic             m2p_valid,
  input  logic [7:0]       m2p_data,
  input  logic             m2p_last,
  output logic             p_wr_valid,
  output logic [7:0]       p_wr_data,
  output logic             p_wr_last,
  output int               n_frames,
  output int               n_byte_reads,
  output int               n_mismatch
);

  logic [7:0] buf_q [$];
  logic [7:0] out_q [$];

  initial begin
    int len, off;
    p_rd_req = 0; p_rd_whole = 0; p_rd_offset = '0;
    p_wr_valid = 0; p_wr_data = '0; p_wr_last = 0;
    n_frames = 0; n_byte_reads = 0; n_mismatch = 0;
    wait (rst_n);
    forever begin
      @(posedge clk); #1;
      if (!(p_frame_valid && p_rd_ready)) continue;
      len = int'(p_frame_len);
      // whole-frame read
      p_rd_req = 1; p_rd_whole = 1;
      @(posedge clk); #1;
      p_rd_req = 0;
      buf_q.delete();
      do begin
        @(posedge clk); #1;
        if (m2p_valid) buf_q.push_back(m2p_data);
      end while (!(m2p_valid && m2p_last));
      if (buf_q.size() != len) n_mismatch++;
      // single-byte read
      off = len / 2;
      p_rd_req = 1; p_rd_whole = 0; p_rd_offset = LEN_W'(off);
      @(posedge clk); #1;
      p_rd_req = 0;
      do begin @(posedge clk); #1; end while (!m2p_valid);
      n_byte_reads++;
      if (!m2p_last || m2p_data != buf_q[off]) n_mismatch++;
      // process
      out_q = buf_q;
      case (buf_q[0][1:0])
        2'd1: out_q.push_back(~buf_q[len-1]);
        2'd2: if (len > 1) void'(out_q.pop_back());
        2'd3: out_q[0] = ~buf_q[0];
        default: ;
      endcase
      // write back
      for (int i = 0; i < out_q.size(); i++) begin
        p_wr_valid = 1; p_wr_data = out_q[i]; p_wr_last = (i == out_q.size() - 1);
        @(posedge clk); #1;
      end
      p_wr_valid = 0; p_wr_last = 0;
      n_frames++;
    end
  end

endmodule
