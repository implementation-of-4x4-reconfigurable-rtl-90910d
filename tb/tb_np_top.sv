// tb_np_top: end-to-end testbench of the whole design at its default
// parameters (4 x 4 crossbar, 2 KiB frame memories, 16-entry frame tables).
//
// Crossbar: the scenario and cycle-accurate model of tb_rcs2_top_body.svh
// (routing, contention, broadcast, node/line/column reconfiguration,
// locking, two-cycle latency), running at the same time as the frame path.
// Frame path: frames of random length enter through the receive port, the
// behavioural Process model reads each one whole and one byte of it, edits
// it (keep, Add a byte, Remove a byte, rewrite a byte) and returns it, and
// the testbench checks every transmitted frame against its own model, the
// frame count and the reported length changes. A closing burst of one-byte
// frames overflows the 16-entry receive frame table; which frames are
// dropped is predicted from the number of frames still pending.
module tb_np_top;
  import rcs2_pkg::*;
  localparam int NI = 4;
  localparam int NO = 4;
  localparam int N_STEPS = 20000;
  localparam bit EXPECT_BAD_DEST = 1'b0;
  localparam int LEN_W = 11;
  localparam int NF = 16;

  bit extra_done = 1'b0;

  `include "tb_rcs2_top_body.svh"

  initial begin
    #(10 * (2 * N_STEPS + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (body_done && extra_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             rx_valid, rx_last;
  logic [7:0]       rx_data;
  logic [31:0]      frame_count;
  logic             rx_overrun;
  logic             p_frame_valid, p_rd_ready, p_rd_req, p_rd_whole;
  logic [LEN_W-1:0] p_frame_len, p_rd_offset;
  logic             m2p_valid, m2p_last;
  logic [7:0]       m2p_data;
  logic             p_wr_valid, p_wr_last;
  logic [7:0]       p_wr_data;
  logic             p2m_done, tx_overrun;
  logic signed [LEN_W:0] p2m_len_delta;
  logic             tx_valid, tx_sof, tx_last;
  logic [7:0]       tx_data;
  int n_frames, n_byte_reads, n_mismatch;

  np_top dut (.*);
  np_process_model #(.LEN_W(LEN_W)) u_proc (.*);

  typedef logic [7:0] frame_t [$];
  frame_t sent_q [$];     // frames whose last byte was just driven
  frame_t exp_tx [$];
  int     exp_delta [$];
  int recorded = 0, done_seen = 0, dropped = 0, overruns_seen = 0, n_sent = 0;
  int n_add = 0, n_remove = 0, n_tx_frames = 0;

  function automatic frame_t process(input frame_t f);
    frame_t o;
    o = f;
    case (f[0][1:0])
      2'd1: o.push_back(~f[f.size()-1]);
      2'd2: if (f.size() > 1) o = f[0:f.size()-2];
      2'd3: o[0] = ~f[0];
      default: ;
    endcase
    return o;
  endfunction

  // monitor of the frame path
  initial begin
    frame_t cur;
    frame_t e;
    frame_t o;
    bit in_f;
    in_f = 0;
    forever begin
      @(posedge clk); #1;
      if (!rst_n) continue;
      if (p2m_done) begin
        done_seen++;
        check(n_mismatch == 0, "Process reads so far returned the stored bytes");
        check(exp_delta.size() > 0, "p2m_done with a frame expected");
        if (exp_delta.size() > 0)
          check(int'(p2m_len_delta) == exp_delta.pop_front(), "length change reported by P2M");
      end
      // a frame whose last byte was clocked into Rx2Mem at the last edge is
      // recorded at the next one unless NF frames are still pending
      while (sent_q.size() > 0) begin
        e = sent_q.pop_front();
        if (recorded - done_seen >= NF) dropped++;
        else begin
          recorded++;
          o = process(e);
          exp_tx.push_back(o);
          exp_delta.push_back(o.size() - e.size());
          if (o.size() > e.size()) n_add++;
          if (o.size() < e.size()) n_remove++;
        end
      end
      if (rx_overrun) overruns_seen++;
      check(!tx_overrun, "no transmit overrun");
      if (tx_valid) begin
        check(tx_sof == !in_f, "tx_sof on first byte only");
        if (!in_f) cur.delete();
        cur.push_back(tx_data);
        in_f = !tx_last;
        if (tx_last) begin
          n_tx_frames++;
          check(exp_tx.size() > 0, "transmitted frame was expected");
          if (exp_tx.size() > 0) begin
            e = exp_tx.pop_front();
            check(cur == e, "transmitted frame contents");
          end
        end
      end
    end
  end

  // driver of the frame path
  initial begin
    frame_t f;
    int len;
    bit burst;
    rx_valid = 0; rx_last = 0; rx_data = 0;
    wait (rst_n);
    for (int k = 0; k < 90; k++) begin
      burst = k >= 60;  // the last 30 frames: one byte each, back to back
      len = burst ? 1 : $urandom_range(1, 64);
      f.delete();
      for (int i = 0; i < len; i++) f.push_back(8'($urandom));
      for (int i = 0; i < len; i++) begin
        @(posedge clk); #2;
        rx_valid = 1; rx_data = f[i]; rx_last = (i == len - 1);
        if (rx_last) begin
          sent_q.push_back(f);
          n_sent++;
        end
      end
      @(posedge clk); #2;
      rx_valid = 0; rx_last = 0;
      if (!burst) repeat ($urandom_range(0, 200)) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    #1;
    check(frame_count == 32'(n_sent), "frame count");
    check(exp_tx.size() == 0, "every recorded frame was transmitted");
    check(dropped > 0, "receive frame table overflowed");
    check(overruns_seen == dropped, "overrun flagged once per dropped frame");
    check(n_mismatch == 0, "Process saw the bytes it expected");
    check(n_byte_reads == recorded, "one single-byte read per frame");
    check(n_add > 0 && n_remove > 0, "frames were lengthened and shortened");
    $display("frames sent=%0d recorded=%0d dropped=%0d transmitted=%0d add=%0d remove=%0d",
             n_sent, recorded, dropped, n_tx_frames, n_add, n_remove);
    extra_done = 1'b1;
  end
endmodule
