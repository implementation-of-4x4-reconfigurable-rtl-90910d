// tb_np_control: self-checking testbench for the Control module.
// Drives received frames of random length (1 to 64 bytes) and random gaps
// straight into the R2M inputs, lets the behavioural Process model read,
// modify and return each one, and checks: every processed frame leaves the
// M2T port byte for byte as the testbench's own model of the Process rule
// predicts, with start and end markers; the length change reported by P2M;
// the single-byte reads of M2P; and that a frame arriving while the receive
// frame table is full is dropped with rx_overrun. The frame table is cut to
// 4 entries so that bursts of short frames overflow it; enough bytes pass
// for the receive and transmit memories to wrap several times.
module tb_np_control;
  localparam int LEN_W = 11;
  localparam int NF    = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic             byte_valid, byte_sof, frame_end;
  logic [7:0]       byte_data;
  logic [LEN_W-1:0] frame_len;
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

  np_control #(.N_FRAMES(NF)) dut (.*);
  np_process_model #(.LEN_W(LEN_W)) u_proc (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int recorded = 0, done_seen = 0, dropped = 0, overruns_seen = 0;
  int n_add = 0, n_remove = 0, n_tx_frames = 0;
  bit sending_done = 0;

  typedef logic [7:0] frame_t [$];
  frame_t exp_tx [$];     // processed frames expected on M2T, in order
  int     exp_delta [$];  // expected length changes, in order

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

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

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: P2M results, overruns, M2T frames
  initial begin
    frame_t cur;
    frame_t e;
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

  // driver
  initial begin
    frame_t f;
    frame_t o;
    int len, gap;
    bit burst, drop;
    rst_n = 0; byte_valid = 0; byte_sof = 0; frame_end = 0; byte_data = 0; frame_len = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      burst = (k % 50) >= 40;           // every 50 frames, 10 short ones back to back
      len = burst ? $urandom_range(1, 3) : $urandom_range(1, 64);
      f.delete();
      for (int i = 0; i < len; i++) f.push_back(8'($urandom));
      for (int i = 0; i < len; i++) begin
        @(posedge clk); #2;
        byte_valid = 1; byte_data = f[i]; byte_sof = (i == 0);
        frame_end = (i == len - 1); frame_len = LEN_W'(len);
        if (frame_end) begin
          drop = (recorded - done_seen) >= NF;
          if (drop) dropped++;
          else begin
            recorded++;
            o = process(f);
            exp_tx.push_back(o);
            exp_delta.push_back(o.size() - len);
            if (o.size() > len) n_add++;
            if (o.size() < len) n_remove++;
          end
        end
      end
      @(posedge clk); #2;
      byte_valid = 0; byte_sof = 0; frame_end = 0;
      gap = burst ? 0 : $urandom_range(0, 150);
      repeat (gap) @(posedge clk);
    end
    // drain
    repeat (3000) @(posedge clk);
    check(exp_tx.size() == 0, "every recorded frame was transmitted");
    check(dropped > 0 && overruns_seen == dropped, "overrun flagged once per dropped frame");
    check(n_mismatch == 0, "Process saw the bytes it expected (whole and single-byte reads)");
    check(n_byte_reads == recorded, "one single-byte read per frame");
    check(n_add > 0 && n_remove > 0, "frames were lengthened and shortened");
    $display("recorded=%0d dropped=%0d transmitted=%0d add=%0d remove=%0d byte_reads=%0d",
             recorded, dropped, n_tx_frames, n_add, n_remove, n_byte_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
