// tb_np_rx2mem: self-checking testbench for the receive stage.
// Sends frames of random length (1 to 80 bytes, some back to back, some
// with idle cycles inside the frame) and checks, one cycle after each byte,
// the forwarded byte, the start-of-frame mark on first bytes only, the
// end-of-frame pulse with the frame's length, and the running frame count.
// A second instance with a 4-bit length field checks length saturation.
module tb_np_rx2mem;
  logic clk = 1'b0;
  logic rst_n;
  logic        rx_valid, rx_last;
  logic [7:0]  rx_data;
  logic        byte_valid, byte_sof, frame_end;
  logic [7:0]  byte_data;
  logic [10:0] frame_len;
  logic [31:0] frame_count;
  logic        s_valid, s_sof, s_end;
  logic [7:0]  s_data;
  logic [3:0]  s_len;
  logic [31:0] s_count;

  int checks = 0, failures = 0, n_sat = 0;

  np_rx2mem dut (.*);
  np_rx2mem #(.LEN_W(4)) dut_small (.clk, .rst_n, .rx_valid, .rx_data, .rx_last,
    .byte_valid(s_valid), .byte_data(s_data), .byte_sof(s_sof), .frame_end(s_end),
    .frame_len(s_len), .frame_count(s_count));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, frames;
    rst_n = 0; rx_valid = 0; rx_last = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(frame_count == 0 && !byte_valid && !frame_end, "reset state");
    frames = 0;
    for (int k = 0; k < 300; k++) begin
      len = $urandom_range(1, 80);
      for (int i = 0; i < len; i++) begin
        // idle cycles inside a frame now and then
        while ($urandom_range(0, 9) == 0) begin
          rx_valid = 0;
          @(posedge clk); #1;
          check(!byte_valid && !frame_end && !byte_sof, "idle cycle");
        end
        rx_valid = 1; rx_data = 8'($urandom); rx_last = (i == len - 1);
        @(posedge clk); #1;
        check(byte_valid && byte_data == rx_data, "byte forwarded");
        check(byte_sof == (i == 0), "start of frame on first byte only");
        check(frame_end == (i == len - 1), "end of frame on last byte");
        check(s_sof == byte_sof && s_end == frame_end, "small instance marks");
        if (i == len - 1) begin
          frames++;
          check(frame_len == 11'(len), "frame length");
          check(s_len == ((len > 15) ? 4'd15 : 4'(len)), "saturated length");
          if (len > 15) n_sat++;
        end
        check(frame_count == 32'(frames), "frame count");
      end
      rx_valid = 0; rx_last = 0;
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk); #1;
        check(!byte_valid && !frame_end, "gap between frames");
      end
    end
    check(n_sat > 0, "length saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
