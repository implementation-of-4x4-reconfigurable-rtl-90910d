// rcs2_pha: pre-header analyzer (PHA) of one crossbar input.
//
// The network processor prepends a pre-header to each packet that names the
// output port the packet must leave by. A packet word is PRE_W + DATA_W bits
// wide: the pre-header sits in the upper PRE_W bits and the payload in the
// lower DATA_W bits (16 = 8 + 8 at the defaults, as in the 16-bit packets and
// 8-bit outputs of the source design's simulation). The destination output is
// the low DEST_W bits of the pre-header; the remaining pre-header bits are not
// used for routing. The PHA strips the pre-header, so only the payload crosses
// the matrix.
//
// Timing: one register stage. A word presented with pkt_valid in cycle t
// appears on dest/payload/valid in cycle t+1. A pre-header naming an output
// that does not exist (dest >= N_OUT, possible only when N_OUT is not a power
// of two) is dropped and flagged on bad_dest for one cycle.
// Reset (active low, synchronous) clears valid and bad_dest.
// The field layout, the register stage and the drop rule are this design's
// choices; the source design states only that the PHA reads the output
// destination from a pre-header.
module rcs2_pha #(
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PRE_W  = 8,
  parameter int unsigned DEST_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pkt_valid,
  input  logic [PRE_W+DATA_W-1:0]   pkt,
  output logic                      valid,
  output logic [DEST_W-1:0]         dest,
  output logic [DATA_W-1:0]         payload,
  output logic                      bad_dest
);

  logic [DEST_W-1:0] dest_field;
  logic              in_range;

  // pre-header = pkt[PRE_W+DATA_W-1:DATA_W]; its low DEST_W bits name the output
  assign dest_field = pkt[DATA_W +: DEST_W];
  assign in_range   = (32'(dest_field) < N_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      bad_dest <= 1'b0;
      dest     <= '0;
      payload  <= '0;
    end else begin
      valid    <= pkt_valid && in_range;
      bad_dest <= pkt_valid && !in_range;
      if (pkt_valid) begin
        dest    <= dest_field;
        payload <= pkt[DATA_W-1:0];
      end
    end
  end

  initial begin
    assert (DEST_W <= PRE_W) else $error("rcs2_pha: DEST_W must fit in the pre-header");
    assert ((1 << DEST_W) >= N_OUT) else $error("rcs2_pha: DEST_W too narrow for N_OUT");
  end

endmodule
