// Shared body of the rcs2_top testbenches. The including module declares
// localparams NI (inputs), NO (outputs), N_STEPS (random cycles) and
// EXPECT_BAD_DEST, and the DUT instance `dut` connected to the signals
// below. body_done is set when the crossbar scenario has finished; the
// including module prints the result and ends the simulation.
//
// A cycle-accurate model runs beside the DUT: a shadow copy of the node
// configuration updated by the decoder rules, a one-word pre-header stage
// per input, and the matrix routing rules (circuit nodes 10/11 before routed
// nodes 01, highest input first). Every output, source, served flag,
// bad-destination flag, reject flag and node configuration is compared every
// cycle. Counters record how often each mechanism happened; a mechanism
// that never happened counts as a failure.

  localparam int RW = (NI > 1) ? $clog2(NI) : 1;
  localparam int CW = (NO > 1) ? $clog2(NO) : 1;
  localparam int AW = RW + CW;

  logic clk = 1'b0;
  logic rst_n;
  logic          pkt_valid [NI];
  logic [15:0]   pkt       [NI];
  logic          cfg_valid, cfg_priv;
  cfg_type_e     cfg_type;
  logic [AW-1:0] cfg_addr;
  logic [1:0]    cfg_data;
  logic          cfg_reject;
  logic [1:0]    node_cfg  [NI][NO];
  logic          out_valid [NO];
  logic [7:0]    out_data  [NO];
  logic [RW-1:0] out_src   [NO];
  logic          in_served [NI];
  logic          in_bad_dest [NI];

  int checks = 0, failures = 0;
  bit body_done = 1'b0;
  // mechanism counters
  int n_routed = 0, n_contention = 0, n_circuit = 0, n_broadcast = 0;
  int n_wr_node = 0, n_wr_line = 0, n_wr_col = 0, n_refused = 0, n_ru_lock = 0;
  int n_bad_dest = 0, n_latency = 0;

  always #5 clk = ~clk;


  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  logic [1:0]    m_cfg  [NI][NO];
  logic          m_pv   [NI];
  logic [CW-1:0] m_pd   [NI];
  logic [7:0]    m_pp   [NI];
  // expected registered outputs after the coming edge
  logic          e_valid [NO];
  logic [7:0]    e_data  [NO];
  logic [RW-1:0] e_src   [NO];
  logic          e_served [NI];
  logic          e_bad   [NI];
  logic          e_reject;

  function automatic logic iok(input logic [1:0] f);
    return f == 2'b01 || f == 2'b10;
  endfunction

  // Evaluate the model for the inputs now on the DUT ports and advance it.
  task automatic model_step();
    logic [1:0] nxt [NI][NO];
    logic hit, ok, any_hit, any_blk, lock_hit;
    int wrote, nreq, ndel;
    logic [CW-1:0] d;
    // matrix
    for (int r = 0; r < NI; r++) e_served[r] = 0;
    for (int c = 0; c < NO; c++) begin
      e_valid[c] = 0; e_data[c] = 0; e_src[c] = 0; nreq = 0;
      for (int r = 0; r < NI; r++)
        if (m_pv[r] && (m_cfg[r][c] >= 2'b10 || (m_cfg[r][c] == 2'b01 && int'(m_pd[r]) == c)))
          nreq++;
      if (nreq > 1) n_contention++;
      for (int r = NI - 1; r >= 0 && !e_valid[c]; r--)
        if (m_pv[r] && m_cfg[r][c] >= 2'b10) begin
          e_valid[c] = 1; e_src[c] = RW'(r); e_data[c] = m_pp[r]; n_circuit++;
        end
      for (int r = NI - 1; r >= 0 && !e_valid[c]; r--)
        if (m_pv[r] && m_cfg[r][c] == 2'b01 && int'(m_pd[r]) == c) begin
          e_valid[c] = 1; e_src[c] = RW'(r); e_data[c] = m_pp[r]; n_routed++;
        end
      if (e_valid[c]) e_served[e_src[c]] = 1;
    end
    for (int r = 0; r < NI; r++) begin
      ndel = 0;
      for (int c = 0; c < NO; c++) ndel += int'(e_valid[c] && int'(e_src[c]) == r);
      if (ndel == NO && NO > 1) n_broadcast++;
    end
    // decoder
    any_hit = 0; any_blk = 0; wrote = 0; lock_hit = 0;
    for (int r = 0; r < NI; r++)
      for (int c = 0; c < NO; c++) begin
        case (cfg_type)
          CFG_NODE:   hit = int'(cfg_addr[AW-1:CW]) == r && int'(cfg_addr[CW-1:0]) == c;
          CFG_LINE:   hit = int'(cfg_addr[RW-1:0]) == r;
          CFG_COLUMN: hit = int'(cfg_addr[CW-1:0]) == c;
          default:    hit = 0;
        endcase
        hit = hit && cfg_valid;
        ok  = cfg_priv || (iok(cfg_data) && iok(m_cfg[r][c]));
        nxt[r][c] = (hit && ok) ? cfg_data : m_cfg[r][c];
        if (hit && ok) wrote++;
        if (hit && cfg_priv && !iok(cfg_data)) lock_hit = 1;
        any_hit |= hit; any_blk |= hit && !ok;
      end
    e_reject = cfg_valid && (any_blk || !any_hit);
    if (wrote > 0 && cfg_type == CFG_NODE)   n_wr_node++;
    if (wrote > 1 && cfg_type == CFG_LINE)   n_wr_line++;
    if (wrote > 1 && cfg_type == CFG_COLUMN) n_wr_col++;
    if (cfg_valid && !cfg_priv && any_blk)   n_refused++;
    if (lock_hit) n_ru_lock++;
    m_cfg = nxt;
    // pre-header analyzers
    for (int r = 0; r < NI; r++) begin
      d = pkt[r][8 +: CW];
      e_bad[r] = pkt_valid[r] && int'(d) >= NO;
      if (e_bad[r]) n_bad_dest++;
      m_pv[r] = pkt_valid[r] && int'(d) < NO;
      if (pkt_valid[r]) begin m_pd[r] = d; m_pp[r] = pkt[r][7:0]; end
    end
  endtask

  // Drive the inputs, check the reject flag, clock, check the outputs.
  task automatic step(input string tag);
    #1;
    model_step();
    check(cfg_reject == e_reject, {tag, " cfg_reject"});
    @(posedge clk); #1;
    for (int c = 0; c < NO; c++) begin
      check(out_valid[c] == e_valid[c], {tag, " out_valid"});
      check(out_data[c] == e_data[c], {tag, " out_data"});
      if (e_valid[c]) check(out_src[c] == e_src[c], {tag, " out_src"});
    end
    for (int r = 0; r < NI; r++) begin
      check(in_served[r] == e_served[r], {tag, " in_served"});
      check(in_bad_dest[r] == e_bad[r], {tag, " in_bad_dest"});
    end
    for (int r = 0; r < NI; r++)
      for (int c = 0; c < NO; c++) check(node_cfg[r][c] == m_cfg[r][c], {tag, " node_cfg"});
  endtask

  task automatic idle_inputs();
    for (int r = 0; r < NI; r++) begin pkt_valid[r] = 0; pkt[r] = '0; end
    cfg_valid = 0; cfg_priv = 0; cfg_type = CFG_NODE; cfg_addr = '0; cfg_data = '0;
  endtask

  task automatic request(input logic priv, input cfg_type_e t, input int addr, input logic [1:0] data);
    cfg_valid = 1; cfg_priv = priv; cfg_type = t; cfg_addr = AW'(addr); cfg_data = data;
  endtask

  initial begin
    int t0, seen;
    rst_n = 0;
    idle_inputs();
    for (int r = 0; r < NI; r++) begin
      m_pv[r] = 0; m_pd[r] = 0; m_pp[r] = 0;
      for (int c = 0; c < NO; c++) m_cfg[r][c] = 2'b01;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. latency: one packet on input 0 to output 1, find it two edges later
    pkt_valid[0] = 1; pkt[0] = {8'h01, 8'h5A};
    @(posedge clk); t0 = 0; #1;
    pkt_valid[0] = 0;
    seen = -1;
    for (int k = 1; k <= 4 && seen < 0; k++) begin
      if (out_valid[1] && out_data[1] == 8'h5A) seen = k;
      @(posedge clk); #1;
    end
    check(seen == 2, "packet leaves two cycles after it enters");
    if (seen == 2) n_latency++;
    idle_inputs();
    repeat (2) @(posedge clk);
    #1;
    for (int c = 0; c < NO; c++) check(!out_valid[c], "idle after latency test");

    // 2. two packets aimed at the same output: the higher input wins
    pkt_valid[0] = 1; pkt[0] = {8'b00000110, 8'b11111111};
    pkt_valid[1] = 1; pkt[1] = {8'b00001010, 8'b00001111};
    step("contention");
    idle_inputs();
    step("contention drain");
    if (NO > 2)
      check(out_valid[2] && out_data[2] == 8'b00001111 && !in_served[0] && in_served[1],
            "output 3 carries packet 2, packet 1 is dropped");

    // 3. broadcast: an instruction turns line 2 into circuit nodes
    request(0, CFG_LINE, 2, 2'b10);
    step("line write");
    idle_inputs();
    pkt_valid[2] = 1; pkt[2] = {8'h00, 8'hC3};
    step("broadcast");
    idle_inputs();
    step("broadcast drain");
    seen = 0;
    for (int c = 0; c < NO; c++) seen += int'(out_valid[c] && out_data[c] == 8'hC3);
    check(seen == NO, "line of circuit nodes broadcasts to every output");

    // 4. the Reconfiguration Unit locks column 0 open; an instruction may not reopen it
    request(1, CFG_COLUMN, 0, 2'b00);
    step("RU column lock");
    request(0, CFG_NODE, 0, 2'b01);
    step("instruction refused");
    check(node_cfg[0][0] == 2'b00, "locked node unchanged by instruction");
    idle_inputs();
    request(1, CFG_NODE, (1 << CW) | 1, 2'b11);
    step("RU node circuit lock");
    idle_inputs();

    // 5. random traffic and reconfiguration
    for (int k = 0; k < N_STEPS; k++) begin
      for (int r = 0; r < NI; r++) begin
        pkt_valid[r] = 1'($urandom_range(0, 3) != 0);
        pkt[r] = 16'($urandom);
      end
      if ($urandom_range(0, 7) == 0)
        request(1'($urandom_range(0, 3) == 0), cfg_type_e'($urandom_range(0, 3)),
                int'($urandom), 2'($urandom));
      else
        cfg_valid = 0;
      step("random");
    end

    $display("routed=%0d circuit=%0d contention=%0d broadcast=%0d", n_routed, n_circuit,
             n_contention, n_broadcast);
    $display("node_writes=%0d line_writes=%0d column_writes=%0d instr_refused=%0d ru_lock=%0d",
             n_wr_node, n_wr_line, n_wr_col, n_refused, n_ru_lock);
    $display("bad_dest=%0d latency_checked=%0d", n_bad_dest, n_latency);
    check(n_routed > 0, "routed delivery happened");
    check(n_circuit > 0, "circuit delivery happened");
    check(n_contention > 0, "contention happened");
    check(n_broadcast > 0, "broadcast happened");
    check(n_wr_node > 0 && n_wr_line > 0 && n_wr_col > 0, "node, line and column writes happened");
    check(n_refused > 0, "an instruction was refused");
    check(n_ru_lock > 0, "the Reconfiguration Unit wrote 00 or 11");
    if (EXPECT_BAD_DEST) check(n_bad_dest > 0, "an out-of-range destination was dropped");
    body_done = 1'b1;
  end
