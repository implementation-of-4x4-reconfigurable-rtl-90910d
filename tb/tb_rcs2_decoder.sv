// tb_rcs2_decoder: self-checking testbench for the reconfiguration decoder.
// The decoder is combinational: the testbench sets a present configuration
// and a request, waits, and compares every node write enable, the write
// data and the reject flag with its own model. Directed cases cover node,
// line and column requests from both agents and the 00/11 lock; random
// cases cover the rest.
module tb_rcs2_decoder;
  import rcs2_pkg::*;
  localparam int N = 4;

  logic       cfg_valid, cfg_priv;
  cfg_type_e  cfg_type;
  logic [3:0] cfg_addr;
  logic [1:0] cfg_data;
  logic [1:0] node_cfg [N][N];
  logic       node_we  [N][N];
  logic [1:0] node_wdata;
  logic       cfg_reject;

  int checks = 0, failures = 0;
  int n_node = 0, n_line = 0, n_col = 0, n_lock = 0;

  rcs2_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic instr_ok(input logic [1:0] f);
    return f == 2'b01 || f == 2'b10;
  endfunction

  task automatic apply_and_check(input string tag);
    logic exp_we [N][N];
    logic addr_any, block_any, hit, ok;
    addr_any = 0; block_any = 0;
    #1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        case (cfg_type)
          CFG_NODE:   hit = (cfg_addr[3:2] == r[1:0]) && (cfg_addr[1:0] == c[1:0]);
          CFG_LINE:   hit = (cfg_addr[1:0] == r[1:0]);
          CFG_COLUMN: hit = (cfg_addr[1:0] == c[1:0]);
          default:    hit = 0;
        endcase
        hit = hit && cfg_valid;
        ok  = cfg_priv || (instr_ok(cfg_data) && instr_ok(node_cfg[r][c]));
        exp_we[r][c] = hit && ok;
        addr_any  |= hit;
        block_any |= hit && !ok;
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (node_we[r][c] !== exp_we[r][c]) begin
          failures++;
          $display("FAIL %s: node_we[%0d][%0d]=%0b expected %0b", tag, r, c,
                   node_we[r][c], exp_we[r][c]);
        end
      end
    checks++;
    if (cfg_reject !== (cfg_valid && (block_any || !addr_any))) begin
      failures++;
      $display("FAIL %s: cfg_reject=%0b", tag, cfg_reject);
    end
    checks++;
    if (node_wdata !== cfg_data) begin
      failures++;
      $display("FAIL %s: node_wdata", tag);
    end
  endtask

  task automatic count_we(output int n);
    n = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) n += int'(node_we[r][c]);
  endtask

  initial begin
    int n;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) node_cfg[r][c] = 2'b01;
    cfg_valid = 0; cfg_priv = 0; cfg_type = CFG_NODE; cfg_addr = '0; cfg_data = '0;
    apply_and_check("idle");

    // node write by an instruction: node (2,1)
    cfg_valid = 1; cfg_type = CFG_NODE; cfg_addr = 4'b10_01; cfg_data = 2'b10;
    apply_and_check("instr node");
    checks++; if (!(node_we[2][1] && !cfg_reject)) begin failures++; $display("FAIL instr node"); end
    n_node++;
    // line write: all four nodes of input 3 at once
    cfg_type = CFG_LINE; cfg_addr = 4'b00_11;
    apply_and_check("instr line"); count_we(n);
    checks++; if (n != 4 || !node_we[3][0] || !node_we[3][3]) begin failures++; $display("FAIL line"); end
    n_line++;
    // column write: all four nodes of output 2 at once
    cfg_type = CFG_COLUMN; cfg_addr = 4'b00_10;
    apply_and_check("instr column"); count_we(n);
    checks++; if (n != 4 || !node_we[0][2] || !node_we[3][2]) begin failures++; $display("FAIL column"); end
    n_col++;
    // an instruction may not write 00 or 11
    cfg_data = 2'b11;
    apply_and_check("instr writes 11"); count_we(n);
    checks++; if (n != 0 || !cfg_reject) begin failures++; $display("FAIL instr 11"); end
    // nor touch a node holding 00 or 11
    node_cfg[1][2] = 2'b00; node_cfg[3][2] = 2'b11; cfg_data = 2'b01;
    apply_and_check("instr over locked"); count_we(n);
    checks++; if (n != 2 || node_we[1][2] || node_we[3][2] || !cfg_reject) begin failures++; $display("FAIL lock"); end
    n_lock++;
    // the Reconfiguration Unit may
    cfg_priv = 1; cfg_data = 2'b00;
    apply_and_check("RU over locked"); count_we(n);
    checks++; if (n != 4 || cfg_reject) begin failures++; $display("FAIL RU"); end
    // unused type code
    cfg_type = cfg_type_e'(2'b11);
    apply_and_check("bad type");
    checks++; if (!cfg_reject) begin failures++; $display("FAIL bad type"); end

    for (int k = 0; k < 3000; k++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) node_cfg[r][c] = 2'($urandom);
      cfg_valid = 1'($urandom_range(0, 7) != 0);
      cfg_priv  = 1'($urandom);
      cfg_type  = cfg_type_e'(2'($urandom));
      cfg_addr  = 4'($urandom);
      cfg_data  = 2'($urandom);
      apply_and_check("random");
      if (cfg_valid && cfg_type == CFG_NODE)   n_node++;
      if (cfg_valid && cfg_type == CFG_LINE)   n_line++;
      if (cfg_valid && cfg_type == CFG_COLUMN) n_col++;
    end
    $display("node=%0d line=%0d column=%0d lock=%0d", n_node, n_line, n_col, n_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
