// tb_anoc_test_mesh20: a test session on a 20-node (5 x 4) mesh, the network
// size of the reference test target.
//
// The GAC sits on the west port of wrapper 0 at the bottom-left corner. The
// node under test is wrapper 19 at the top-left corner, the far end of the
// 20-TCM configuration chain. Wrappers 0, 9 and 10 in the left column are set
// to bypass north<->south (wrapper 0: west<->north), so the test data crosses
// three wrappers without touching their routers. All 19 other TCMs set their
// bypass flag. Wrapper 19 updates the vectors from its south port and loads
// them into the router, which routes south to local. The results are withdrawn
// at local, shifted local->north->east->south and exported back down the
// column to the GAC.
// Checks: all 20 words shifted and updated; afterwards only TCM 19 is left in
// the chain; the analyzer sees no error; the session streams one vector per
// cycle over its 12 register hops; only router 19 carries traffic. A second,
// configuration-only session over the one-TCM chain must read back the
// word of wrapper 19.
module tb_anoc_test_mesh20;
  import anoc_test_pkg::*;

  localparam int MX = 5, MY = 4, NW = MX * MY;
  localparam int LEN_W = $clog2(NW + 1);

  logic             clk = 0, rst_n = 1;
  logic             start;
  logic [LEN_W-1:0] cfg_len;
  instr_t           cfg_word        [NW];
  logic [15:0]      num_vec;
  logic [0:0]       vec_vc;
  logic [31:0]      seed;
  logic             busy, done;
  logic [15:0]      err_count, rx_count;
  logic [31:0]      cycles;
  instr_t           readback        [NW];
  logic [LEN_W-1:0] readback_len;
  logic             tcm_bypassed    [NW];
  sa_fwd_t          node_in_fwd     [NW][NPORTS];
  vc_t              node_in_accept  [NW][NPORTS];
  sa_fwd_t          node_out_fwd    [NW][NPORTS];
  vc_t              node_out_accept [NW][NPORTS];
  sa_fwd_t          edge_in_fwd     [NW][NPORTS];
  vc_t              edge_in_accept  [NW][NPORTS];
  sa_fwd_t          edge_out_fwd    [NW][NPORTS];
  vc_t              edge_out_accept [NW][NPORTS];
  logic [SEL_W-1:0] route           [NPORTS];
  int               forwarded       [NW];
  int               checks = 0, failures = 0;

  anoc_test_top #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  for (genvar c = 0; c < NW; c++) begin : g_node
    anoc_node_model u_node (
      .clk, .rst_n, .route,
      .in_fwd(node_in_fwd[c]),   .in_accept(node_in_accept[c]),
      .out_fwd(node_out_fwd[c]), .out_accept(node_out_accept[c]),
      .forwarded(forwarded[c])
    );
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t bypass_pair(input int a, input int b, input bit flag);
    instr_t w = '0;
    w.bypass_flag = flag;
    w.ctrl[a].in_c  = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(b)};
    w.ctrl[b].out_c = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(a)};
    w.ctrl[b].in_c  = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(a)};
    w.ctrl[a].out_c = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(b)};
    return w;
  endfunction

  initial begin
    instr_t w19, none;
    int     total_other;
    start = 0; cfg_len = 0; num_vec = 0; vec_vc = 0; seed = 32'h1234_5679;
    for (int c = 0; c < NW; c++)
      for (int p = 0; p < NPORTS; p++) begin edge_in_fwd[c][p] = '0; edge_out_accept[c][p] = '1; end
    route[P_WEST] = SEL_W'(P_EAST);   route[P_EAST] = SEL_W'(P_WEST);
    route[P_LOCAL] = SEL_W'(P_NORTH); route[P_NORTH] = SEL_W'(P_SOUTH);
    route[P_SOUTH] = SEL_W'(P_LOCAL);

    none = '0; none.bypass_flag = 1'b1;
    w19 = '0;
    w19.ctrl[P_SOUTH].in_c  = '{mode: IN_LOAD,    src: IN_SRC_NET,   sel: '0};
    w19.ctrl[P_LOCAL].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_NODE, sel: '0};
    w19.ctrl[P_NORTH].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0};
    w19.ctrl[P_EAST].out_c  = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0};
    w19.ctrl[P_SOUTH].out_c = '{mode: OUT_EXPORT, src: OUT_SRC_PREV, sel: '0};
    // cfg_word[i] ends in TCM NW-1-i
    for (int i = 0; i < NW; i++) cfg_word[i] = none;
    cfg_word[NW - 1 - 19] = w19;
    cfg_word[NW - 1 - 10] = bypass_pair(P_SOUTH, P_NORTH, 1'b1);
    cfg_word[NW - 1 - 9]  = bypass_pair(P_SOUTH, P_NORTH, 1'b1);
    cfg_word[NW - 1 - 0]  = bypass_pair(P_WEST,  P_NORTH, 1'b1);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    cfg_len = LEN_W'(NW); num_vec = 16'd500; vec_vc = 1'b1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    #1;
    $display("20-node session: %0d vectors, %0d received, %0d errors, %0d cycles", num_vec, rx_count, err_count, cycles);
    checks++;
    if (rx_count != num_vec || err_count != 0) begin failures++; $display("ERROR: analyzer"); end
    checks++;
    if (cycles != 32'(500 + 12 - 1)) begin failures++; $display("ERROR: %0d cycles, expected %0d", cycles, 500 + 11); end
    checks++;
    if (int'(readback_len) != NW) begin failures++; $display("ERROR: read-back length %0d", readback_len); end
    for (int c = 0; c < NW; c++) begin
      checks++;
      if (tcm_bypassed[c] != (c != 19)) begin failures++; $display("ERROR: TCM %0d bypass flag", c); end
    end
    total_other = 0;
    for (int c = 0; c < NW; c++) if (c != 19) total_other += forwarded[c];
    checks++;
    if (forwarded[19] != 500 || total_other != 0) begin
      failures++; $display("ERROR: router traffic %0d / %0d", forwarded[19], total_other);
    end

    // configuration-only session over the one-TCM chain
    cfg_word[0] = none; cfg_word[0].bypass_flag = 1'b0;
    cfg_len = 1; num_vec = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    #1;
    checks++;
    if (readback_len != 1 || readback[0] != w19) begin failures++; $display("ERROR: second session read-back"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
