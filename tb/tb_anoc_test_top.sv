// tb_anoc_test_top: end-to-end test of the 2 x 2 mesh with its GAC, at the
// default parameters.
//
// Every wrapper encloses a router model that routes west->east, east->west,
// local->north, north->south and south->local. Wrapper 0 is bottom left,
// 1 bottom right, 2 top right and 3 top left; the GAC sits on wrapper 0's
// west port. The run goes through four phases:
//   0. Normal mode, before any test: a packet enters wrapper 3 from the west
//      edge and leaves wrapper 2 on the east edge. The wrappers are
//      transparent, so it takes only the two routers' cycles.
//   1. Session A configures all four TCMs. Wrapper 0 is a pure bypass
//      (west<->east) with its TCM bypass flag set, and wrappers 2 and 3 are
//      transparent with their flags set. Wrapper 1 is the node under test:
//      vectors are updated from west and loaded into the node, and the
//      results (east) are withdrawn, shifted east->south->west and exported
//      back through wrapper 0's bypass to the GAC.
//   2. Session B goes over the shortened chain (only wrapper 1 is left). It
//      shifts the vectors from the west cell to the local cell before loading
//      them, withdraws the results at north, and exports them on west, on the
//      other VC. The word read back must be session A's word for wrapper 1.
//   3. Session C, configuration only, reads back session B's word.
//   4. After a reset (which clears every bypass flag), session D tests the
//      resource on wrapper 0's local port. A loopback model stands in for the
//      network interface and IP. Wrapper 0 bypasses west->local and
//      local->west, so its router is not touched.
// The GAC's analyzer must see every vector in order with no error. Each
// session must stream one vector per cycle: 'cycles' equals the number of
// vectors plus the register hops of the path, minus one. The bench counts each
// mechanism (normal pass, bypass, TCM bypass, update, shift, load, withdraw,
// export, read-back) and fails if one never happens.
module tb_anoc_test_top;
  import anoc_test_pkg::*;

  localparam int NW = 4;

  logic             clk = 0, rst_n = 1;
  logic             start;
  logic [2:0]       cfg_len;
  instr_t           cfg_word        [NW];
  logic [15:0]      num_vec;
  logic [0:0]       vec_vc;
  logic [31:0]      seed;
  logic             busy, done;
  logic [15:0]      err_count, rx_count;
  logic [31:0]      cycles;
  instr_t           readback        [NW];
  logic [2:0]       readback_len;
  logic             tcm_bypassed    [NW];
  sa_fwd_t          node_in_fwd     [NW][NPORTS];
  vc_t              node_in_accept  [NW][NPORTS];
  sa_fwd_t          node_out_fwd    [NW][NPORTS];
  vc_t              node_out_accept [NW][NPORTS];
  sa_fwd_t          edge_in_fwd     [NW][NPORTS];
  sa_fwd_t          edge_drv        [NW][NPORTS];
  vc_t              edge_in_accept  [NW][NPORTS];
  sa_fwd_t          edge_out_fwd    [NW][NPORTS];
  vc_t              edge_out_accept [NW][NPORTS];
  logic [SEL_W-1:0] route           [NPORTS];
  int               forwarded       [NW];
  int               checks = 0, failures = 0;

  anoc_test_top dut (.*);

  for (genvar c = 0; c < NW; c++) begin : g_node
    anoc_node_model u_node (
      .clk, .rst_n, .route,
      .in_fwd(node_in_fwd[c]),   .in_accept(node_in_accept[c]),
      .out_fwd(node_out_fwd[c]), .out_accept(node_out_accept[c]),
      .forwarded(forwarded[c])
    );
  end

  // Resource model on the local port of wrapper 0: it returns every flit it
  // receives (a loopback IP behind its network interface).
  logic [SEL_W-1:0] ip_route [NPORTS];
  sa_fwd_t          ip_in    [NPORTS];
  vc_t              ip_in_acc[NPORTS];
  sa_fwd_t          ip_out   [NPORTS];
  vc_t              ip_out_acc[NPORTS];
  int               ip_forwarded;
  anoc_node_model u_ip (
    .clk, .rst_n, .route(ip_route),
    .in_fwd(ip_in), .in_accept(ip_in_acc), .out_fwd(ip_out), .out_accept(ip_out_acc),
    .forwarded(ip_forwarded)
  );
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      ip_route[p]   = SEL_W'(p);
      ip_in[p]      = '0;
      ip_out_acc[p] = '0;
    end
    ip_in[P_LOCAL]      = edge_out_fwd[0][P_LOCAL];
    ip_out_acc[P_LOCAL] = edge_in_accept[0][P_LOCAL];
    edge_in_fwd = edge_drv;
    edge_in_fwd[0][P_LOCAL] = ip_out[P_LOCAL];
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {M_NORMAL, M_BYPASS, M_TCM_BYPASS, M_UPDATE, M_UPDATE_OP, M_SHIFT_IN,
                    M_LOAD, M_WITHDRAW, M_SHIFT_OUT, M_EXPORT, M_READBACK, M_IP_TEST, M_NUM} mech_e;
  int    mech [M_NUM];
  string mech_name [M_NUM] = '{"normal pass", "wrapper bypass", "TCM bypass", "instruction update",
                               "vector update", "vector shift", "vector load", "result withdraw",
                               "result shift", "result export", "configuration read-back",
                               "resource test via local bypass"};

  for (genvar c = 0; c < NW; c++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      always @(posedge clk) if (rst_n) begin
        if (dut.g_wrap[c].u_wrapper.ctrl[p].in_c.mode == IN_NORMAL &&
            node_in_fwd[c][p].send != '0) mech[M_NORMAL]++;
        if (dut.g_wrap[c].u_wrapper.g_port[p].u_in.byp_out.send != '0) mech[M_BYPASS]++;
        if (dut.g_wrap[c].u_wrapper.g_port[p].u_in.buf_in.send != '0) begin
          if (dut.g_wrap[c].u_wrapper.ctrl[p].in_c.src == IN_SRC_NET) mech[M_UPDATE_OP]++;
          else mech[M_SHIFT_IN]++;
        end
        if (dut.g_wrap[c].u_wrapper.ctrl[p].in_c.mode == IN_LOAD &&
            node_in_fwd[c][p].send != '0) mech[M_LOAD]++;
        if (dut.g_wrap[c].u_wrapper.g_port[p].u_out.buf_in.send != '0) begin
          if (dut.g_wrap[c].u_wrapper.ctrl[p].out_c.src == OUT_SRC_NODE) mech[M_WITHDRAW]++;
          else mech[M_SHIFT_OUT]++;
        end
        if (dut.g_wrap[c].u_wrapper.ctrl[p].out_c.mode == OUT_EXPORT &&
            dut.g_wrap[c].u_wrapper.net_out_fwd[p].send != '0) mech[M_EXPORT]++;
      end
    end
    always @(posedge clk) if (rst_n && tcm_bypassed[c] && dut.ctl_send[c]) mech[M_TCM_BYPASS]++;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.inst_update) mech[M_UPDATE]++;
    if (dut.ctl_send[NW]) mech[M_READBACK]++;
  end

  // ---------------- edge traffic (normal mode) ----------------
  int      edge_got, edge_first, cyc;
  sa_fwd_t edge_q [$];
  vc_t     edge_acc_q;
  always @(posedge clk) begin
    cyc++;
    edge_acc_q <= edge_in_accept[3][P_WEST];
    if (rst_n) begin
      for (int c = 0; c < NW; c++)
        for (int p = 0; p < NPORTS; p++)
          if (edge_out_fwd[c][p].send != '0) begin
            checks++;
            if (c == 0 && p == P_LOCAL) mech[M_IP_TEST]++;
            else if (c != 2 || p != P_EAST || edge_q.size() == 0) begin
              failures++; $display("ERROR: flit leaves the mesh at wrapper %0d port %0d", c, p);
            end else begin
              sa_fwd_t e;
              e = edge_q.pop_front();
              if (e != edge_out_fwd[c][p]) begin failures++; $display("ERROR: edge flit corrupted"); end
            end
            if (!(c == 0 && p == P_LOCAL)) begin
              if (edge_first < 0) edge_first = cyc;
              edge_got++;
            end
          end
    end
  end

  function automatic instr_t bypass_we();
    instr_t w = '0;
    w.bypass_flag = 1'b1;
    w.ctrl[P_WEST].in_c  = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(P_EAST)};
    w.ctrl[P_EAST].out_c = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(P_WEST)};
    w.ctrl[P_EAST].in_c  = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(P_WEST)};
    w.ctrl[P_WEST].out_c = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(P_EAST)};
    return w;
  endfunction

  task automatic session(input int len, input int n, input int vc, input int hops, input string what);
    cfg_len = 3'(len); num_vec = 16'(n); vec_vc = 1'(vc); seed = $urandom() | 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    #1;
    $display("%s: %0d vectors, %0d received, %0d errors, %0d cycles", what, n, rx_count, err_count, cycles);
    checks++;
    if (rx_count != 16'(n) || err_count != 0) begin failures++; $display("ERROR: %s: analyzer result", what); end
    if (n > 0) begin
      checks++;
      if (cycles != 32'(n + hops - 1)) begin
        failures++; $display("ERROR: %s: %0d cycles, expected %0d", what, cycles, n + hops - 1);
      end
    end
    checks++;
    if (int'(readback_len) != len) begin failures++; $display("ERROR: %s: read-back length", what); end
  endtask

  initial begin
    instr_t w_a1, w_b1, w_none;
    cyc = 0; edge_got = 0; edge_first = -1;
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    start = 0; cfg_len = 0; num_vec = 0; vec_vc = 0; seed = 1;
    for (int c = 0; c < NW; c++) begin
      cfg_word[c] = '0;
      for (int p = 0; p < NPORTS; p++) begin edge_drv[c][p] = '0; edge_out_accept[c][p] = '1; end
    end
    route[P_WEST] = SEL_W'(P_EAST);   route[P_EAST] = SEL_W'(P_WEST);
    route[P_LOCAL] = SEL_W'(P_NORTH); route[P_NORTH] = SEL_W'(P_SOUTH);
    route[P_SOUTH] = SEL_W'(P_LOCAL);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;

    // ---- phase 0: normal mode across wrappers 3 and 2 ----
    begin
      int sent, t0;
      sent = 0; t0 = cyc;
      while (sent < 32) begin
        edge_drv[3][P_WEST].data = {$urandom(), 2'(sent)};
        edge_drv[3][P_WEST].send = edge_acc_q[0] ? 2'b01 : 2'b00;
        if (edge_drv[3][P_WEST].send != '0) begin edge_q.push_back(edge_drv[3][P_WEST]); sent++; end
        @(posedge clk); #1;
      end
      edge_drv[3][P_WEST].send = '0;
      repeat (8) @(posedge clk); #1;
      checks++;
      if (edge_got != 32 || edge_first - t0 != 3) begin
        failures++; $display("ERROR: normal mode: %0d flits, latency %0d", edge_got, edge_first - t0);
      end
      $display("normal mode: %0d flits across two routers, latency %0d cycles", edge_got, edge_first - t0);
    end

    // ---- phase 1: session A, node 1 under test, others bypassed ----
    // cfg_word[0] ends in the last TCM of the chain (wrapper 3)
    w_none = '0; w_none.bypass_flag = 1'b1;
    w_a1 = '0;
    w_a1.ctrl[P_WEST].in_c   = '{mode: IN_LOAD,    src: IN_SRC_NET,   sel: '0};
    w_a1.ctrl[P_EAST].out_c  = '{mode: OUT_SHIFT,  src: OUT_SRC_NODE, sel: '0};
    w_a1.ctrl[P_SOUTH].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0};
    w_a1.ctrl[P_WEST].out_c  = '{mode: OUT_EXPORT, src: OUT_SRC_PREV, sel: '0};
    cfg_word[0] = w_none;       // wrapper 3
    cfg_word[1] = w_none;       // wrapper 2
    cfg_word[2] = w_a1;         // wrapper 1
    cfg_word[3] = bypass_we();  // wrapper 0
    // hops: w0 bypass, w1 in W, node, out E, out S, out W, w0 bypass
    session(4, 200, 0, 7, "session A (node 1, update+load, withdraw+shift+export)");
    checks++;
    if (!tcm_bypassed[0] || tcm_bypassed[1] || !tcm_bypassed[2] || !tcm_bypassed[3]) begin
      failures++; $display("ERROR: TCM bypass flags after session A");
    end
    checks++;
    if (forwarded[0] != 0 || forwarded[1] != 200) begin
      failures++; $display("ERROR: router traffic %0d/%0d", forwarded[0], forwarded[1]);
    end

    // ---- phase 2: session B over the one-TCM chain ----
    w_b1 = '0;
    w_b1.ctrl[P_WEST].in_c   = '{mode: IN_SHIFT,   src: IN_SRC_NET,   sel: '0};
    w_b1.ctrl[P_LOCAL].in_c  = '{mode: IN_LOAD,    src: IN_SRC_PREV,  sel: '0};
    w_b1.ctrl[P_NORTH].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_NODE, sel: '0};
    w_b1.ctrl[P_EAST].out_c  = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0};
    w_b1.ctrl[P_SOUTH].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0};
    w_b1.ctrl[P_WEST].out_c  = '{mode: OUT_EXPORT, src: OUT_SRC_PREV, sel: '0};
    cfg_word[0] = w_b1;
    // hops: w0 bypass, in W, in L, node, out N, E, S, W, w0 bypass
    session(1, 150, 1, 9, "session B (node 1, shift+load, withdraw+shift+export)");
    checks++;
    if (readback[0] != w_a1) begin failures++; $display("ERROR: session B read-back"); end

    // ---- phase 3: configuration only ----
    cfg_word[0] = w_a1;
    session(1, 0, 0, 0, "session C (configuration read-back)");
    checks++;
    if (readback[0] != w_b1) begin failures++; $display("ERROR: session C read-back"); end

    // ---- phase 4: reset, then test the resource on wrapper 0's local port ----
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (tcm_bypassed[0] || tcm_bypassed[1] || tcm_bypassed[2] || tcm_bypassed[3]) begin
      failures++; $display("ERROR: reset did not clear the TCM bypass flags");
    end
    for (int c = 0; c < NW; c++) cfg_word[c] = w_none;
    cfg_word[3] = bypass_we();
    cfg_word[3].ctrl[P_EAST].in_c.mode  = IN_NORMAL;  cfg_word[3].ctrl[P_EAST].out_c.mode = OUT_NORMAL;
    cfg_word[3].ctrl[P_WEST].in_c.sel   = SEL_W'(P_LOCAL);
    cfg_word[3].ctrl[P_LOCAL].out_c     = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(P_WEST)};
    cfg_word[3].ctrl[P_LOCAL].in_c      = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(P_WEST)};
    cfg_word[3].ctrl[P_WEST].out_c.sel  = SEL_W'(P_LOCAL);
    // hops: w0 bypass west->local, resource loopback, w0 bypass local->west
    session(4, 100, 1, 3, "session D (resource behind wrapper 0 local port, bypassed)");
    checks++;
    if (ip_forwarded != 100 || forwarded[0] != 0) begin
      failures++; $display("ERROR: resource saw %0d flits, router 0 %0d", ip_forwarded, forwarded[0]);
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-24s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("ERROR: mechanism %s never happened", mech_name[m]); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
