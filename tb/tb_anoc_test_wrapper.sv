// tb_anoc_test_wrapper: self-checking test of one wrapper around a router
// model.
//
// The router model sends input west to output east, local to north, north to
// south, east to west and south to local. The bench checks five cases:
//   1. Normal mode: the wrapper is transparent. Flits from the west input reach
//      the east output after the router's own single cycle, so the wrapper
//      adds no cycle.
//   2. Node test: test vectors are updated from the west input and loaded into
//      the node. The results the node puts on east are withdrawn and shifted
//      through the output cells east -> south -> west, then exported on west.
//   3. Shift to another port: vectors entering on west are shifted to the local
//      input cell and loaded there. The node routes them to north, where they
//      are withdrawn and exported.
//   4. Bypass: west in -> east out without touching the node, at one flit per
//      cycle after one cycle of latency, while the node receives nothing.
//   5. The configuration channel passes through the TCM, and a TCM with its
//      bypass flag set passes the channel straight through.
// Each case checks the data, the order, the VC and the port, the full rate of
// 48 flits in 48 cycles, and the latency expected for the path.
module tb_anoc_test_wrapper;
  import anoc_test_pkg::*;

  logic    clk = 0, rst_n = 1;
  logic    test_enable, inst_update;
  sa_fwd_t net_in_fwd      [NPORTS];
  vc_t     net_in_accept   [NPORTS];
  sa_fwd_t net_out_fwd     [NPORTS];
  vc_t     net_out_accept  [NPORTS];
  sa_fwd_t node_in_fwd     [NPORTS];
  vc_t     node_in_accept  [NPORTS];
  sa_fwd_t node_out_fwd    [NPORTS];
  vc_t     node_out_accept [NPORTS];
  instr_t  ctl_in_data, ctl_out_data;
  logic    ctl_in_send, ctl_in_accept, ctl_out_send, ctl_out_accept;
  logic    tcm_bypassed;
  logic [SEL_W-1:0] route [NPORTS];
  int      forwarded;
  int      checks = 0, failures = 0;

  anoc_test_wrapper dut (.*);

  anoc_node_model u_node (
    .clk, .rst_n, .route,
    .in_fwd(node_in_fwd), .in_accept(node_in_accept),
    .out_fwd(node_out_fwd), .out_accept(node_out_accept),
    .forwarded
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int      cyc, got, first_cyc, last_cyc, exp_port;
  sa_fwd_t expq [$];
  vc_t     in_acc_q [NPORTS];
  logic    ctl_acc_q;

  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < NPORTS; p++) in_acc_q[p] <= net_in_accept[p];
    ctl_acc_q <= ctl_in_accept;
    if (rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (net_out_fwd[p].send != '0) begin
          checks++;
          if (p != exp_port || expq.size() == 0) begin
            failures++; $display("ERROR: flit on output %0d, expected %0d", p, exp_port);
          end else begin
            sa_fwd_t e;
            e = expq.pop_front();
            if (e != net_out_fwd[p]) begin failures++; $display("ERROR: got %h expected %h", net_out_fwd[p].data, e.data); end
          end
          got++;
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
        end
      end
    end
  end

  task automatic stream(input int src, input int dst, input int n, input int lat, input string what);
    int sent, start, fwd0;
    vc_t v;
    got = 0; first_cyc = -1; exp_port = dst;
    v = vc_t'(1) << $urandom_range(NVC - 1);
    sent = 0; start = cyc; fwd0 = forwarded;
    while (sent < n) begin
      net_in_fwd[src].data = {$urandom(), 2'(sent)};
      net_in_fwd[src].send = (in_acc_q[src] & v) != '0 ? v : '0;
      if (net_in_fwd[src].send != '0) begin expq.push_back(net_in_fwd[src]); sent++; end
      @(posedge clk); #1;
    end
    net_in_fwd[src].send = '0;
    repeat (8) @(posedge clk); #1;
    checks++;
    if (got != n || expq.size() != 0) begin failures++; $display("ERROR: %s: got %0d of %0d", what, got, n); end
    checks++;
    if (first_cyc - start != lat || last_cyc - first_cyc != n - 1) begin
      failures++; $display("ERROR: %s: latency %0d span %0d", what, first_cyc - start, last_cyc - first_cyc);
    end
    if (lat < 0) ;
    $display("%s: %0d flits, latency %0d cycles, %0d flits through the node", what, got,
             first_cyc - start, forwarded - fwd0);
  endtask

  task automatic configure(input instr_t w);
    while (!ctl_acc_q) @(posedge clk);
    #1 ctl_in_data = w; ctl_in_send = 1'b1;
    @(posedge clk); #1 ctl_in_send = 1'b0;
    inst_update = 1'b1;
    @(posedge clk); #1 inst_update = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    instr_t w;
    int fwd0;
    cyc = 0; exp_port = -1;
    test_enable = 0; inst_update = 0; ctl_in_data = '0; ctl_in_send = 0; ctl_out_accept = 1;
    for (int p = 0; p < NPORTS; p++) begin net_in_fwd[p] = '0; net_out_accept[p] = '1; end
    route[P_WEST] = SEL_W'(P_EAST);  route[P_LOCAL] = SEL_W'(P_NORTH);
    route[P_NORTH] = SEL_W'(P_SOUTH); route[P_EAST] = SEL_W'(P_WEST);
    route[P_SOUTH] = SEL_W'(P_LOCAL);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;

    // 1. normal mode: node latency only
    stream(P_WEST, P_EAST, 48, 2, "normal mode");

    // 2. node test: update+load on west, withdraw east, shift east->south->west, export west
    test_enable = 1;
    w = '0;
    w.ctrl[P_WEST].in_c   = '{mode: IN_LOAD,    src: IN_SRC_NET,    sel: '0};
    w.ctrl[P_EAST].out_c  = '{mode: OUT_SHIFT,  src: OUT_SRC_NODE,  sel: '0};
    w.ctrl[P_SOUTH].out_c = '{mode: OUT_SHIFT,  src: OUT_SRC_PREV,  sel: '0};
    w.ctrl[P_WEST].out_c  = '{mode: OUT_EXPORT, src: OUT_SRC_PREV,  sel: '0};
    configure(w);
    // input Buff_R0 (1) + node (1) + three output Buff_R0 (3), +1 for the send cycle
    stream(P_WEST, P_WEST, 48, 6, "node test west->east, results exported west");

    // 3. shift west -> local, load, node routes local -> north, withdraw+export north
    w = '0;
    w.ctrl[P_WEST].in_c   = '{mode: IN_SHIFT,   src: IN_SRC_NET,   sel: '0};
    w.ctrl[P_LOCAL].in_c  = '{mode: IN_LOAD,    src: IN_SRC_PREV,  sel: '0};
    w.ctrl[P_NORTH].out_c = '{mode: OUT_EXPORT, src: OUT_SRC_NODE, sel: '0};
    configure(w);
    stream(P_WEST, P_NORTH, 48, 5, "shift west->local, load, export north");

    // 4. bypass west -> east
    w = '0;
    w.ctrl[P_WEST].in_c  = '{mode: IN_BYPASS,  src: IN_SRC_NET,   sel: SEL_W'(P_EAST)};
    w.ctrl[P_EAST].out_c = '{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(P_WEST)};
    configure(w);
    fwd0 = forwarded;
    stream(P_WEST, P_EAST, 48, 2, "bypass west->east");
    checks++;
    if (forwarded != fwd0) begin failures++; $display("ERROR: node saw traffic during bypass"); end

    // 5. configuration channel: TCM in chain, then bypassed
    w.bypass_flag = 1'b1;
    ctl_in_data = '0;
    configure(w);
    checks++;
    if (!tcm_bypassed) begin failures++; $display("ERROR: TCM bypass flag not set"); end
    #1 ctl_in_data = instr_t'({$urandom(), $urandom()}); ctl_in_send = 1'b1;
    #1;
    checks++;
    if (ctl_out_data != ctl_in_data || !ctl_out_send) begin failures++; $display("ERROR: TCM bypass does not pass the channel"); end
    @(posedge clk); #1 ctl_in_send = 1'b0;
    // bypass still works after that (instruction kept)
    stream(P_WEST, P_EAST, 16, 2, "bypass kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
