// tb_input_stage: self-checking test of one wrapper input cell.
//
// For each operation (normal, update+load, shift+load, update+shift,
// shift+shift, and bypass to every output port) the bench streams flits from
// the selected source, obeying Send/Accept, on a random VC. It checks that
// they arrive unchanged, in order and on the same VC at the selected
// destination only, and that the unselected source is never accepted. Buffered
// paths must deliver 32 flits within 33 cycles of the first send (one flit
// per cycle, one cycle of latency). In normal mode the cell must be
// combinational: the node sees the network flit in the same cycle.
module tb_input_stage;
  import anoc_test_pkg::*;

  localparam int D_NODE = 0, D_NEXT = 1, D_BYP = 2;   // D_BYP + j = bypass j
  localparam int ND = 2 + NPORTS;

  logic     clk = 0, rst_n = 1;
  in_ctrl_t ctrl;
  sa_fwd_t  ip_fwd, prev_fwd, node_fwd, next_fwd;
  vc_t      ip_accept, prev_accept, node_accept, next_accept;
  sa_fwd_t  bypass_fwd    [NPORTS];
  vc_t      bypass_accept [NPORTS];
  int       checks = 0, failures = 0;

  input_stage dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sa_fwd_t dst_fwd [ND];
  always_comb begin
    dst_fwd[D_NODE] = node_fwd;
    dst_fwd[D_NEXT] = next_fwd;
    for (int j = 0; j < NPORTS; j++) dst_fwd[D_BYP + j] = bypass_fwd[j];
  end

  int      exp_dst;
  sa_fwd_t expq [$];
  int      got, first_cyc, last_cyc, cyc;
  vc_t     ip_acc_q, prev_acc_q;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int d = 0; d < ND; d++) begin
        if (dst_fwd[d].send != '0) begin
          checks++;
          if (d != exp_dst || expq.size() == 0) begin
            failures++; $display("ERROR: flit at destination %0d, expected %0d", d, exp_dst);
          end else begin
            sa_fwd_t e;
            e = expq.pop_front();
            if (e != dst_fwd[d]) begin
              failures++; $display("ERROR: got %h/%b expected %h/%b", dst_fwd[d].data, dst_fwd[d].send, e.data, e.send);
            end
          end
          got++;
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
        end
      end
    end
    ip_acc_q   <= ip_accept;
    prev_acc_q <= prev_accept;
  end

  // Stream n flits from source (0 = network, 1 = previous cell) to destination d.
  task automatic run_path(input in_ctrl_t c, input int src, input int d, input int n, input bit timed);
    int sent, start;
    vc_t v;
    ctrl = c; exp_dst = d; got = 0; first_cyc = -1;
    node_accept = '1; next_accept = '1;
    for (int j = 0; j < NPORTS; j++) bypass_accept[j] = '1;
    ip_fwd = '0; prev_fwd = '0;
    repeat (2) @(posedge clk); #1;
    v = vc_t'(1) << $urandom_range(NVC - 1);
    sent = 0; start = cyc;
    while (sent < n) begin
      sa_fwd_t f;
      vc_t acc;
      acc = (src == 0) ? ip_acc_q : prev_acc_q;
      f.data = {$urandom(), 2'(sent)};
      f.send = (acc & v) != '0 ? v : '0;
      if (src == 0) ip_fwd = f; else prev_fwd = f;
      if (f.send != '0) begin expq.push_back(f); sent++; end
      checks++;
      if (((src == 0) ? prev_accept : ip_accept) != '0) begin
        failures++; $display("ERROR: unselected source accepted (mode %s)", c.mode.name());
      end
      @(posedge clk); #1;
    end
    ip_fwd.send = '0; prev_fwd.send = '0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (got != n) begin failures++; $display("ERROR: mode %s got %0d of %0d", c.mode.name(), got, n); end
    if (timed) begin
      checks++;
      if (first_cyc - start != 2 || last_cyc - first_cyc != n - 1) begin
        failures++;
        $display("ERROR: mode %s latency %0d span %0d", c.mode.name(), first_cyc - start, last_cyc - first_cyc);
      end
    end
  endtask

  initial begin
    in_ctrl_t c;
    cyc = 0; exp_dst = -1;
    ctrl = '0; ip_fwd = '0; prev_fwd = '0; node_accept = '0; next_accept = '0;
    for (int j = 0; j < NPORTS; j++) bypass_accept[j] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // normal mode: combinational pass-through both ways
    c = '{mode: IN_NORMAL, src: IN_SRC_NET, sel: '0};
    ctrl = c; exp_dst = D_NODE;
    for (int i = 0; i < 20; i++) begin
      ip_fwd.data = {$urandom(), 2'(i)};
      ip_fwd.send = '0;
      node_accept = vc_t'($urandom());
      #1;
      checks++;
      if (node_fwd.data != ip_fwd.data || ip_accept != node_accept) begin
        failures++; $display("ERROR: normal mode not transparent");
      end
    end
    run_path(c, 0, D_NODE, 16, 1'b0);

    run_path('{mode: IN_LOAD,  src: IN_SRC_NET,  sel: '0}, 0, D_NODE, 32, 1'b1);
    run_path('{mode: IN_LOAD,  src: IN_SRC_PREV, sel: '0}, 1, D_NODE, 32, 1'b1);
    run_path('{mode: IN_SHIFT, src: IN_SRC_NET,  sel: '0}, 0, D_NEXT, 32, 1'b1);
    run_path('{mode: IN_SHIFT, src: IN_SRC_PREV, sel: '0}, 1, D_NEXT, 32, 1'b1);
    for (int j = 0; j < NPORTS; j++)
      run_path('{mode: IN_BYPASS, src: IN_SRC_NET, sel: SEL_W'(j)}, 0, D_BYP + j, 32, 1'b1);

    // back-pressure: node accepts at random on the load path
    ctrl = '{mode: IN_LOAD, src: IN_SRC_NET, sel: '0};
    exp_dst = D_NODE; got = 0;
    begin
      int sent = 0;
      while (sent < 200) begin
        node_accept = vc_t'($urandom());
        ip_fwd.data = {$urandom(), 2'(sent)};
        ip_fwd.send = ip_acc_q[0] ? 2'b01 : 2'b00;
        if (ip_fwd.send != '0) begin expq.push_back(ip_fwd); sent++; end
        @(posedge clk); #1;
      end
      ip_fwd.send = '0; node_accept = '1;
      repeat (6) @(posedge clk); #1;
      checks++;
      if (got != 200 || expq.size() != 0) begin failures++; $display("ERROR: back-pressure got %0d", got); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
