// tb_output_stage: self-checking test of one wrapper output cell.
//
// For each operation (normal, withdraw+export, shift+export, withdraw+shift,
// shift+shift, and bypass from every input port) the bench streams flits from
// the selected source, obeying Send/Accept, on a random VC. It checks that
// they reach only the selected destination, unchanged, in order and on the
// same VC, and that no unselected source is ever accepted. Buffered paths must
// pass 32 flits in 32 consecutive cycles after one cycle of latency. Bypass
// and normal paths must be combinational.
module tb_output_stage;
  import anoc_test_pkg::*;

  localparam int S_NODE = 0, S_PREV = 1, S_BYP = 2;    // S_BYP + j = bypass j
  localparam int NS = 2 + NPORTS;
  localparam int D_OP = 0, D_NEXT = 1;

  logic      clk = 0, rst_n = 1;
  out_ctrl_t ctrl;
  sa_fwd_t   node_fwd, prev_fwd, op_fwd, next_fwd;
  vc_t       node_accept, prev_accept, op_accept, next_accept;
  sa_fwd_t   bypass_fwd    [NPORTS];
  vc_t       bypass_accept [NPORTS];
  int        checks = 0, failures = 0;

  output_stage dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vc_t src_acc [NS];
  always_comb begin
    src_acc[S_NODE] = node_accept;
    src_acc[S_PREV] = prev_accept;
    for (int j = 0; j < NPORTS; j++) src_acc[S_BYP + j] = bypass_accept[j];
  end

  int      exp_dst;
  sa_fwd_t expq [$];
  int      got, first_cyc, last_cyc, cyc;
  vc_t     src_acc_q [NS];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      sa_fwd_t df [2];
      df[D_OP] = op_fwd; df[D_NEXT] = next_fwd;
      for (int d = 0; d < 2; d++) begin
        if (df[d].send != '0) begin
          checks++;
          if (d != exp_dst || expq.size() == 0) begin
            failures++; $display("ERROR: flit at destination %0d, expected %0d", d, exp_dst);
          end else begin
            sa_fwd_t e;
            e = expq.pop_front();
            if (e != df[d]) begin failures++; $display("ERROR: got %h expected %h", df[d].data, e.data); end
          end
          got++;
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
        end
      end
    end
    for (int s = 0; s < NS; s++) src_acc_q[s] <= src_acc[s];
  end

  task automatic set_src(input int s, input sa_fwd_t f);
    node_fwd = '0; prev_fwd = '0;
    for (int j = 0; j < NPORTS; j++) bypass_fwd[j] = '{data: f.data, send: '0};
    if (s == S_NODE) node_fwd = f;
    else if (s == S_PREV) prev_fwd = f;
    else bypass_fwd[s - S_BYP] = f;
  endtask

  task automatic run_path(input out_ctrl_t c, input int s, input int d, input int n, input int lat);
    int sent, start;
    vc_t v;
    ctrl = c; exp_dst = d; got = 0; first_cyc = -1;
    op_accept = '1; next_accept = '1;
    set_src(s, '0);
    repeat (2) @(posedge clk); #1;
    v = vc_t'(1) << $urandom_range(NVC - 1);
    sent = 0; start = cyc;
    while (sent < n) begin
      sa_fwd_t f;
      f.data = {$urandom(), 2'(sent)};
      f.send = (src_acc_q[s] & v) != '0 ? v : '0;
      set_src(s, f);
      if (f.send != '0) begin expq.push_back(f); sent++; end
      for (int o = 0; o < NS; o++) begin
        if (o != s) begin
          checks++;
          if (src_acc[o] != '0) begin failures++; $display("ERROR: source %0d accepted in mode %s", o, c.mode.name()); end
        end
      end
      @(posedge clk); #1;
    end
    set_src(s, '0);
    repeat (4) @(posedge clk); #1;
    checks++;
    if (got != n) begin failures++; $display("ERROR: mode %s got %0d of %0d", c.mode.name(), got, n); end
    checks++;
    if (first_cyc - start != lat || last_cyc - first_cyc != n - 1) begin
      failures++;
      $display("ERROR: mode %s latency %0d span %0d", c.mode.name(), first_cyc - start, last_cyc - first_cyc);
    end
  endtask

  initial begin
    cyc = 0; exp_dst = -1;
    ctrl = '0; op_accept = '0; next_accept = '0;
    set_src(0, '0);
    for (int s = 0; s < NS; s++) src_acc_q[s] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // normal: combinational node -> network, accept back
    run_path('{mode: OUT_NORMAL, src: OUT_SRC_NODE, sel: '0}, S_NODE, D_OP, 16, 1);
    run_path('{mode: OUT_EXPORT, src: OUT_SRC_NODE, sel: '0}, S_NODE, D_OP,   32, 2);
    run_path('{mode: OUT_EXPORT, src: OUT_SRC_PREV, sel: '0}, S_PREV, D_OP,   32, 2);
    run_path('{mode: OUT_SHIFT,  src: OUT_SRC_NODE, sel: '0}, S_NODE, D_NEXT, 32, 2);
    run_path('{mode: OUT_SHIFT,  src: OUT_SRC_PREV, sel: '0}, S_PREV, D_NEXT, 32, 2);
    for (int j = 0; j < NPORTS; j++)
      run_path('{mode: OUT_BYPASS, src: OUT_SRC_NODE, sel: SEL_W'(j)}, S_BYP + j, D_OP, 32, 1);

    // back-pressure on the export path
    ctrl = '{mode: OUT_EXPORT, src: OUT_SRC_NODE, sel: '0};
    exp_dst = D_OP; got = 0;
    begin
      int sent = 0;
      while (sent < 200) begin
        sa_fwd_t f;
        op_accept = vc_t'($urandom());
        f.data = {$urandom(), 2'(sent)};
        f.send = src_acc_q[S_NODE][1] ? 2'b10 : 2'b00;
        set_src(S_NODE, f);
        if (f.send != '0) begin expq.push_back(f); sent++; end
        @(posedge clk); #1;
      end
      set_src(S_NODE, '0); op_accept = '1;
      repeat (6) @(posedge clk); #1;
      checks++;
      if (got != 200 || expq.size() != 0) begin failures++; $display("ERROR: back-pressure got %0d", got); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
