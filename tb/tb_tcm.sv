// tb_tcm: self-checking test of the Test Control Module, three TCMs chained.
//
// Checks, in order: with test_enable low no word is accepted and the cells
// get normal control. A chain of three TCMs shifts like a three-word register:
// after three words, each TCM holds its word, and three more words push the
// first three out of the far end in order, in the same cycles. The CTRL
// outputs change only on inst_update. A TCM whose bypass flag is set drops out
// of the chain and keeps its instruction, and its input word appears at its
// output in the same cycle.
module tb_tcm;
  import anoc_test_pkg::*;

  localparam int NT = 3;

  logic       clk = 0, rst_n = 1;
  logic       test_enable, inst_update;
  instr_t     d   [NT+1];
  logic       s   [NT+1];
  logic       a   [NT+1];
  port_ctrl_t ctrl [NT][NPORTS];
  logic       bypassed [NT];
  int         checks = 0, failures = 0;

  for (genvar t = 0; t < NT; t++) begin : g_t
    tcm u_tcm (
      .clk, .rst_n, .test_enable, .inst_update,
      .ip_ctl_data(d[t]),   .ip_ctl_send(s[t]),   .ip_ctl_accept(a[t]),
      .op_ctl_data(d[t+1]), .op_ctl_send(s[t+1]), .op_ctl_accept(a[t+1]),
      .ctrl(ctrl[t]), .bypassed(bypassed[t])
    );
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t outq [$];
  always @(posedge clk) if (rst_n && s[NT]) outq.push_back(d[NT]);

  function automatic instr_t rand_instr(input bit byp);
    instr_t w;
    for (int p = 0; p < NPORTS; p++) begin
      w.ctrl[p].in_c.mode  = in_mode_e'($urandom_range(3));
      w.ctrl[p].in_c.src   = in_src_e'($urandom_range(1));
      w.ctrl[p].in_c.sel   = SEL_W'($urandom_range(NPORTS - 1));
      w.ctrl[p].out_c.mode = out_mode_e'($urandom_range(3));
      w.ctrl[p].out_c.src  = out_src_e'($urandom_range(1));
      w.ctrl[p].out_c.sel  = SEL_W'($urandom_range(NPORTS - 1));
    end
    w.bypass_flag = byp;
    return w;
  endfunction

  logic acc_q;
  always @(posedge clk) acc_q <= a[0];

  // send one word, waiting for the previous-cycle accept
  task automatic send_word(input instr_t w);
    while (!acc_q) @(posedge clk);
    #1;
    d[0] = w; s[0] = 1'b1;
    @(posedge clk); #1;
    s[0] = 1'b0;
  endtask

  task automatic check_ctrl(input int t, input instr_t w, input string what);
    checks++;
    for (int p = 0; p < NPORTS; p++) begin
      if (ctrl[t][p] != w.ctrl[p]) begin
        failures++; $display("ERROR: %s: TCM %0d port %0d control wrong", what, t, p);
        break;
      end
    end
  endtask

  task automatic update();
    #1 inst_update = 1'b1;
    @(posedge clk); #1;
    inst_update = 1'b0;
  endtask

  instr_t w1 [NT], w2 [NT], w3 [2];

  initial begin
    test_enable = 0; inst_update = 0; a[NT] = 1'b1; d[0] = '0; s[0] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // disabled: nothing accepted, normal control
    repeat (2) @(posedge clk); #1;
    checks++;
    if (a[0] !== 1'b0) begin failures++; $display("ERROR: accepted while test disabled"); end
    for (int t = 0; t < NT; t++) check_ctrl(t, '0, "reset");

    test_enable = 1;
    @(posedge clk); #1;
    for (int i = 0; i < NT; i++) w1[i] = rand_instr(1'b0);
    for (int i = 0; i < NT; i++) w2[i] = rand_instr(1'b0);

    // zero-latency pass of send through the chain
    #1 d[0] = w1[0]; s[0] = 1;
    #1;
    checks++;
    if (s[NT] !== 1'b1) begin failures++; $display("ERROR: send not passed through the chain"); end
    @(posedge clk); #1 s[0] = 0;
    for (int i = 1; i < NT; i++) send_word(w1[i]);
    // before update, controls unchanged
    for (int t = 0; t < NT; t++) check_ctrl(t, '0, "before update");
    update();
    // first TCM holds the last word sent
    for (int t = 0; t < NT; t++) check_ctrl(t, w1[NT - 1 - t], "after update 1");

    // three more words push the first three out, oldest first
    outq.delete();
    for (int i = 0; i < NT; i++) send_word(w2[i]);
    @(posedge clk); #1;
    checks++;
    if (outq.size() != NT) begin
      failures++; $display("ERROR: %0d words read back", outq.size());
    end else begin
      for (int i = 0; i < NT; i++) begin
        checks++;
        if (outq[i] != w1[i]) begin failures++; $display("ERROR: read-back word %0d", i); end
      end
    end
    for (int t = 0; t < NT; t++) check_ctrl(t, w1[NT - 1 - t], "no update yet");

    // set the bypass flag of the middle TCM
    w2[1].bypass_flag = 1'b1;
    outq.delete();
    for (int i = 0; i < NT; i++) send_word(w2[i]);
    update();
    checks++;
    if (!bypassed[1] || bypassed[0] || bypassed[2]) begin failures++; $display("ERROR: bypass flags"); end
    check_ctrl(1, w2[1], "bypassed TCM");

    // now a two-word chain: words land in TCM 0 and TCM 2, TCM 1 keeps its own
    w3[0] = rand_instr(1'b0); w3[1] = rand_instr(1'b0);
    #1 d[0] = w3[0];
    #1;
    checks++;
    if (d[2] != d[1] || d[1] != w2[2]) begin failures++; $display("ERROR: bypassed TCM does not pass its input"); end
    send_word(w3[0]);
    send_word(w3[1]);
    update();
    check_ctrl(0, w3[1], "after bypass, TCM 0");
    check_ctrl(2, w3[0], "after bypass, TCM 2");
    check_ctrl(1, w2[1], "after bypass, TCM 1");

    // test_enable low again: normal control
    #1 test_enable = 0;
    #1;
    for (int t = 0; t < NT; t++) check_ctrl(t, '0, "disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
