// tb_gac_unit: self-checking test of the Generator-Analyzer-Controller.
//
// The configuration chain is modelled here as a four-word shift register that
// accepts at random. The test access link is closed by a loopback of fixed
// latency, with random stalls in some runs. The bench checks that:
//   - the configuration words reach the chain in order and respect Send/Accept,
//   - the words pushed out of the chain are read back in order,
//   - inst_update is one cycle long and comes after the last word,
//   - the vectors equal an independently computed LFSR sequence, with first
//     and last flags, on the requested VC,
//   - rx_count and err_count are right, also when the loopback corrupts a
//     flit,
//   - without stalls the session streams one vector per cycle: 'cycles' equals
//     num_vec plus the loopback latency.
module tb_gac_unit;
  import anoc_test_pkg::*;

  localparam int NW = 4;
  localparam int LOOP_LAT = 3;

  logic                  clk = 0, rst_n = 1;
  logic                  start;
  logic [2:0]            cfg_len;
  instr_t                cfg_word [NW];
  logic [15:0]           num_vec;
  logic [0:0]            vec_vc;
  logic [31:0]           seed;
  logic                  busy, done;
  logic [15:0]           err_count, rx_count;
  logic [31:0]           cycles;
  instr_t                readback [NW];
  logic [2:0]            readback_len;
  logic                  test_enable, inst_update;
  instr_t                ctl_out_data, ctl_ret_data;
  logic                  ctl_out_send, ctl_out_accept, ctl_ret_send, ctl_ret_accept;
  sa_fwd_t               tam_out_fwd, tam_in_fwd;
  vc_t                   tam_out_accept, tam_in_accept;
  int                    checks = 0, failures = 0;

  gac_unit #(.NW(NW), .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- configuration chain model: NW-word shift register, zero latency ----
  instr_t chain [NW];
  logic   chain_acc, chain_acc_q;
  bit     rand_cfg_stall;
  int     updates, words_in, update_at_words;
  always_comb begin
    ctl_ret_send = ctl_out_send;
    ctl_ret_data = chain[NW-1];
  end
  assign ctl_out_accept = chain_acc;
  always @(posedge clk) begin
    chain_acc_q <= chain_acc;
    if (rst_n) begin
      if (ctl_out_send) begin
        checks++;
        if (!chain_acc_q) begin failures++; $display("ERROR: config word sent without accept"); end
        for (int i = NW - 1; i > 0; i--) chain[i] <= chain[i-1];
        chain[0] <= ctl_out_data;
        words_in++;
      end
      if (inst_update) begin updates++; update_at_words = words_in; end
    end
  end
  always @(negedge clk) chain_acc <= rand_cfg_stall ? 1'($urandom_range(1)) : 1'b1;

  // ---- loopback on the test access link ----
  sa_fwd_t loopq [$];
  int      ready_at [$];
  int      cyc;
  bit      rand_stall;
  int      corrupt_idx, seen_vec;
  vc_t     tam_acc_q;
  sa_fwd_t sentq [$];
  assign tam_out_accept = '1;
  always @(posedge clk) begin
    cyc++;
    tam_acc_q <= tam_out_accept;
    if (rst_n && tam_out_fwd.send != '0) begin
      sa_fwd_t f;
      checks++;
      if ((tam_out_fwd.send & ~tam_acc_q) != '0) begin failures++; $display("ERROR: vector sent without accept"); end
      f = tam_out_fwd;
      sentq.push_back(f);
      if (seen_vec == corrupt_idx) f.data[5] = ~f.data[5];
      seen_vec++;
      loopq.push_back(f);
      ready_at.push_back(cyc + LOOP_LAT - 1);
    end
  end
  always @(negedge clk) begin
    tam_in_fwd = '0;
    if (loopq.size() > 0 && ready_at[0] <= cyc && !(rand_stall && $urandom_range(2) == 0)) begin
      tam_in_fwd = loopq.pop_front();
      void'(ready_at.pop_front());
    end
  end

  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    logic [31:0] r;
    r = {1'b0, s[31:1]};
    if (s[0]) begin r[31] = 1'b1; r[21] = ~r[21]; r[1] = ~r[1]; r[0] = ~r[0]; end
    return r;
  endfunction

  task automatic session(input int len, input int n, input int vc, input bit stall,
                         input int corrupt, input bit timed);
    int  words_before;
    logic [31:0] st;
    rand_stall = stall; rand_cfg_stall = stall; corrupt_idx = corrupt; seen_vec = 0;
    sentq.delete();
    for (int i = 0; i < NW; i++) begin
      cfg_word[i] = '0;
      cfg_word[i].ctrl[i % NPORTS].in_c.sel = SEL_W'(i);
      cfg_word[i].ctrl[(i + 1) % NPORTS].out_c.mode = out_mode_e'($urandom_range(3));
      cfg_word[i].bypass_flag = 1'($urandom_range(1));
      cfg_word[i].ctrl[0].in_c.mode = in_mode_e'($urandom_range(3));
    end
    cfg_len = 3'(len); num_vec = 16'(n); vec_vc = 1'(vc); seed = $urandom() | 32'h1;
    words_before = words_in; updates = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    #1;
    // configuration
    checks++;
    if (words_in - words_before != len) begin failures++; $display("ERROR: %0d words sent", words_in - words_before); end
    checks++;
    if (updates != 1 || update_at_words != words_in) begin failures++; $display("ERROR: inst_update count %0d", updates); end
    for (int i = 0; i < len && i < NW; i++) begin
      checks++;
      if (chain[len - 1 - i] != cfg_word[i]) begin failures++; $display("ERROR: chain word %0d", i); end
    end
    checks++;
    if (int'(readback_len) != len) begin failures++; $display("ERROR: readback_len %0d", readback_len); end
    checks++;
    if (!test_enable) begin failures++; $display("ERROR: test_enable low"); end
    // vectors
    st = seed;
    checks++;
    if (sentq.size() != n) begin failures++; $display("ERROR: %0d vectors sent", sentq.size()); end
    for (int i = 0; i < sentq.size(); i++) begin
      flit_t e;
      e = {i == 0, i == n - 1, st};
      checks++;
      if (sentq[i].data != e || sentq[i].send != (vc_t'(1) << vc)) begin
        failures++; $display("ERROR: vector %0d is %h expected %h", i, sentq[i].data, e);
      end
      st = lfsr_next(st);
    end
    checks++;
    if (rx_count != 16'(n) || err_count != ((corrupt >= 0 && corrupt < n) ? 16'd1 : 16'd0)) begin
      failures++; $display("ERROR: rx_count %0d err_count %0d", rx_count, err_count);
    end
    if (timed) begin
      checks++;
      if (cycles != 32'(n + LOOP_LAT - 1)) begin
        failures++; $display("ERROR: session took %0d cycles, expected %0d", cycles, n + LOOP_LAT - 1);
      end
    end
  endtask

  initial begin
    instr_t old [NW];
    start = 0; cfg_len = 0; num_vec = 0; vec_vc = 0; seed = 1;
    for (int i = 0; i < NW; i++) begin cfg_word[i] = '0; chain[i] = '0; end
    cyc = 0; words_in = 0; updates = 0; rand_stall = 0; rand_cfg_stall = 0; corrupt_idx = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    session(4, 100, 0, 1'b0, -1, 1'b1);
    for (int i = 0; i < NW; i++) old[i] = chain[NW - 1 - i];
    session(4, 300, 1, 1'b1, 17, 1'b0);
    // the read-back of the second session is the chain content left by the first
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (readback[i] != old[i]) begin failures++; $display("ERROR: readback %0d", i); end
    end
    session(2, 0, 0, 1'b1, -1, 1'b0);       // configuration only
    session(3, 64, 1, 1'b0, 63, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
