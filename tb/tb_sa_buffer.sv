// tb_sa_buffer: self-checking test of the Send/Accept buffer stage.
//
// Phase 1 streams 64 flits on VC 0 into a stage whose receiver always accepts.
// After a one-cycle latency a flit must leave in every cycle (64 flits in
// 65 cycles). Phase 2 sends random traffic on both VCs. The sender obeys
// Send/Accept, and the receiver's accept is random. Every flit must come out
// on its own VC, in order and unchanged, and the stage must never send
// without a previous-cycle accept. Phase 3 fills both VCs, then opens the
// receiver; the VC 0 flit must leave first.
module tb_sa_buffer;
  import anoc_test_pkg::*;

  logic    clk = 0, rst_n = 1;
  sa_fwd_t in_fwd, out_fwd;
  vc_t     in_accept, out_accept;
  int      checks = 0, failures = 0;

  sa_buffer #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets act at once

  flit_t q [NVC][$];
  vc_t   in_acc_prev, out_acc_prev;
  bit    random_send;
  int    sent, recv;
  int    first_out_cycle, last_out_cycle, cyc;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor on every rising edge
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        if (out_fwd.send[v]) begin
          checks++;
          if (!out_acc_prev[v]) begin
            failures++; $display("ERROR: send on VC%0d without accept", v);
          end
          if (q[v].size() == 0) begin
            failures++; $display("ERROR: unexpected flit on VC%0d", v);
          end else begin
            flit_t e;
            e = q[v].pop_front();
            if (e != out_fwd.data) begin
              failures++; $display("ERROR: VC%0d got %h expected %h", v, out_fwd.data, e);
            end
          end
          recv++;
          if (first_out_cycle < 0) first_out_cycle = cyc;
          last_out_cycle = cyc;
        end
        if (in_fwd.send[v]) q[v].push_back(in_fwd.data);
      end
      if ($countones(out_fwd.send) > 1) begin failures++; $display("ERROR: two VCs at once"); end
    end
    in_acc_prev  <= in_accept;
    out_acc_prev <= out_accept;
  end

  task automatic drive_idle();
    in_fwd = '0;
  endtask

  initial begin
    int start_cycle;
    cyc = 0; first_out_cycle = -1;
    in_fwd = '0; out_accept = '0; in_acc_prev = '0; out_acc_prev = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Phase 1: full-rate stream on VC 0
    out_accept = '1;
    sent = 0; recv = 0;
    @(posedge clk); #1;
    start_cycle = cyc;
    while (sent < 64) begin
      if (in_acc_prev[0]) begin
        in_fwd.send = 2'b01; in_fwd.data = flit_t'($urandom()) ^ flit_t'(sent << 20); sent++;
      end else in_fwd.send = '0;
      @(posedge clk); #1;
    end
    in_fwd.send = '0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (recv != 64 || last_out_cycle - first_out_cycle != 63 || first_out_cycle - start_cycle != 2) begin
      failures++;
      $display("ERROR: stream recv=%0d span=%0d latency=%0d", recv, last_out_cycle - first_out_cycle,
               first_out_cycle - start_cycle);
    end

    // Phase 2: random traffic on both VCs, random receiver
    sent = 0; recv = 0;
    for (int i = 0; i < 2000; i++) begin
      vc_t ok;
      int  v;
      out_accept = vc_t'($urandom());
      ok = in_acc_prev;
      v  = $urandom_range(NVC - 1);
      in_fwd.send = '0;
      if (ok[v] && ($urandom_range(3) != 0)) begin
        in_fwd.send = vc_t'(1) << v;
        in_fwd.data = {$urandom(), 2'(v)};
        sent++;
      end
      @(posedge clk); #1;
    end
    in_fwd.send = '0; out_accept = '1;
    repeat (10) @(posedge clk); #1;
    checks++;
    if (recv != sent || q[0].size() != 0 || q[1].size() != 0) begin
      failures++; $display("ERROR: random phase sent=%0d recv=%0d", sent, recv);
    end

    // Phase 3: priority, VC 0 before VC 1
    out_accept = '0;
    @(posedge clk); #1;
    in_fwd.send = 2'b10; in_fwd.data = 34'h2_0000_0001;
    @(posedge clk); #1;
    in_fwd.send = 2'b01; in_fwd.data = 34'h1_0000_0000;
    @(posedge clk); #1;
    in_fwd.send = '0;
    @(posedge clk); #1;
    out_accept = '1;
    @(posedge clk); #1;          // accept registered here
    checks++;
    if (out_fwd.send != 2'b01 || out_fwd.data != 34'h1_0000_0000) begin
      failures++; $display("ERROR: priority, got send=%b", out_fwd.send);
    end
    repeat (4) @(posedge clk); #1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
