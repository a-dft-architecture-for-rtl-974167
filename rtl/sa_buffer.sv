// sa_buffer: one Send/Accept channel stage with a small buffer per virtual
// channel. It is the "Buff_R0" immediate buffer of a wrapper cell and also the
// register stage of a bypass channel.
//
// Receiver side: accept[i] promises that a flit on VC i in the next cycle will
// be stored. It is computed from the occupancy this stage will have at the end
// of the current cycle, so a flit arriving now and a flit leaving now are both
// taken into account. With DEPTH = 2 the stage streams one flit per cycle.
// Sender side: the accept wires of the receiver are registered, and a flit of
// VC i is sent only if accept[i] was high in the previous cycle. When several
// VCs hold a flit and may send, the lowest-numbered VC goes first (VC 0 is
// the highest priority); one flit leaves per cycle on the shared data bus.
// Latency through an empty stage is one cycle.
//
// The per-VC buffering, the depth and the priority order are this design's
// choices. The reference only says that a flit is held in the immediate
// buffer and sent on at the next communication cycle, and that the wrapper must
// keep each flit's data and priority level unchanged.
module sa_buffer
  import anoc_test_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  // upstream
  input  sa_fwd_t in_fwd,
  output vc_t     in_accept,
  // downstream
  output sa_fwd_t out_fwd,
  input  vc_t     out_accept
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  flit_t            mem   [NVC][DEPTH];
  logic [PTR_W-1:0] rd_ptr[NVC];
  logic [PTR_W-1:0] wr_ptr[NVC];
  logic [CNT_W-1:0] count [NVC];
  vc_t              acc_q;          // downstream accept, previous cycle
  vc_t              in_acc_q;       // our own accept, previous cycle (for checks)
  vc_t              ready, pop, push;
  logic             chk_en;         // protocol checks armed after reset

  always_comb begin
    for (int v = 0; v < NVC; v++) ready[v] = (count[v] != '0) && acc_q[v];
    pop  = vc_pick(ready);
    push = in_fwd.send;
  end

  always_comb begin
    out_fwd.send = pop;
    out_fwd.data = '0;
    for (int v = 0; v < NVC; v++) begin
      if (pop[v]) out_fwd.data = mem[v][rd_ptr[v]];
    end
  end

  // Occupancy at the end of this cycle must leave room for one more flit.
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      in_accept[v] = (int'(count[v]) + int'(push[v]) - int'(pop[v])) < int'(DEPTH);
    end
  end

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      in_acc_q <= '0;
      chk_en   <= 1'b0;
      for (int v = 0; v < NVC; v++) begin
        rd_ptr[v] <= '0;
        wr_ptr[v] <= '0;
        count[v]  <= '0;
      end
    end else begin
      acc_q    <= out_accept;
      chk_en   <= 1'b1;
      in_acc_q <= in_accept;
      for (int v = 0; v < NVC; v++) begin
        if (push[v]) wr_ptr[v] <= ptr_inc(wr_ptr[v]);
        if (pop[v])  rd_ptr[v] <= ptr_inc(rd_ptr[v]);
        count[v] <= count[v] + CNT_W'(push[v]) - CNT_W'(pop[v]);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int v = 0; v < NVC; v++) begin
      if (push[v]) mem[v][wr_ptr[v]] <= in_fwd.data;
    end
  end

  // Send/Accept rules: a send needs an accept in the previous cycle, and only
  // one VC uses the shared data bus at a time.
  for (genvar v = 0; v < NVC; v++) begin : g_chk
    a_send_needs_accept: assert property (@(posedge clk) disable iff (!chk_en)
      in_fwd.send[v] |-> in_acc_q[v])
      else $error("sa_buffer: send on VC %0d without accept in the previous cycle", v);
  end
  a_one_vc: assert property (@(posedge clk) disable iff (!chk_en) $onehot0(in_fwd.send))
    else $error("sa_buffer: more than one VC sent in one cycle");

endmodule
