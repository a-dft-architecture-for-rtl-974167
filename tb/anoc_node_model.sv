// anoc_node_model: behavioural stand-in for a 5-port network router, used only
// by the test benches.
//
// Each input port keeps a queue per virtual channel. Every flit from input p is
// forwarded, unchanged and on the same VC, to output route[p]. When several
// inputs compete for an output, the lowest-numbered input wins, and VC 0 goes
// before VC 1. Outputs are registered, giving one cycle from input to output,
// and both sides obey Send/Accept. The accept wires are registered and count
// the flit that may still arrive, so the queues (8 flits per VC) never
// overflow. The real router decodes a routing header; this model takes a fixed
// route table instead, which is enough to exercise the wrapper around it.
module anoc_node_model
  import anoc_test_pkg::*;
#(
  parameter int unsigned CAP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SEL_W-1:0]  route     [NPORTS],
  input  sa_fwd_t           in_fwd    [NPORTS],
  output vc_t               in_accept [NPORTS],
  output sa_fwd_t           out_fwd   [NPORTS],
  input  vc_t               out_accept[NPORTS],
  output int                forwarded
);

  flit_t inq [NPORTS][NVC][$];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_accept[p] <= '0;
        out_fwd[p]   <= '0;
        for (int v = 0; v < NVC; v++) inq[p][v].delete();
      end
      forwarded <= 0;
    end else begin
      int n;
      n = 0;
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NVC; v++)
          if (in_fwd[p].send[v]) inq[p][v].push_back(in_fwd[p].data);
      for (int q = 0; q < NPORTS; q++) begin
        sa_fwd_t o;
        o = '0;
        for (int v = 0; v < NVC && o.send == '0; v++) begin
          for (int p = 0; p < NPORTS && o.send == '0; p++) begin
            if (int'(route[p]) == q && inq[p][v].size() > 0 && out_accept[q][v]) begin
              o.data = inq[p][v].pop_front();
              o.send = vc_t'(1) << v;
            end
          end
        end
        out_fwd[q] <= o;
        if (o.send != '0) n++;
      end
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NVC; v++)
          in_accept[p][v] <= (inq[p][v].size() + 2) <= CAP;
      forwarded <= forwarded + n;
    end
  end

endmodule
