// anoc_test_wrapper: the ANoC-TEST wrapper around one 5-port network node.
//
// On each port p there is an input cell (network -> node) and an output cell
// (node -> network). The five input cells form a ring: input cell p passes
// flits to input cell (p+1) mod N, so a test vector that enters on any port can
// be shifted to any other port before it is loaded into the node. The output
// cells form a second ring in the same way, so a result withdrawn from any node
// output can be exported on any port. Input cell p also has one bypass channel
// to every output cell q. With it a flit crosses the wrapper from port p to
// port q without entering the node, so tests can reach wrappers further on
// through this one. The local TCM holds this wrapper's instruction, drives
// CTRL<p> to the two cells of port p, and is one link of the configuration
// chain.
//
// Network and node links are Send/Accept links with NVC virtual channels. In
// normal mode all cells are transparent: the node sees the network directly
// and the wrapper adds no latency. In test mode each Buff_R0, shift or bypass
// hop adds one cycle of latency and passes one flit per cycle.
//
// The cell counts, the TCM and the bypass channels follow the reference
// wrapper. The ring order of the cells and the port numbering (0 local,
// 1 north, 2 east, 3 south, 4 west) are this design's choices.
module anoc_test_wrapper
  import anoc_test_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    test_enable,
  input  logic    inst_update,
  // network side
  input  sa_fwd_t net_in_fwd      [NPORTS],
  output vc_t     net_in_accept   [NPORTS],
  output sa_fwd_t net_out_fwd     [NPORTS],
  input  vc_t     net_out_accept  [NPORTS],
  // node side
  output sa_fwd_t node_in_fwd     [NPORTS],
  input  vc_t     node_in_accept  [NPORTS],
  input  sa_fwd_t node_out_fwd    [NPORTS],
  output vc_t     node_out_accept [NPORTS],
  // configuration channel
  input  instr_t  ctl_in_data,
  input  logic    ctl_in_send,
  output logic    ctl_in_accept,
  output instr_t  ctl_out_data,
  output logic    ctl_out_send,
  input  logic    ctl_out_accept,
  output logic    tcm_bypassed
);

  port_ctrl_t ctrl [NPORTS];

  // rings of cells
  sa_fwd_t ic_next_fwd [NPORTS];
  vc_t     ic_prev_acc [NPORTS];
  sa_fwd_t oc_next_fwd [NPORTS];
  vc_t     oc_prev_acc [NPORTS];

  // bypass crossbar, indexed [input port][output port]
  sa_fwd_t byp_fwd  [NPORTS][NPORTS];
  vc_t     byp_acc  [NPORTS][NPORTS];
  sa_fwd_t byp_fwd_t[NPORTS][NPORTS];   // same wires, indexed [output][input]
  vc_t     byp_acc_t[NPORTS][NPORTS];

  tcm u_tcm (
    .clk, .rst_n, .test_enable, .inst_update,
    .ip_ctl_data  (ctl_in_data),
    .ip_ctl_send  (ctl_in_send),
    .ip_ctl_accept(ctl_in_accept),
    .op_ctl_data  (ctl_out_data),
    .op_ctl_send  (ctl_out_send),
    .op_ctl_accept(ctl_out_accept),
    .ctrl,
    .bypassed     (tcm_bypassed)
  );

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      for (int j = 0; j < NPORTS; j++) begin
        byp_fwd_t[j][i] = byp_fwd[i][j];
        byp_acc[i][j]   = byp_acc_t[j][i];
      end
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    localparam int unsigned PREV = (p + NPORTS - 1) % NPORTS;
    localparam int unsigned NEXT = (p + 1) % NPORTS;

    input_stage u_in (
      .clk, .rst_n,
      .ctrl         (ctrl[p].in_c),
      .ip_fwd       (net_in_fwd[p]),
      .ip_accept    (net_in_accept[p]),
      .prev_fwd     (ic_next_fwd[PREV]),
      .prev_accept  (ic_prev_acc[p]),
      .node_fwd     (node_in_fwd[p]),
      .node_accept  (node_in_accept[p]),
      .next_fwd     (ic_next_fwd[p]),
      .next_accept  (ic_prev_acc[NEXT]),
      .bypass_fwd   (byp_fwd[p]),
      .bypass_accept(byp_acc[p])
    );

    output_stage u_out (
      .clk, .rst_n,
      .ctrl         (ctrl[p].out_c),
      .node_fwd     (node_out_fwd[p]),
      .node_accept  (node_out_accept[p]),
      .prev_fwd     (oc_next_fwd[PREV]),
      .prev_accept  (oc_prev_acc[p]),
      .bypass_fwd   (byp_fwd_t[p]),
      .bypass_accept(byp_acc_t[p]),
      .op_fwd       (net_out_fwd[p]),
      .op_accept    (net_out_accept[p]),
      .next_fwd     (oc_next_fwd[p]),
      .next_accept  (oc_prev_acc[NEXT])
    );
  end

endmodule
