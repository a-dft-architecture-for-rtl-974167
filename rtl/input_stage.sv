// input_stage: the wrapper cell on one input port of the node.
//
// The cell sits between a network input link and the node input. Its control
// word (CTRL_CELL, from the TCM) selects one of four operations:
//   IN_NORMAL : the network link is wired straight to the node, so the wrapper is
//               transparent (no register, no added latency).
//   IN_LOAD   : a flit from the network ("update") or from the previous input
//               cell ("shift") is stored in Buff_R0. From there it is loaded
//               into the node at the next cycle.
//   IN_SHIFT  : as above, but the flit leaves Buff_R0 towards the next input
//               cell.
//   IN_BYPASS : the network flit goes through the bypass stage to output cell
//               'sel' of the same wrapper and reaches the network without
//               touching the node.
// Every link here uses the Send/Accept handshake with NVC virtual channels.
// Each flit keeps its data and its VC. Unselected outputs send nothing, and
// unselected inputs are not accepted. Buff_R0 and the bypass stage each add one
// cycle of latency and each stream one flit per cycle.
//
// The four operations, Buff_R0, the by-pass block and the port names follow
// the reference cell. The encoding of the control word, the one-cycle register
// in the bypass path and the depth of the buffers are this design's choices.
// The control word may change only while the cell's links are idle.
module input_stage
  import anoc_test_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  in_ctrl_t ctrl,
  // network input (IP_data / IP_send / IP_accept)
  input  sa_fwd_t  ip_fwd,
  output vc_t      ip_accept,
  // previous input cell (Data_from_prev / Send_from_prev / Accept_from_prev)
  input  sa_fwd_t  prev_fwd,
  output vc_t      prev_accept,
  // node input (Data_to_node / Send_to_node / Accept_from_node)
  output sa_fwd_t  node_fwd,
  input  vc_t      node_accept,
  // next input cell (Data_to_next / Send_to_next / Accept_from_next)
  output sa_fwd_t  next_fwd,
  input  vc_t      next_accept,
  // bypass channels towards output cell j (Data_bypass_j / Send_bypass_j / Accept_bypass_j)
  output sa_fwd_t  bypass_fwd    [NPORTS],
  input  vc_t      bypass_accept [NPORTS]
);

  sa_fwd_t buf_in, buf_out, byp_in, byp_out;
  vc_t     buf_in_acc, buf_out_acc, byp_in_acc, byp_out_acc;
  logic    use_buf;

  assign use_buf = (ctrl.mode == IN_LOAD) || (ctrl.mode == IN_SHIFT);

  // Buff_R0
  sa_buffer #(.DEPTH(2)) u_buff_r0 (
    .clk, .rst_n,
    .in_fwd (buf_in),  .in_accept (buf_in_acc),
    .out_fwd(buf_out), .out_accept(buf_out_acc)
  );

  // By-pass block
  sa_buffer #(.DEPTH(2)) u_bypass (
    .clk, .rst_n,
    .in_fwd (byp_in),  .in_accept (byp_in_acc),
    .out_fwd(byp_out), .out_accept(byp_out_acc)
  );

  always_comb begin
    // Buff_R0 source
    buf_in.data = (ctrl.src == IN_SRC_PREV) ? prev_fwd.data : ip_fwd.data;
    buf_in.send = '0;
    if (use_buf) buf_in.send = (ctrl.src == IN_SRC_PREV) ? prev_fwd.send : ip_fwd.send;
    prev_accept = (use_buf && ctrl.src == IN_SRC_PREV) ? buf_in_acc : '0;

    // Bypass source
    byp_in.data = ip_fwd.data;
    byp_in.send = (ctrl.mode == IN_BYPASS) ? ip_fwd.send : '0;

    // Network accept
    unique case (ctrl.mode)
      IN_NORMAL: ip_accept = node_accept;
      IN_BYPASS: ip_accept = byp_in_acc;
      default:   ip_accept = (ctrl.src == IN_SRC_NET) ? buf_in_acc : '0;
    endcase

    // Node input
    node_fwd.data = (ctrl.mode == IN_NORMAL) ? ip_fwd.data : buf_out.data;
    unique case (ctrl.mode)
      IN_NORMAL: node_fwd.send = ip_fwd.send;
      IN_LOAD:   node_fwd.send = buf_out.send;
      default:   node_fwd.send = '0;
    endcase

    // Next cell
    next_fwd.data = buf_out.data;
    next_fwd.send = (ctrl.mode == IN_SHIFT) ? buf_out.send : '0;

    unique case (ctrl.mode)
      IN_LOAD:  buf_out_acc = node_accept;
      IN_SHIFT: buf_out_acc = next_accept;
      default:  buf_out_acc = '0;
    endcase

    // Bypass outputs: data on all of them, send only on the selected one
    byp_out_acc = '0;
    for (int j = 0; j < NPORTS; j++) begin
      bypass_fwd[j].data = byp_out.data;
      bypass_fwd[j].send = '0;
      if (ctrl.mode == IN_BYPASS && int'(ctrl.sel) == j) begin
        bypass_fwd[j].send = byp_out.send;
        byp_out_acc        = bypass_accept[j];
      end
    end
  end

endmodule
