// output_stage: the wrapper cell on one output port of the node.
//
// The cell sits between the node output and a network output link. Its control
// word (CTRL_CELL, from the TCM) selects one of four operations:
//   OUT_NORMAL : the node output is wired straight to the network, so the
//                wrapper is transparent.
//   OUT_EXPORT : a flit withdrawn from the node, or shifted in from the
//                previous output cell, is stored in Buff_R0. From there it is
//                exported to the network output.
//   OUT_SHIFT  : as above, but the flit leaves Buff_R0 towards the next
//                output cell.
//   OUT_BYPASS : the output multiplexer passes the bypass channel opened by
//                input cell 'sel' to the network output. The accept of the
//                network is returned to that input cell.
// All links use the Send/Accept handshake with NVC virtual channels. Unselected
// sources are not accepted and unselected destinations receive no send.
// Buff_R0 adds one cycle of latency. The bypass path through this cell is only
// a multiplexer; its register stage is in the input cell.
//
// The operations, Buff_R0, the output multiplexer and the port names follow
// the reference cell. The control encoding is this design's own.
module output_stage
  import anoc_test_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  out_ctrl_t ctrl,
  // node output (Data_from_node / Send_from_node / Accept_from_node)
  input  sa_fwd_t   node_fwd,
  output vc_t       node_accept,
  // previous output cell
  input  sa_fwd_t   prev_fwd,
  output vc_t       prev_accept,
  // bypass channels from input cell j (Data_from_bypass_j / Send_from_bypass_j / Accept_from_bypass_j)
  input  sa_fwd_t   bypass_fwd    [NPORTS],
  output vc_t       bypass_accept [NPORTS],
  // network output (OP_data / OP_send / OP_accept)
  output sa_fwd_t   op_fwd,
  input  vc_t       op_accept,
  // next output cell
  output sa_fwd_t   next_fwd,
  input  vc_t       next_accept
);

  sa_fwd_t buf_in, buf_out;
  vc_t     buf_in_acc, buf_out_acc;
  logic    use_buf;
  sa_fwd_t byp_sel;

  assign use_buf = (ctrl.mode == OUT_EXPORT) || (ctrl.mode == OUT_SHIFT);

  // Buff_R0
  sa_buffer #(.DEPTH(2)) u_buff_r0 (
    .clk, .rst_n,
    .in_fwd (buf_in),  .in_accept (buf_in_acc),
    .out_fwd(buf_out), .out_accept(buf_out_acc)
  );

  always_comb begin
    buf_in.data = (ctrl.src == OUT_SRC_PREV) ? prev_fwd.data : node_fwd.data;
    buf_in.send = '0;
    if (use_buf) buf_in.send = (ctrl.src == OUT_SRC_PREV) ? prev_fwd.send : node_fwd.send;
    prev_accept = (use_buf && ctrl.src == OUT_SRC_PREV) ? buf_in_acc : '0;

    unique case (ctrl.mode)
      OUT_NORMAL: node_accept = op_accept;
      OUT_EXPORT,
      OUT_SHIFT:  node_accept = (ctrl.src == OUT_SRC_NODE) ? buf_in_acc : '0;
      default:    node_accept = '0;
    endcase

    // bypass channel selected by 'sel'
    byp_sel = '0;
    for (int j = 0; j < NPORTS; j++) begin
      bypass_accept[j] = '0;
      if (int'(ctrl.sel) == j) begin
        byp_sel = bypass_fwd[j];
        if (ctrl.mode == OUT_BYPASS) bypass_accept[j] = op_accept;
      end
    end

    // output multiplexer
    unique case (ctrl.mode)
      OUT_NORMAL: op_fwd = node_fwd;
      OUT_EXPORT: op_fwd = buf_out;
      OUT_BYPASS: op_fwd = byp_sel;
      default:    op_fwd = '{data: buf_out.data, send: '0};
    endcase

    next_fwd.data = buf_out.data;
    next_fwd.send = (ctrl.mode == OUT_SHIFT) ? buf_out.send : '0;

    unique case (ctrl.mode)
      OUT_EXPORT: buf_out_acc = op_accept;
      OUT_SHIFT:  buf_out_acc = next_accept;
      default:    buf_out_acc = '0;
    endcase
  end

endmodule
