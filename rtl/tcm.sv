// tcm: local Test Control Module of one wrapper.
//
// The TCMs of all wrappers are chained into the configuration channel, a
// Send/Accept link (one channel, no VCs) that carries one instruction word per
// transfer. Each TCM has two registers and a multiplexer:
//   - The configuration instruction register is one stage of the channel. For
//     every word that arrives, the register passes its old content to the next
//     TCM and keeps the new word. After M transfers, the M TCMs in the chain
//     hold the last M words sent, the first TCM holding the last word sent.
//   - The updated instruction register copies the configuration register when
//     the global inst_update strobe is high. Its fields CTRL<0..N-1> drive the
//     input and output cells of the wrapper.
//   - Its bypass_flag controls the bypass multiplexer. When the flag is set, the
//     channel input is wired straight to the channel output and this TCM drops
//     out of the chain, which shortens later configurations.
// Send and accept pass through a TCM without delay, so a whole chain behaves
// as one shift register clocked by the transfers. The words it shifts out
// return to the controller and can be read back.
// While test_enable is low the TCM accepts nothing and drives the normal
// (transparent) control to every cell. Reset clears both registers, giving
// normal mode and no bypass.
//
// The two registers, the bypass multiplexer and its flag follow the reference
// TCM. The word format and the zero-latency pass-through are this design's
// own choices.
module tcm
  import anoc_test_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test_enable,
  input  logic       inst_update,
  // configuration channel in (IP_control_*)
  input  instr_t     ip_ctl_data,
  input  logic       ip_ctl_send,
  output logic       ip_ctl_accept,
  // configuration channel out (OP_control_*)
  output instr_t     op_ctl_data,
  output logic       op_ctl_send,
  input  logic       op_ctl_accept,
  // cell controls CTRL<0..N-1>
  output port_ctrl_t ctrl [NPORTS],
  output logic       bypassed
);

  instr_t cfg_q;   // configuration instruction register
  instr_t upd_q;   // updated instruction register

  assign bypassed      = upd_q.bypass_flag;
  assign op_ctl_send   = test_enable && ip_ctl_send;
  assign ip_ctl_accept = test_enable && op_ctl_accept;
  assign op_ctl_data   = upd_q.bypass_flag ? ip_ctl_data : cfg_q;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      ctrl[i] = test_enable ? upd_q.ctrl[i] : PORT_NORMAL;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      upd_q <= '0;
    end else if (test_enable) begin
      if (ip_ctl_send && !upd_q.bypass_flag) cfg_q <= ip_ctl_data;
      if (inst_update)                       upd_q <= cfg_q;
    end
  end

endmodule
