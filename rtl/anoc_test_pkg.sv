// anoc_test_pkg: shared constants and types of the ANoC-TEST wrapper.
//
// A network link carries one flit per cycle on a shared 34-bit data bus. Each of
// the k virtual channels (VCs) has its own "send" and "accept" wire. A sender may
// raise send[i] in a cycle only if the receiver raised accept[i] in the cycle
// before. The node has N = 5 bidirectional ports and the network uses k = 2 VCs,
// as in the reference design. The 34-bit flit width is the reference width; the
// wrapper never looks inside a flit. This model of the wrapper is clocked. It is
// a cycle-level model of the asynchronous (QDI) original, whose channels are
// modelled here as one-flit-per-cycle Send/Accept links.
//
// Each wrapper is controlled by one instruction word. The word is shifted in over
// the configuration channel and then copied to the active register when the
// update strobe comes. The field layout below is this design's own choice.
package anoc_test_pkg;

  localparam int unsigned NPORTS = 5;   // ports per node (4 neighbours + local resource)
  localparam int unsigned NVC    = 2;   // virtual channels / priority levels (k)
  localparam int unsigned FLIT_W = 34;  // flit width, data[33:0]
  localparam int unsigned SEL_W  = $clog2(NPORTS);

  // Port numbering used throughout (own choice).
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;
  localparam int unsigned P_EAST  = 2;
  localparam int unsigned P_SOUTH = 3;
  localparam int unsigned P_WEST  = 4;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [NVC-1:0]    vc_t;

  // Forward half of a Send/Accept link: the flit and one send wire per VC.
  // The accept wires travel the other way as a plain vc_t.
  typedef struct packed {
    flit_t data;
    vc_t   send;
  } sa_fwd_t;

  // Input cell operation.
  //   IN_NORMAL : transparent, network input wired straight to the node input
  //   IN_LOAD   : source -> Buff_R0 -> node input   (update + load, or shift-in + load)
  //   IN_SHIFT  : source -> Buff_R0 -> next input cell
  //   IN_BYPASS : network input -> bypass stage -> output cell 'sel'
  typedef enum logic [1:0] {
    IN_NORMAL = 2'd0,
    IN_LOAD   = 2'd1,
    IN_SHIFT  = 2'd2,
    IN_BYPASS = 2'd3
  } in_mode_e;

  // Where Buff_R0 of an input cell takes its flits from.
  typedef enum logic {
    IN_SRC_NET  = 1'b0,   // "update": from the network input
    IN_SRC_PREV = 1'b1    // "shift":  from the previous input cell
  } in_src_e;

  // Output cell operation.
  //   OUT_NORMAL : transparent, node output wired straight to the network output
  //   OUT_EXPORT : source -> Buff_R0 -> network output
  //   OUT_SHIFT  : source -> Buff_R0 -> next output cell
  //   OUT_BYPASS : bypass stage of input cell 'sel' -> network output
  typedef enum logic [1:0] {
    OUT_NORMAL = 2'd0,
    OUT_EXPORT = 2'd1,
    OUT_SHIFT  = 2'd2,
    OUT_BYPASS = 2'd3
  } out_mode_e;

  // Where Buff_R0 of an output cell takes its flits from.
  typedef enum logic {
    OUT_SRC_NODE = 1'b0,  // "withdraw": from the node output
    OUT_SRC_PREV = 1'b1   // "shift":    from the previous output cell
  } out_src_e;

  typedef struct packed {
    in_mode_e          mode;
    in_src_e           src;
    logic [SEL_W-1:0]  sel;   // bypass target: output port number
  } in_ctrl_t;

  typedef struct packed {
    out_mode_e         mode;
    out_src_e          src;
    logic [SEL_W-1:0]  sel;   // bypass source: input port number
  } out_ctrl_t;

  // CTRL<i> of the TCM: the control of the input and output cell of port i.
  typedef struct packed {
    in_ctrl_t  in_c;
    out_ctrl_t out_c;
  } port_ctrl_t;

  // One instruction word: the bypass flag of the TCM and CTRL<0..N-1>.
  typedef struct packed {
    logic                          bypass_flag;
    port_ctrl_t [NPORTS-1:0]       ctrl;
  } instr_t;

  localparam port_ctrl_t PORT_NORMAL = '{
    in_c:  '{mode: IN_NORMAL,  src: IN_SRC_NET,   sel: '0},
    out_c: '{mode: OUT_NORMAL, src: OUT_SRC_NODE, sel: '0}
  };

  // Highest-priority VC among the set bits of 'req' (VC 0 has the highest
  // priority), returned one-hot; zero if none is set.
  function automatic vc_t vc_pick(input vc_t req);
    vc_t g;
    g = '0;
    for (int i = NVC - 1; i >= 0; i--) begin
      if (req[i]) g = vc_t'(1) << i;
    end
    return g;
  endfunction

endpackage
