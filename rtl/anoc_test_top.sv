// anoc_test_top: a mesh of ANoC-TEST wrappers with its Generator-Analyzer-
// Controller (GAC) unit.
//
// MESH_X x MESH_Y wrappers are placed on a grid. Neighbouring wrappers are
// joined by one Send/Accept link in each direction: the north port of (x,y)
// faces the south port of (x,y+1), and the east port of (x,y) faces the west
// port of (x+1,y). Wrapper c lies at row y = c / MESH_X. Its column runs left to
// right on even rows and right to left on odd rows. For the default 2 x 2 mesh
// that places wrapper 0 bottom left, 1 bottom right, 2 top right and 3 top left.
// The configuration channel runs from the GAC through the TCMs of wrappers
// 0, 1, ..., NW-1 and back to the GAC. The GAC's test access link drives the
// west input of wrapper 0 and reads the west output of wrapper 0. Test vectors
// enter the network there, and results come back there after crossing
// bypassed wrappers.
//
// The routers (nodes) inside the wrappers are not part of this RTL. For every
// wrapper, the node_* ports carry the five links between the wrapper and its
// node, to be connected to a router. The edge_* ports carry the wrapper ports
// that face neither a neighbour nor the GAC: the local ports towards the
// network interfaces and the outer ports of the mesh. Entries of edge_* that
// are used inside the mesh are ignored (inputs) or driven to zero (outputs).
//
// The mesh of wrapped nodes, the chained configuration channel returning to the
// GAC and the 2 x 2 size follow the reference test bench. The grid
// orientation, the chain order for larger meshes and the GAC attachment point
// are this design's choices.
module anoc_test_top
  import anoc_test_pkg::*;
#(
  parameter int unsigned MESH_X = 2,
  parameter int unsigned MESH_Y = 2,
  parameter int unsigned CNT_W  = 16,
  localparam int unsigned NW    = MESH_X * MESH_Y,
  localparam int unsigned LEN_W = $clog2(NW + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host side of the GAC
  input  logic                   start,
  input  logic [LEN_W-1:0]       cfg_len,
  input  instr_t                 cfg_word        [NW],
  input  logic [CNT_W-1:0]       num_vec,
  input  logic [$clog2(NVC)-1:0] vec_vc,
  input  logic [31:0]            seed,
  output logic                   busy,
  output logic                   done,
  output logic [CNT_W-1:0]       err_count,
  output logic [CNT_W-1:0]       rx_count,
  output logic [31:0]            cycles,
  output instr_t                 readback        [NW],
  output logic [LEN_W-1:0]       readback_len,
  output logic                   tcm_bypassed    [NW],
  // wrapper <-> node links, per wrapper and port
  output sa_fwd_t                node_in_fwd     [NW][NPORTS],
  input  vc_t                    node_in_accept  [NW][NPORTS],
  input  sa_fwd_t                node_out_fwd    [NW][NPORTS],
  output vc_t                    node_out_accept [NW][NPORTS],
  // unconnected wrapper ports (local ports and mesh boundary)
  input  sa_fwd_t                edge_in_fwd     [NW][NPORTS],
  output vc_t                    edge_in_accept  [NW][NPORTS],
  output sa_fwd_t                edge_out_fwd    [NW][NPORTS],
  input  vc_t                    edge_out_accept [NW][NPORTS]
);

  // position of wrapper c and index of the wrapper at (x,y)
  function automatic int unsigned pos_x(input int unsigned c);
    int unsigned y;
    y = c / MESH_X;
    return (y % 2 == 0) ? (c % MESH_X) : (MESH_X - 1 - c % MESH_X);
  endfunction

  function automatic int unsigned idx_of(input int unsigned x, input int unsigned y);
    return y * MESH_X + ((y % 2 == 0) ? x : (MESH_X - 1 - x));
  endfunction

  logic    test_enable, inst_update;

  sa_fwd_t net_in_fwd     [NW][NPORTS];
  vc_t     net_in_accept  [NW][NPORTS];
  sa_fwd_t net_out_fwd    [NW][NPORTS];
  vc_t     net_out_accept [NW][NPORTS];

  instr_t  ctl_data   [NW+1];
  logic    ctl_send   [NW+1];
  logic    ctl_accept [NW+1];

  sa_fwd_t tam_out_fwd, tam_in_fwd;
  vc_t     tam_out_accept, tam_in_accept;

  gac_unit #(.NW(NW), .CNT_W(CNT_W)) u_gac (
    .clk, .rst_n,
    .start, .cfg_len, .cfg_word, .num_vec, .vec_vc, .seed,
    .busy, .done, .err_count, .rx_count, .cycles, .readback, .readback_len,
    .test_enable, .inst_update,
    .ctl_out_data  (ctl_data[0]),
    .ctl_out_send  (ctl_send[0]),
    .ctl_out_accept(ctl_accept[0]),
    .ctl_ret_data  (ctl_data[NW]),
    .ctl_ret_send  (ctl_send[NW]),
    .ctl_ret_accept(ctl_accept[NW]),
    .tam_out_fwd, .tam_out_accept, .tam_in_fwd, .tam_in_accept
  );

  for (genvar c = 0; c < NW; c++) begin : g_wrap
    localparam int unsigned X = pos_x(c);
    localparam int unsigned Y = c / MESH_X;

    anoc_test_wrapper u_wrapper (
      .clk, .rst_n, .test_enable, .inst_update,
      .net_in_fwd     (net_in_fwd[c]),
      .net_in_accept  (net_in_accept[c]),
      .net_out_fwd    (net_out_fwd[c]),
      .net_out_accept (net_out_accept[c]),
      .node_in_fwd    (node_in_fwd[c]),
      .node_in_accept (node_in_accept[c]),
      .node_out_fwd   (node_out_fwd[c]),
      .node_out_accept(node_out_accept[c]),
      .ctl_in_data    (ctl_data[c]),
      .ctl_in_send    (ctl_send[c]),
      .ctl_in_accept  (ctl_accept[c]),
      .ctl_out_data   (ctl_data[c+1]),
      .ctl_out_send   (ctl_send[c+1]),
      .ctl_out_accept (ctl_accept[c+1]),
      .tcm_bypassed   (tcm_bypassed[c])
    );

    // Each port is fed by the facing port of a neighbour, by the GAC or by
    // the edge ports of the top.
    for (genvar p = 0; p < NPORTS; p++) begin : g_link
      localparam bit HAS_N   = (p == P_NORTH) && (Y + 1 < MESH_Y);
      localparam bit HAS_S   = (p == P_SOUTH) && (Y > 0);
      localparam bit HAS_E   = (p == P_EAST)  && (X + 1 < MESH_X);
      localparam bit HAS_W   = (p == P_WEST)  && (X > 0);
      localparam bit IS_GAC  = (p == P_WEST)  && (c == 0);
      localparam int unsigned NB =
        HAS_N ? idx_of(X, Y + 1) :
        HAS_S ? idx_of(X, Y - 1) :
        HAS_E ? idx_of(X + 1, Y) :
        HAS_W ? idx_of(X - 1, Y) : 0;
      localparam int unsigned NP =
        (p == P_NORTH) ? P_SOUTH :
        (p == P_SOUTH) ? P_NORTH :
        (p == P_EAST)  ? P_WEST  : P_EAST;

      if (HAS_N || HAS_S || HAS_E || HAS_W) begin : g_nb
        assign net_in_fwd[c][p]     = net_out_fwd[NB][NP];
        assign net_out_accept[c][p] = net_in_accept[NB][NP];
        assign edge_in_accept[c][p] = '0;
        assign edge_out_fwd[c][p]   = '0;
      end else if (IS_GAC) begin : g_gac
        assign net_in_fwd[c][p]     = tam_out_fwd;
        assign tam_out_accept       = net_in_accept[c][p];
        assign tam_in_fwd           = net_out_fwd[c][p];
        assign net_out_accept[c][p] = tam_in_accept;
        assign edge_in_accept[c][p] = '0;
        assign edge_out_fwd[c][p]   = '0;
      end else begin : g_edge
        assign net_in_fwd[c][p]     = edge_in_fwd[c][p];
        assign edge_in_accept[c][p] = net_in_accept[c][p];
        assign edge_out_fwd[c][p]   = net_out_fwd[c][p];
        assign net_out_accept[c][p] = edge_out_accept[c][p];
      end
    end
  end

endmodule
