// noc_mesh: 2-D mesh network-on-chip of IAV-protected routers.
//
// MESH_X x MESH_Y routers (8 x 8 = 64 nodes by default, the size the 6-bit
// node ids of the packet header address). Router (x, y) has node id
// {y, x} and links to its four neighbours: its east output drives the east
// neighbour's west input, its south output the southern neighbour's north
// input, and so on. Channels at the mesh edge are tied off (no request in,
// no acknowledge out); XY routing never selects them for an id inside the
// mesh.
//
// Each node's local channel is brought out, indexed by y * MESH_X + x, for the
// network interface of the core or memory attached there:
//   ni_data_in / ni_req_in / ni_ack_in     flits injected by the node
//   ni_data_out / ni_req_out / ni_ack_out  flits delivered to the node
// with the same req/ack rule as the links (a flit moves when both are high).
// All IAV tables are loaded through one shared cfg_* port (cfg_node picks
// the router). The per-node alert signals are the inputs of a manager core,
// which the network does not contain.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X  = 8,
  parameter int unsigned MESH_Y  = 8,
  parameter int unsigned ENTRIES = 32,
  localparam int unsigned NODES  = MESH_X * MESH_Y
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // local channels, index y * MESH_X + x (the node id in an 8-wide mesh)
  input  flit_t                      ni_data_in  [NODES],
  input  logic                       ni_req_in   [NODES],
  output logic                       ni_ack_in   [NODES],
  output flit_t                      ni_data_out [NODES],
  output logic                       ni_req_out  [NODES],
  input  logic                       ni_ack_out  [NODES],
  // IAV table load
  input  logic                       cfg_we,
  input  node_id_t                   cfg_node,
  input  iav_side_e                  cfg_side,
  input  logic [$clog2(ENTRIES)-1:0] cfg_index,
  input  iav_entry_t                 cfg_entry,
  // alerts for the manager core
  output logic                       alert_in     [NODES],
  output logic [2*ID_W-1:0]          alert_in_id  [NODES],
  output logic                       alert_out    [NODES],
  output logic [2*ID_W-1:0]          alert_out_id [NODES],
  output logic                       misroute     [NODES]
);

  // node index for a mesh position; id bits are {y[2:0], x[2:0]}
  function automatic int unsigned nid(int unsigned x, int unsigned y);
    return (y << COORD_W) | x;
  endfunction

  // ports are addressed by node id, so size the arrays for the id space
  localparam int unsigned ID_SPACE = 1 << ID_W;

  flit_t r_din  [ID_SPACE][NPORTS];
  logic  r_rin  [ID_SPACE][NPORTS];
  logic  r_ain  [ID_SPACE][NPORTS];
  flit_t r_dout [ID_SPACE][NPORTS];
  logic  r_rout [ID_SPACE][NPORTS];
  logic  r_aout [ID_SPACE][NPORTS];

  initial begin
    assert (MESH_X <= (1 << COORD_W) && MESH_Y <= (1 << COORD_W))
      else $error("mesh larger than the node id can address");
  end

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = nid(x, y);
      localparam int unsigned I = y * MESH_X + x;

      // local channel
      assign r_din[N][PORT_LOCAL]  = ni_data_in[I];
      assign r_rin[N][PORT_LOCAL]  = ni_req_in[I];
      assign ni_ack_in[I]          = r_ain[N][PORT_LOCAL];
      assign ni_data_out[I]        = r_dout[N][PORT_LOCAL];
      assign ni_req_out[I]         = r_rout[N][PORT_LOCAL];
      assign r_aout[N][PORT_LOCAL] = ni_ack_out[I];

      // north neighbour (y-1): its south output feeds our north input
      if (y > 0) begin : g_n
        assign r_din[N][PORT_NORTH]  = r_dout[nid(x, y-1)][PORT_SOUTH];
        assign r_rin[N][PORT_NORTH]  = r_rout[nid(x, y-1)][PORT_SOUTH];
        assign r_aout[N][PORT_NORTH] = r_ain[nid(x, y-1)][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_din[N][PORT_NORTH]  = '0;
        assign r_rin[N][PORT_NORTH]  = 1'b0;
        assign r_aout[N][PORT_NORTH] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_din[N][PORT_SOUTH]  = r_dout[nid(x, y+1)][PORT_NORTH];
        assign r_rin[N][PORT_SOUTH]  = r_rout[nid(x, y+1)][PORT_NORTH];
        assign r_aout[N][PORT_SOUTH] = r_ain[nid(x, y+1)][PORT_NORTH];
      end else begin : g_s_edge
        assign r_din[N][PORT_SOUTH]  = '0;
        assign r_rin[N][PORT_SOUTH]  = 1'b0;
        assign r_aout[N][PORT_SOUTH] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_din[N][PORT_WEST]  = r_dout[nid(x-1, y)][PORT_EAST];
        assign r_rin[N][PORT_WEST]  = r_rout[nid(x-1, y)][PORT_EAST];
        assign r_aout[N][PORT_WEST] = r_ain[nid(x-1, y)][PORT_EAST];
      end else begin : g_w_edge
        assign r_din[N][PORT_WEST]  = '0;
        assign r_rin[N][PORT_WEST]  = 1'b0;
        assign r_aout[N][PORT_WEST] = 1'b0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_din[N][PORT_EAST]  = r_dout[nid(x+1, y)][PORT_WEST];
        assign r_rin[N][PORT_EAST]  = r_rout[nid(x+1, y)][PORT_WEST];
        assign r_aout[N][PORT_EAST] = r_ain[nid(x+1, y)][PORT_WEST];
      end else begin : g_e_edge
        assign r_din[N][PORT_EAST]  = '0;
        assign r_rin[N][PORT_EAST]  = 1'b0;
        assign r_aout[N][PORT_EAST] = 1'b0;
      end

      router #(
        .ROUTER_ID(node_id_t'(N)),
        .ENTRIES  (ENTRIES)
      ) u_router (
        .clk, .rst_n,
        .data_in     (r_din[N]),
        .req_in      (r_rin[N]),
        .ack_in      (r_ain[N]),
        .data_out    (r_dout[N]),
        .req_out     (r_rout[N]),
        .ack_out     (r_aout[N]),
        .cfg_we, .cfg_node, .cfg_side, .cfg_index, .cfg_entry,
        .alert_in    (alert_in[I]),
        .alert_in_id (alert_in_id[I]),
        .alert_out   (alert_out[I]),
        .alert_out_id(alert_out_id[I]),
        .misroute    (misroute[I])
      );
    end
  end

endmodule
