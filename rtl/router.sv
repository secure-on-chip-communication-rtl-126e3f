// router: five-port mesh router with Id and Address Verification.
//
// Five channels (local, north, east, south, west, noc_pkg::port_e order),
// each with an input port and an output port, joined by the crossbar. Every
// channel uses a req/ack flit handshake: a flit moves in a cycle where req
// and ack are both high. A packet is four 16-bit flits, buffered whole in an
// input port, routed XY, passed through the crossbar in four cycles and
// buffered in the output port it won.
//
// The local channel, which faces the network interface of the node's core or
// memory, carries the two IAV checks: the local input port checks packets the
// node injects (level 1), the local output port checks packets delivered to
// the node (level 2). Either can be left out with IAV_IN_EN / IAV_OUT_EN.
// Each check that fails raises a one-cycle alert with the packet's 12-bit id
// field, meant for a manager core, and the packet is discarded.
//
// IAV tables are written through the cfg_* port: a write applies when
// cfg_node equals ROUTER_ID, to the input-port table (cfg_side = IAV_INPUT)
// or the output-port table (IAV_OUTPUT). Port arrays are indexed by port_e.
module router
  import noc_pkg::*;
#(
  parameter node_id_t    ROUTER_ID  = '0,
  parameter int unsigned ENTRIES    = 32,
  parameter bit          IAV_IN_EN  = 1'b1,
  parameter bit          IAV_OUT_EN = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // channels
  input  flit_t                      data_in  [NPORTS],
  input  logic                       req_in   [NPORTS],
  output logic                       ack_in   [NPORTS],
  output flit_t                      data_out [NPORTS],
  output logic                       req_out  [NPORTS],
  input  logic                       ack_out  [NPORTS],
  // IAV table load
  input  logic                       cfg_we,
  input  node_id_t                   cfg_node,
  input  iav_side_e                  cfg_side,
  input  logic [$clog2(ENTRIES)-1:0] cfg_index,
  input  iav_entry_t                 cfg_entry,
  // alerts to the manager core
  output logic                       alert_in,
  output logic [2*ID_W-1:0]          alert_in_id,
  output logic                       alert_out,
  output logic [2*ID_W-1:0]          alert_out_id,
  output logic                       misroute
);

  logic [NPORTS-2:0] ip_swt_req [NPORTS];
  logic [NPORTS-2:0] ip_swt_ack [NPORTS];
  flit_t             ip_data    [NPORTS];
  logic              ip_valid   [NPORTS];
  logic [NPORTS-2:0] op_swt_req [NPORTS];
  logic [NPORTS-2:0] op_swt_ack [NPORTS];
  logic [1:0]        op_sel     [NPORTS];
  flit_t             op_data    [NPORTS];
  logic              op_valid   [NPORTS];

  logic              ip_alert   [NPORTS];
  logic [2*ID_W-1:0] ip_alert_id[NPORTS];
  logic              ip_misroute[NPORTS];
  logic              op_alert   [NPORTS];
  logic [2*ID_W-1:0] op_alert_id[NPORTS];

  logic cfg_in_we, cfg_out_we;
  assign cfg_in_we  = cfg_we && (cfg_node == ROUTER_ID) && (cfg_side == IAV_INPUT);
  assign cfg_out_we = cfg_we && (cfg_node == ROUTER_ID) && (cfg_side == IAV_OUTPUT);

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    localparam port_e PP = port_e'(p);

    input_port #(
      .PORT     (PP),
      .IAV_EN   (IAV_IN_EN && (PP == PORT_LOCAL)),
      .ENTRIES  (ENTRIES),
      .ROUTER_ID(ROUTER_ID)
    ) u_in (
      .clk, .rst_n,
      .data_in   (data_in[p]),
      .req_in    (req_in[p]),
      .ack_in    (ack_in[p]),
      .swt_req   (ip_swt_req[p]),
      .swt_ack   (ip_swt_ack[p]),
      .xbar_data (ip_data[p]),
      .xbar_valid(ip_valid[p]),
      .cfg_we    (cfg_in_we),
      .cfg_index (cfg_index),
      .cfg_entry (cfg_entry),
      .alert     (ip_alert[p]),
      .alert_id  (ip_alert_id[p]),
      .misroute  (ip_misroute[p])
    );

    output_port #(
      .PORT     (PP),
      .IAV_EN   (IAV_OUT_EN && (PP == PORT_LOCAL)),
      .ENTRIES  (ENTRIES),
      .ROUTER_ID(ROUTER_ID)
    ) u_out (
      .clk, .rst_n,
      .swt_req   (op_swt_req[p]),
      .swt_ack   (op_swt_ack[p]),
      .swt_sel   (op_sel[p]),
      .xbar_data (op_data[p]),
      .xbar_valid(op_valid[p]),
      .data_out  (data_out[p]),
      .req_out   (req_out[p]),
      .ack_out   (ack_out[p]),
      .cfg_we    (cfg_out_we),
      .cfg_index (cfg_index),
      .cfg_entry (cfg_entry),
      .alert     (op_alert[p]),
      .alert_id  (op_alert_id[p])
    );
  end

  crossbar u_xbar (
    .in_swt_req (ip_swt_req),
    .in_swt_ack (ip_swt_ack),
    .in_data    (ip_data),
    .in_valid   (ip_valid),
    .out_swt_req(op_swt_req),
    .out_swt_ack(op_swt_ack),
    .out_sel    (op_sel),
    .out_data   (op_data),
    .out_valid  (op_valid)
  );

  assign alert_in     = ip_alert[PORT_LOCAL];
  assign alert_in_id  = ip_alert_id[PORT_LOCAL];
  assign alert_out    = op_alert[PORT_LOCAL];
  assign alert_out_id = op_alert_id[PORT_LOCAL];

  always_comb begin
    misroute = 1'b0;
    for (int p = 0; p < NPORTS; p++) misroute |= ip_misroute[p];
  end

endmodule
