// input_port: one input port of the five-port router.
//
// Parts: the input FIFO (one 4-flit packet), the XY routing logic and the
// control logic, plus, when IAV_EN is set (the local channel's port), an IAV
// module between FIFO and routing logic.
//
// Link side (from the upstream output port): a flit moves in every cycle in
// which req_in and ack_in are both high. ack_in is high while the port is
// receiving and the FIFO is not full; once the four flits of a packet are in
// (FIFO_full) ack_in stays low until the packet has left.
//
// Switch side: with a complete packet held and routed, swt_req raises the one
// bit of the 4-bit bus that names the target output port (bit k = the k-th
// port other than this one, see noc_pkg::peer). The target output port's
// swt_ack pulse starts the transfer: the FIFO is read one flit per cycle for
// four cycles, xbar_valid marking each flit on xbar_data.
//
// IAV variant: when two flits are buffered the FIFO's enable (check) starts
// the IAV module on the header; its verdict comes one cycle later, which is
// hidden behind the arrival of flits 3 and 4 when flits arrive back to back,
// so the check adds no cycle. A passed packet enables the routing logic; a
// blocked one raises alert / alert_id for one cycle and is discarded from the
// FIFO once it is complete. A packet whose route would turn back out of the
// port it came in on is also discarded and flagged on misroute; this is this
// design's own rule, the document not covering that case.
module input_port
  import noc_pkg::*;
#(
  parameter port_e       PORT      = PORT_LOCAL,
  parameter bit          IAV_EN    = 1'b0,
  parameter int unsigned ENTRIES   = 32,
  parameter node_id_t    ROUTER_ID = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // link from upstream
  input  flit_t                      data_in,
  input  logic                       req_in,
  output logic                       ack_in,
  // switch side
  output logic [NPORTS-2:0]          swt_req,
  input  logic [NPORTS-2:0]          swt_ack,
  output flit_t                      xbar_data,
  output logic                       xbar_valid,
  // IAV table load (ignored when IAV_EN = 0)
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_index,
  input  iav_entry_t                 cfg_entry,
  // status
  output logic                       alert,
  output logic [2*ID_W-1:0]          alert_id,
  output logic                       misroute
);

  typedef enum logic [1:0] {S_RX, S_REQ, S_TX} state_e;

  state_e state;
  logic   fifo_wr, fifo_rd, fifo_flush, fifo_full, fifo_empty;
  flit_t  fifo_rd_data, peek0, peek1;
  logic [$clog2(PKT_FLITS+1)-1:0] fifo_count;

  logic   checked, passed, blocked;
  logic   iav_check, iav_done, iav_enable, iav_alert;
  logic   route_en, route_valid;
  port_e  route_port;
  logic [NPORTS-1:0] route;
  logic   self_route;

  // ---------------------------------------------------------------- FIFO
  assign ack_in  = (state == S_RX) && !fifo_full;
  assign fifo_wr = req_in && ack_in;
  assign fifo_rd = (state == S_TX);

  flit_fifo #(.DEPTH(PKT_FLITS)) u_fifo (
    .clk, .rst_n,
    .flush  (fifo_flush),
    .wr_en  (fifo_wr),
    .wr_data(data_in),
    .rd_en  (fifo_rd),
    .rd_data(fifo_rd_data),
    .peek0, .peek1,
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  assign xbar_data  = fifo_rd_data;
  assign xbar_valid = (state == S_TX) && !fifo_empty;

  // ---------------------------------------------------------------- IAV
  generate
    if (IAV_EN) begin : g_iav
      assign iav_check = (state == S_RX) && !checked && (fifo_count >= 2);
      iav #(.SIDE(IAV_INPUT), .ENTRIES(ENTRIES), .ROUTER_ID(ROUTER_ID)) u_iav (
        .clk, .rst_n,
        .cfg_we, .cfg_index, .cfg_entry,
        .check   (iav_check),
        .id      ({hdr_src(peek0), hdr_dest(peek0)}),
        .address (hdr_addr(peek0, peek1)),
        .done    (iav_done),
        .enable  (iav_enable),
        .alert   (iav_alert),
        .alert_id(alert_id)
      );
    end else begin : g_no_iav
      assign iav_check  = 1'b0;
      assign iav_done   = 1'b0;
      assign iav_enable = 1'b0;
      assign iav_alert  = 1'b0;
      assign alert_id   = '0;
    end
  endgenerate

  assign alert = iav_alert;

  // ------------------------------------------------------- routing logic
  assign route_en = fifo_full && (IAV_EN ? passed : 1'b1);

  xy_routing_logic #(.ROUTER_ID(ROUTER_ID)) u_route (
    .enable     (route_en),
    .id_dest    (hdr_dest(peek0)),
    .route_valid(route_valid),
    .route_port (route_port),
    .route      (route)
  );

  assign self_route = route_valid && (route_port == PORT);

  always_comb begin
    swt_req = '0;
    if (state == S_REQ && route_valid && !self_route) begin
      for (int unsigned q = 0; q < NPORTS; q++)
        if (q != 32'(PORT) && route[q]) swt_req[slot(32'(PORT), q)] = 1'b1;
    end
  end

  // ------------------------------------------------------- control logic
  assign fifo_flush = ((state == S_RX) && fifo_full && blocked) ||
                      ((state == S_REQ) && self_route);
  assign misroute   = (state == S_REQ) && self_route;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_RX;
      checked <= 1'b0;
      passed  <= 1'b0;
      blocked <= 1'b0;
    end else begin
      if (iav_check) checked <= 1'b1;
      if (iav_done) begin
        passed  <= iav_enable;
        blocked <= iav_alert;
      end
      case (state)
        S_RX: begin
          if (fifo_full) begin
            if (!IAV_EN) begin
              state <= S_REQ;
            end else if (passed) begin
              state <= S_REQ;
            end else if (blocked) begin
              checked <= 1'b0;
              blocked <= 1'b0;
            end
          end
        end
        S_REQ: begin
          if (self_route) begin
            state   <= S_RX;
            checked <= 1'b0;
            passed  <= 1'b0;
          end else if (|(swt_ack & swt_req)) begin
            state <= S_TX;
          end
        end
        S_TX: begin
          if (fifo_count == 1) begin
            state   <= S_RX;
            checked <= 1'b0;
            passed  <= 1'b0;
          end
        end
        default: state <= S_RX;
      endcase
    end
  end

  // ------------------------------------------------------------ checks
  a_req_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(swt_req));
  a_no_write_full: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_full && ack_in));

endmodule
