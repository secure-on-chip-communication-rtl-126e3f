// output_port: one output port of the five-port router.
//
// Parts: the output FIFO (one 4-flit packet), the rotating-priority arbiter
// and the control logic, plus, when IAV_EN is set (the local channel's port),
// an IAV module that checks packets before they reach the network interface.
//
// Switch side: swt_req carries one request bit from each of the four other
// input ports (bit k = noc_pkg::peer(PORT, k)). While the port is idle and its
// FIFO is empty, the arbiter grants one request: swt_ack pulses that bit for
// one cycle and swt_sel, held until the packet is in, tells the crossbar which
// input to connect. The next four flits that arrive with xbar_valid are
// written into the FIFO.
//
// Link side (to the downstream input port or network interface): req_out is
// high while a flit may be sent, data_out is the oldest flit, and a flit
// leaves in every cycle in which req_out and ack_out are both high. A standard
// port starts sending as soon as the first flit is buffered.
//
// IAV variant: in the cycle the second flit is written the IAV module starts
// checking the header (the destination must be this router, the source and
// address must match a table row); flit 0 is read from the FIFO and flit 1
// from the switch input. Nothing is sent before the verdict, which arrives
// the next cycle, so the first flit leaves one cycle later than from a
// standard port. A passed packet is sent; a blocked one raises alert /
// alert_id for one cycle and is discarded once all four flits are in.
module output_port
  import noc_pkg::*;
#(
  parameter port_e       PORT      = PORT_LOCAL,
  parameter bit          IAV_EN    = 1'b0,
  parameter int unsigned ENTRIES   = 32,
  parameter node_id_t    ROUTER_ID = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // switch side
  input  logic [NPORTS-2:0]          swt_req,
  output logic [NPORTS-2:0]          swt_ack,
  output logic [1:0]                 swt_sel,
  input  flit_t                      xbar_data,
  input  logic                       xbar_valid,
  // link to downstream
  output flit_t                      data_out,
  output logic                       req_out,
  input  logic                       ack_out,
  // IAV table load (ignored when IAV_EN = 0)
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_index,
  input  iav_entry_t                 cfg_entry,
  // status
  output logic                       alert,
  output logic [2*ID_W-1:0]          alert_id
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_DRAIN} state_e;

  state_e state;
  logic [$clog2(PKT_FLITS+1)-1:0] wcount, fifo_count;
  logic   fifo_wr, fifo_rd, fifo_flush, fifo_full, fifo_empty;
  flit_t  peek0, peek1;
  logic   arb_advance;
  logic [NPORTS-2:0] grant;
  logic [1:0] grant_idx;
  logic   all_in;
  logic   checked, passed, blocked;
  logic   iav_check, iav_done, iav_enable, iav_alert;
  logic   may_send;

  // ------------------------------------------------------------ arbiter
  assign arb_advance = (state == S_IDLE) && fifo_empty;

  rr_arbiter #(.N(NPORTS - 1)) u_arb (
    .clk, .rst_n,
    .advance  (arb_advance),
    .req      (swt_req),
    .grant    (grant),
    .grant_idx(grant_idx)
  );

  assign swt_ack = grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      swt_sel <= '0;
    else if (arb_advance && |grant)  swt_sel <= grant_idx;
  end

  // --------------------------------------------------------------- FIFO
  assign fifo_wr = (state == S_FILL) && xbar_valid && !all_in;
  assign all_in  = (wcount == PKT_FLITS[$bits(wcount)-1:0]);

  flit_fifo #(.DEPTH(PKT_FLITS)) u_fifo (
    .clk, .rst_n,
    .flush  (fifo_flush),
    .wr_en  (fifo_wr),
    .wr_data(xbar_data),
    .rd_en  (fifo_rd),
    .rd_data(data_out),
    .peek0, .peek1,
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  // ---------------------------------------------------------------- IAV
  generate
    if (IAV_EN) begin : g_iav
      // start the check while the second flit is being written: flit 0 is
      // the FIFO head, flit 1 is still on the switch input
      assign iav_check = fifo_wr && !checked && (fifo_count == 1);
      iav #(.SIDE(IAV_OUTPUT), .ENTRIES(ENTRIES), .ROUTER_ID(ROUTER_ID)) u_iav (
        .clk, .rst_n,
        .cfg_we, .cfg_index, .cfg_entry,
        .check   (iav_check),
        .id      ({hdr_src(peek0), hdr_dest(peek0)}),
        .address (hdr_addr(peek0, xbar_data)),
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

  // ------------------------------------------------------- control logic
  assign may_send   = IAV_EN ? (passed || (iav_done && iav_enable)) : (state != S_IDLE);
  assign req_out    = may_send && !fifo_empty;
  assign fifo_rd    = req_out && ack_out;
  assign fifo_flush = (state == S_FILL) && all_in && blocked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wcount  <= '0;
      checked <= 1'b0;
      passed  <= 1'b0;
      blocked <= 1'b0;
    end else begin
      if (iav_check) checked <= 1'b1;
      if (iav_done) begin
        passed  <= iav_enable;
        blocked <= iav_alert;
      end
      if (fifo_wr) wcount <= wcount + 1'b1;
      case (state)
        S_IDLE: begin
          if (arb_advance && |grant) begin
            state  <= S_FILL;
            wcount <= '0;
          end
        end
        S_FILL: begin
          if (all_in) begin
            if (!IAV_EN || passed) begin
              state <= S_DRAIN;
            end else if (blocked) begin
              state   <= S_IDLE;
              checked <= 1'b0;
              blocked <= 1'b0;
            end
          end
        end
        S_DRAIN: begin
          if (fifo_empty || (fifo_count == 1 && fifo_rd)) begin
            state   <= S_IDLE;
            checked <= 1'b0;
            passed  <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ack_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(swt_ack));
  a_ack_has_req: assert property (@(posedge clk) disable iff (!rst_n) (swt_ack & ~swt_req) == '0);

endmodule
