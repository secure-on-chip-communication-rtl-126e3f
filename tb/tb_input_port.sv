// tb_input_port: self-checking test of the router input port, in both forms.
// Instance 0 is the local channel's port with the IAV module, instance 1 a
// standard (west) port. Both receive the same random packet stream through
// req/ack with random gaps. A model decides each packet's fate: blocked by
// the IAV (alert, no switch request), discarded as a route back out of its
// own port (misroute), or forwarded, in which case the switch request must
// name the XY output port and the four flits must leave in order after the
// ack. The delay from the fourth flit to the switch request must be the same
// two cycles with and without the IAV module.
module tb_input_port;
  import noc_pkg::*;

  localparam node_id_t RID = 6'b011_010;  // x = 2, y = 3
  localparam int unsigned NPKT = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t data_in [2];
  logic  req_in [2], ack_in [2];
  logic [3:0] swt_req [2], swt_ack [2];
  flit_t xbar_data [2];
  logic  xbar_valid [2];
  logic  cfg_we;
  logic [3:0] cfg_index;
  iav_entry_t cfg_entry;
  logic alert [2], misroute [2];
  logic [11:0] alert_id [2];
  int checks = 0, failures = 0;
  longint cycle = 0;

  packet_t pkts [NPKT];
  iav_entry_t tbl [16];
  int  fate [2][NPKT];    // 0 forwarded, 1 blocked, 2 misrouted
  longint last_flit_cyc [2];
  int n_alert [2], n_mis [2], n_fwd [2];
  int exp_alert [2], exp_mis [2];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  input_port #(.PORT(PORT_LOCAL), .IAV_EN(1'b1), .ENTRIES(16), .ROUTER_ID(RID)) u_loc (
    .clk, .rst_n, .data_in(data_in[0]), .req_in(req_in[0]), .ack_in(ack_in[0]),
    .swt_req(swt_req[0]), .swt_ack(swt_ack[0]), .xbar_data(xbar_data[0]), .xbar_valid(xbar_valid[0]),
    .cfg_we, .cfg_index, .cfg_entry, .alert(alert[0]), .alert_id(alert_id[0]), .misroute(misroute[0]));
  input_port #(.PORT(PORT_WEST), .IAV_EN(1'b0), .ENTRIES(16), .ROUTER_ID(RID)) u_std (
    .clk, .rst_n, .data_in(data_in[1]), .req_in(req_in[1]), .ack_in(ack_in[1]),
    .swt_req(swt_req[1]), .swt_ack(swt_ack[1]), .xbar_data(xbar_data[1]), .xbar_valid(xbar_valid[1]),
    .cfg_we, .cfg_index, .cfg_entry, .alert(alert[1]), .alert_id(alert_id[1]), .misroute(misroute[1]));

  function automatic port_e ref_route(node_id_t dst);
    if (dst[2:0] > RID[2:0]) return PORT_EAST;
    if (dst[2:0] < RID[2:0]) return PORT_WEST;
    if (dst[5:3] > RID[5:3]) return PORT_SOUTH;
    if (dst[5:3] < RID[5:3]) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  function automatic bit iav_ok(packet_t p);
    if (p.id_src != RID) return 0;
    foreach (tbl[i])
      if (tbl[i].valid && tbl[i].id == p.id_dest && p.address >= tbl[i].l_bound && p.address <= tbl[i].u_bound)
        return 1;
    return 0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // upstream: send every packet flit by flit
  task automatic drive(int i);
    for (int n = 0; n < NPKT; n++) begin
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin req_in[i] = 0; @(negedge clk); end
        req_in[i] = 1;
        data_in[i] = pkts[n][16*f +: 16];
        #1;
        while (!ack_in[i]) begin @(negedge clk); #1; end
        if (f == 3) last_flit_cyc[i] = cycle;
      end
      @(negedge clk);
      req_in[i] = 0;
    end
  endtask

  // switch side: grant requests, collect flits
  task automatic collect(int i);
    for (int n = 0; n < NPKT; n++) begin
      port_e r;
      int slot_exp;
      if (fate[i][n] != 0) continue;
      r = ref_route(pkts[n].id_dest);
      slot_exp = (32'(r) < (i == 0 ? 0 : 4)) ? 32'(r) : 32'(r) - 1;
      @(negedge clk);
      while (swt_req[i] == 0) @(negedge clk);
      chk(swt_req[i] == (4'b1 << slot_exp), $sformatf("swt_req %0d pkt %0d", i, n));
      chk(cycle - last_flit_cyc[i] == 2, $sformatf("request delay %0d inst %0d", cycle - last_flit_cyc[i], i));
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(swt_req[i] == (4'b1 << slot_exp), "request held");
      end
      swt_ack[i] = swt_req[i];
      @(negedge clk);
      swt_ack[i] = 0;
      for (int f = 0; f < 4; f++) begin
        chk(xbar_valid[i] && xbar_data[i] == pkts[n][16*f +: 16], $sformatf("flit %0d of pkt %0d inst %0d", f, n, i));
        @(negedge clk);
      end
      chk(!xbar_valid[i], "valid after packet");
      n_fwd[i]++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      if (alert[i]) n_alert[i]++;
      if (misroute[i]) n_mis[i]++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      req_in[i] = 0; data_in[i] = '0; swt_ack[i] = '0;
      n_alert[i] = 0; n_mis[i] = 0; n_fwd[i] = 0; exp_alert[i] = 0; exp_mis[i] = 0;
    end
    cfg_we = 0; cfg_index = '0; cfg_entry = '0;
    for (int e = 0; e < 16; e++) begin
      addr_t lo;
      lo = addr_t'($urandom) & 16'hFFC0;
      tbl[e] = '{(e < 12), node_id_t'($urandom), lo, lo | 16'h0FFF};
    end
    for (int n = 0; n < NPKT; n++) begin
      int e;
      e = $urandom_range(0, 11);
      pkts[n] = packet_t'({$urandom, $urandom});
      case ($urandom_range(0, 3))
        0, 1: begin pkts[n].id_src = RID; pkts[n].id_dest = tbl[e].id;
                    pkts[n].address = tbl[e].l_bound + addr_t'($urandom_range(0, 16'h0FFF)); end
        2:    begin pkts[n].id_src = RID; end
        default: ;
      endcase
      fate[0][n] = !iav_ok(pkts[n]) ? 1 : (ref_route(pkts[n].id_dest) == PORT_LOCAL) ? 2 : 0;
      fate[1][n] = (ref_route(pkts[n].id_dest) == PORT_WEST) ? 2 : 0;
      for (int i = 0; i < 2; i++) begin
        if (fate[i][n] == 1) exp_alert[i]++;
        if (fate[i][n] == 2) exp_mis[i]++;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      cfg_we = 1; cfg_index = 4'(e); cfg_entry = tbl[e];
    end
    @(negedge clk);
    cfg_we = 0;
    fork
      drive(0);
      drive(1);
      collect(0);
      collect(1);
    join
    repeat (20) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      chk(n_alert[i] == exp_alert[i], $sformatf("alerts inst %0d: %0d vs %0d", i, n_alert[i], exp_alert[i]));
      chk(n_mis[i] == exp_mis[i], $sformatf("misroutes inst %0d: %0d vs %0d", i, n_mis[i], exp_mis[i]));
      $display("inst %0d: forwarded %0d blocked %0d misrouted %0d", i, n_fwd[i], n_alert[i], n_mis[i]);
    end
    chk(exp_alert[0] > 0 && exp_mis[1] > 0 && n_fwd[0] > 0, "all outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
