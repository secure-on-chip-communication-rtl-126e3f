// tb_output_port: self-checking test of the router output port, in both forms.
// Instance 0 is the local channel's port with the IAV module, instance 1 a
// standard (east) port. For each, four virtual input ports hold random
// packets and request the switch. Grants must follow rotating priority and
// come only while the port is idle, swt_sel must name the winner, and the
// granted packet, sent as four xbar_valid flits, must leave on the link side
// unchanged through req/ack with random back-pressure. At the IAV port a
// packet whose destination is not this router or whose source and address
// match no table row must raise alert and never leave.
module tb_output_port;
  import noc_pkg::*;

  localparam node_id_t RID = 6'b010_101;
  localparam int unsigned NPKT = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] swt_req [2], swt_ack [2];
  logic [1:0] swt_sel [2];
  flit_t xbar_data [2], data_out [2];
  logic  xbar_valid [2], req_out [2], ack_out [2];
  logic  cfg_we;
  logic [3:0] cfg_index;
  iav_entry_t cfg_entry;
  logic alert [2];
  logic [11:0] alert_id [2];
  int checks = 0, failures = 0;

  iav_entry_t tbl [16];
  packet_t  q_in [2][4][$];   // packets waiting at each virtual input
  packet_t  q_out [2][$];     // packets expected on the link
  int n_alert [2], exp_alert [2], n_sent [2], n_stall [2];
  int ptr [2];

  always #5 clk = ~clk;

  output_port #(.PORT(PORT_LOCAL), .IAV_EN(1'b1), .ENTRIES(16), .ROUTER_ID(RID)) u_loc (
    .clk, .rst_n, .swt_req(swt_req[0]), .swt_ack(swt_ack[0]), .swt_sel(swt_sel[0]),
    .xbar_data(xbar_data[0]), .xbar_valid(xbar_valid[0]),
    .data_out(data_out[0]), .req_out(req_out[0]), .ack_out(ack_out[0]),
    .cfg_we, .cfg_index, .cfg_entry, .alert(alert[0]), .alert_id(alert_id[0]));
  output_port #(.PORT(PORT_EAST), .IAV_EN(1'b0), .ENTRIES(16), .ROUTER_ID(RID)) u_std (
    .clk, .rst_n, .swt_req(swt_req[1]), .swt_ack(swt_ack[1]), .swt_sel(swt_sel[1]),
    .xbar_data(xbar_data[1]), .xbar_valid(xbar_valid[1]),
    .data_out(data_out[1]), .req_out(req_out[1]), .ack_out(ack_out[1]),
    .cfg_we, .cfg_index, .cfg_entry, .alert(alert[1]), .alert_id(alert_id[1]));

  function automatic bit iav_ok(packet_t p);
    if (p.id_dest != RID) return 0;
    foreach (tbl[i])
      if (tbl[i].valid && tbl[i].id == p.id_src && p.address >= tbl[i].l_bound && p.address <= tbl[i].u_bound)
        return 1;
    return 0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // switch side of instance i
  task automatic feed(int i);
    int remaining;
    remaining = NPKT;
    while (remaining > 0) begin
      int w;
      logic [3:0] r;
      @(negedge clk);
      r = '0;
      for (int k = 0; k < 4; k++) r[k] = (q_in[i][k].size() > 0);
      swt_req[i] = r;
      #1;
      if (swt_ack[i] == 0) continue;
      // expected winner: first requester at or after the pointer
      w = -1;
      for (int k = 0; k < 4; k++) if (w < 0 && r[(ptr[i] + k) % 4]) w = (ptr[i] + k) % 4;
      chk(swt_ack[i] == (4'b1 << w), $sformatf("grant inst %0d ack %b exp %0d", i, swt_ack[i], w));
      ptr[i] = (w + 1) % 4;
      @(negedge clk);
      swt_req[i] = '0;
      chk(swt_sel[i] == 2'(w), "swt_sel");
      begin
        packet_t p;
        p = q_in[i][w].pop_front();
        if (i == 0 && !iav_ok(p)) exp_alert[i]++;
        else q_out[i].push_back(p);
        for (int f = 0; f < 4; f++) begin
          xbar_valid[i] = 1; xbar_data[i] = p[16*f +: 16];
          @(negedge clk);
        end
        xbar_valid[i] = 0; xbar_data[i] = flit_t'($urandom);
      end
      remaining--;
    end
    swt_req[i] = '0;
  endtask

  // link side of instance i
  task automatic drain(int i);
    int got;
    got = 0;
    forever begin
      @(negedge clk);
      ack_out[i] = ($urandom_range(0, 2) != 0);
      #1;
      if (req_out[i] && !ack_out[i]) n_stall[i]++;
      if (req_out[i] && ack_out[i]) begin
        int f;
        f = got % 4;
        chk(q_out[i].size() > 0, "unexpected flit");
        if (q_out[i].size() > 0) begin
          chk(data_out[i] == q_out[i][0][16*f +: 16], $sformatf("flit %0d inst %0d", f, i));
          if (f == 3) begin void'(q_out[i].pop_front()); n_sent[i]++; end
        end
        got++;
      end
    end
  endtask

  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++) if (alert[i]) n_alert[i]++;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      swt_req[i] = '0; xbar_valid[i] = 0; xbar_data[i] = '0; ack_out[i] = 0;
      n_alert[i] = 0; exp_alert[i] = 0; n_sent[i] = 0; n_stall[i] = 0; ptr[i] = 0;
    end
    cfg_we = 0; cfg_index = '0; cfg_entry = '0;
    for (int e = 0; e < 16; e++) begin
      addr_t lo;
      lo = addr_t'($urandom) & 16'hF000;
      tbl[e] = '{1'b1, node_id_t'($urandom), lo, lo | 16'h0FFF};
    end
    for (int i = 0; i < 2; i++)
      for (int n = 0; n < NPKT; n++) begin
        packet_t p;
        int e;
        e = $urandom_range(0, 15);
        p = packet_t'({$urandom, $urandom});
        if ($urandom_range(0, 3) != 0) begin
          p.id_dest = RID; p.id_src = tbl[e].id;
          p.address = ($urandom_range(0, 3) != 0) ? (tbl[e].l_bound | addr_t'($urandom_range(0, 16'h0FFF))) : addr_t'($urandom);
        end
        q_in[i][$urandom_range(0, 3)].push_back(p);
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
      drain(0);
      drain(1);
    join_none
    fork
      feed(0);
      feed(1);
    join
    repeat (60) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      chk(q_out[i].size() == 0, $sformatf("packets left inst %0d: %0d", i, q_out[i].size()));
      chk(n_alert[i] == exp_alert[i], $sformatf("alerts inst %0d: %0d vs %0d", i, n_alert[i], exp_alert[i]));
      chk(n_sent[i] + exp_alert[i] == NPKT, "all packets accounted");
      $display("inst %0d: delivered %0d blocked %0d stalled cycles %0d", i, n_sent[i], n_alert[i], n_stall[i]);
    end
    chk(exp_alert[0] > 0 && n_stall[0] > 0, "alert and back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
