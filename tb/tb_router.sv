// tb_router: self-checking test of one five-port router with both IAV checks.
// The router sits at x = 3, y = 3. Behavioural neighbours on all five
// channels inject random packets that XY routing may bring in through that
// channel, and accept flits with random back-pressure. A scoreboard
// predicts, for every packet, the output channel it must leave on, or that
// it must be blocked: by the local input port's IAV (packets the node sends)
// or by the local output port's IAV (packets delivered to the node). Every
// delivered packet must match one predicted for that channel, none may be
// left over, and the two alert outputs must fire once per blocked packet.
// It also counts cycles where several inputs wanted the same output.
module tb_router;
  import noc_pkg::*;

  localparam node_id_t RID = 6'b011_011;
  localparam int unsigned NPKT = 150;   // per input channel

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t data_in [5], data_out [5];
  logic  req_in [5], ack_in [5], req_out [5], ack_out [5];
  logic  cfg_we;
  node_id_t cfg_node;
  iav_side_e cfg_side;
  logic [3:0] cfg_index;
  iav_entry_t cfg_entry;
  logic alert_in, alert_out, misroute;
  logic [11:0] alert_in_id, alert_out_id;
  int checks = 0, failures = 0;

  iav_entry_t tin [16], tout [16];
  packet_t sent [5][$];
  packet_t expect_q [5][$];
  int n_alert_in = 0, n_alert_out = 0, exp_alert_in = 0, exp_alert_out = 0;
  int n_delivered = 0, n_contention = 0, n_stall = 0;

  always #5 clk = ~clk;

  router #(.ROUTER_ID(RID), .ENTRIES(16)) dut (.*);

  function automatic port_e ref_route(node_id_t dst);
    if (dst[2:0] > RID[2:0]) return PORT_EAST;
    if (dst[2:0] < RID[2:0]) return PORT_WEST;
    if (dst[5:3] > RID[5:3]) return PORT_SOUTH;
    if (dst[5:3] < RID[5:3]) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  function automatic bit tbl_ok(iav_entry_t t [16], node_id_t id, addr_t a);
    foreach (t[i]) if (t[i].valid && t[i].id == id && a >= t[i].l_bound && a <= t[i].u_bound) return 1;
    return 0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // random packet that may enter through channel p
  function automatic packet_t make_pkt(int p);
    packet_t k;
    int e;
    logic [2:0] x, y;
    k = packet_t'({$urandom, $urandom});
    e = $urandom_range(0, 15);
    x = 3'($urandom); y = 3'($urandom);
    case (p)
      PORT_WEST:  if (x < RID[2:0]) x = RID[2:0];
      PORT_EAST:  if (x > RID[2:0]) x = RID[2:0];
      PORT_NORTH: begin x = RID[2:0]; if (y < RID[5:3]) y = RID[5:3]; end
      PORT_SOUTH: begin x = RID[2:0]; if (y > RID[5:3]) y = RID[5:3]; end
      default: ;
    endcase
    k.id_dest = {y, x};
    if (p == PORT_LOCAL) begin
      k.id_src = RID;
      if ($urandom_range(0, 3) != 0) begin
        k.id_dest = tin[e].id;
        k.address = tin[e].l_bound | addr_t'($urandom_range(0, 16'h0FFF));
      end
      if (k.id_dest == RID) k.id_dest = RID ^ 6'b000001;
    end else if (k.id_dest == RID && $urandom_range(0, 3) != 0) begin
      k.id_src  = tout[e].id;
      k.address = tout[e].l_bound | addr_t'($urandom_range(0, 16'h0FFF));
    end
    return k;
  endfunction

  task automatic drive(int p);
    for (int n = 0; n < NPKT; n++) begin
      packet_t k;
      port_e r;
      k = make_pkt(p);
      r = ref_route(k.id_dest);
      if (p == PORT_LOCAL && !tbl_ok(tin, k.id_dest, k.address)) exp_alert_in++;
      else if (r == PORT_LOCAL && !tbl_ok(tout, k.id_src, k.address)) exp_alert_out++;
      else expect_q[r].push_back(k);
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin req_in[p] = 0; @(negedge clk); end
        req_in[p] = 1; data_in[p] = k[16*f +: 16];
        #1;
        while (!ack_in[p]) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      req_in[p] = 0;
    end
  endtask

  task automatic sink(int q);
    packet_t k;
    int f;
    f = 0;
    forever begin
      @(negedge clk);
      ack_out[q] = ($urandom_range(0, 3) != 0);
      #1;
      if (req_out[q] && !ack_out[q]) n_stall++;
      if (req_out[q] && ack_out[q]) begin
        k[16*f +: 16] = data_out[q];
        f++;
        if (f == 4) begin
          int hit;
          hit = -1;
          foreach (expect_q[q][j]) if (hit < 0 && expect_q[q][j] == k) hit = j;
          chk(hit >= 0, $sformatf("unexpected packet %h on port %0d", k, q));
          if (hit >= 0) expect_q[q].delete(hit);
          n_delivered++;
          f = 0;
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    int want [5];
    if (alert_in) n_alert_in++;
    if (alert_out) n_alert_out++;
    for (int q = 0; q < 5; q++) want[q] = 0;
    for (int p = 0; p < 5; p++)
      for (int k = 0; k < 4; k++) if (dut.ip_swt_req[p][k]) want[(k < p) ? k : k + 1]++;
    for (int q = 0; q < 5; q++) if (want[q] > 1) n_contention++;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 5; p++) begin req_in[p] = 0; data_in[p] = '0; ack_out[p] = 0; end
    cfg_we = 0; cfg_node = RID; cfg_side = IAV_INPUT; cfg_index = '0; cfg_entry = '0;
    for (int e = 0; e < 16; e++) begin
      addr_t lo;
      lo = addr_t'($urandom) & 16'hF000;
      tin[e]  = '{1'b1, node_id_t'($urandom), lo, lo | 16'h0FFF};
      lo = addr_t'($urandom) & 16'hF000;
      tout[e] = '{1'b1, node_id_t'($urandom), lo, lo | 16'h0FFF};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int e = 0; e < 16; e++) begin
        @(negedge clk);
        cfg_we = 1; cfg_side = iav_side_e'(s); cfg_index = 4'(e);
        cfg_entry = (s == 0) ? tin[e] : tout[e];
      end
    // a write for another router must not land here
    @(negedge clk);
    cfg_node = RID ^ 6'd1; cfg_side = IAV_INPUT; cfg_index = 4'd0; cfg_entry = '0;
    @(negedge clk);
    cfg_we = 0;
    fork
      sink(0); sink(1); sink(2); sink(3); sink(4);
    join_none
    fork
      drive(0); drive(1); drive(2); drive(3); drive(4);
    join
    repeat (200) @(negedge clk);
    for (int q = 0; q < 5; q++) chk(expect_q[q].size() == 0, $sformatf("port %0d: %0d packets missing", q, expect_q[q].size()));
    chk(n_alert_in == exp_alert_in, $sformatf("input alerts %0d vs %0d", n_alert_in, exp_alert_in));
    chk(n_alert_out == exp_alert_out, $sformatf("output alerts %0d vs %0d", n_alert_out, exp_alert_out));
    chk(!misroute, "no misroute");
    chk(exp_alert_in > 0 && exp_alert_out > 0 && n_contention > 0 && n_stall > 0, "mechanisms exercised");
    $display("delivered %0d, input alerts %0d, output alerts %0d, contention cycles %0d, stall cycles %0d",
             n_delivered, n_alert_in, n_alert_out, n_contention, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
