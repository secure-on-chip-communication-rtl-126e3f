// tb_noc_mesh_16: the 16-node configuration: a 4 x 4 mesh with 8-row IAV
// tables, running uniform random traffic with attack packets.
//
// Node i (0..15) sits at x = i % 4, y = i / 4, with node id {y, x}. Node i may
// send to the eight nodes i ^ m for m in MASKS, each pair with its own 4 KiB
// window; the destination's output table admits the same sources and
// windows. Attack packets use a destination outside the table or an address
// outside the window and must be stopped at the sender's router. A first
// phase sends single packets through an otherwise empty network without
// back-pressure and checks the latency from the last injected flit to the
// last delivered flit. Worked out from the port timing: a router takes 7
// cycles from accepting a packet's last flit to its next hop accepting it
// (1 to see the FIFO full, 1 to request the switch, 4 flits across it, 1 on
// the link); the last router delivers its last flit 8 cycles after, one more
// than a standard port because the delivery-side IAV verdict is registered.
// So a route over h links (h + 1 routers) takes 7 * h + 8 cycles; the
// injection-side IAV adds nothing.
module tb_noc_mesh_16;
  import noc_pkg::*;

  localparam int unsigned N = 16;
  localparam logic [3:0] MASKS [8] = '{4'h1, 4'h2, 4'h3, 4'h4, 4'h8, 4'hC, 4'h5, 4'hA};

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t ni_data_in [N], ni_data_out [N];
  logic  ni_req_in [N], ni_ack_in [N], ni_req_out [N], ni_ack_out [N];
  logic  cfg_we;
  node_id_t cfg_node;
  iav_side_e cfg_side;
  logic [2:0] cfg_index;
  iav_entry_t cfg_entry;
  logic alert_in [N], alert_out [N], misroute [N];
  logic [11:0] alert_in_id [N], alert_out_id [N];

  int checks = 0, failures = 0;
  longint cycle = 0;
  packet_t inj_q [N][$];
  packet_t expected [int];
  int exp_alert_in = 0, n_alert_in = 0, n_alert_out = 0, n_delivered = 0, n_stall = 0;
  int serial = 0;
  bit random_gaps = 0;
  longint t_last_in [int], t_last_out [int];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  noc_mesh #(.MESH_X(4), .MESH_Y(4), .ENTRIES(8)) dut (.*);

  function automatic node_id_t id_of(int i);
    return node_id_t'(((i / 4) << 3) | (i % 4));
  endfunction

  function automatic addr_t window(int s, int d);
    return addr_t'(((s + 3 * d) % 16) << 12);
  endfunction

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % 4) - (d % 4); dy = (s / 4) - (d / 4);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic cfg_write(int n, iav_side_e side, int row, iav_entry_t e);
    @(negedge clk);
    cfg_we = 1; cfg_node = id_of(n); cfg_side = side; cfg_index = 3'(row); cfg_entry = e;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic queue_pkt(int s, int d, addr_t a, bit ok);
    packet_t p;
    p = packet_t'({$urandom, $urandom});
    p.data[31:0] = 32'(serial);
    p.id_src = id_of(s); p.id_dest = id_of(d); p.address = a;
    if (ok) expected[serial] = p;
    else exp_alert_in++;
    serial++;
    inj_q[s].push_back(p);
  endtask

  task automatic ni_tx(int n);
    forever begin
      packet_t p;
      @(negedge clk);
      ni_req_in[n] = 0;
      if (inj_q[n].size() == 0) continue;
      p = inj_q[n].pop_front();
      for (int f = 0; f < 4; f++) begin
        while (random_gaps && $urandom_range(0, 3) == 0) begin ni_req_in[n] = 0; @(negedge clk); end
        ni_req_in[n] = 1; ni_data_in[n] = p[16*f +: 16];
        #1;
        while (!ni_ack_in[n]) begin @(negedge clk); #1; end
        if (f == 3) t_last_in[int'(p.data[31:0])] = cycle;
        @(negedge clk);
      end
      ni_req_in[n] = 0;
    end
  endtask

  task automatic ni_rx(int n);
    packet_t p;
    int f;
    f = 0;
    forever begin
      @(negedge clk);
      ni_ack_out[n] = !random_gaps || ($urandom_range(0, 3) != 0);
      #1;
      if (ni_req_out[n] && !ni_ack_out[n]) n_stall++;
      if (ni_req_out[n] && ni_ack_out[n]) begin
        p[16*f +: 16] = ni_data_out[n];
        f++;
        if (f == 4) begin
          int s;
          s = int'(p.data[31:0]);
          checks++;
          if (!expected.exists(s) || expected[s] != p || p.id_dest != id_of(n)) begin
            failures++;
            $display("FAIL node %0d got unexpected packet %h", n, p);
          end else expected.delete(s);
          t_last_out[s] = cycle;
          n_delivered++;
          f = 0;
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++) begin
      if (alert_in[n]) n_alert_in++;
      if (alert_out[n]) n_alert_out++;
    end

  task automatic wait_drain();
    longint t0;
    bit busy;
    t0 = cycle;
    do begin
      repeat (20) @(negedge clk);
      busy = 0;
      for (int n = 0; n < N; n++) if (inj_q[n].size() != 0) busy = 1;
    end while ((busy || expected.size() != 0) && cycle - t0 < 100000);
    repeat (100) @(negedge clk);
    checks++;
    if (expected.size() != 0) begin failures++; $display("FAIL %0d packets not delivered", expected.size()); end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin ni_req_in[n] = 0; ni_data_in[n] = '0; ni_ack_out[n] = 0; end
    cfg_we = 0; cfg_node = '0; cfg_side = IAV_INPUT; cfg_index = '0; cfg_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++)
      for (int i = 0; i < 8; i++) begin
        int d;
        d = n ^ int'(MASKS[i]);
        cfg_write(n, IAV_INPUT, i, '{1'b1, id_of(d), window(n, d), window(n, d) | 16'h0FFF});
        cfg_write(n, IAV_OUTPUT, i, '{1'b1, id_of(d), window(d, n), window(d, n) | 16'h0FFF});
      end
    for (int n = 0; n < N; n++) begin
      fork
        automatic int nn = n;
        ni_tx(nn);
        ni_rx(nn);
      join_none
    end

    // zero-load latency, one packet at a time, no gaps
    for (int s = 0; s < N; s++)
      foreach (MASKS[i]) begin
        int d, id, lat;
        d = s ^ int'(MASKS[i]);
        id = serial;
        queue_pkt(s, d, window(s, d) | 16'h0123, 1);
        wait_drain();
        lat = int'(t_last_out[id] - t_last_in[id]);
        t_last_in.delete(id); t_last_out.delete(id);
        if (s == 0) $display("route %0d -> %0d: %0d links, %0d cycles", s, d, hops(s, d), lat);
        checks++;
        if (lat != 7 * hops(s, d) + 8) begin
          failures++;
          $display("FAIL latency %0d -> %0d: %0d cycles for %0d links", s, d, lat, hops(s, d));
        end
      end

    // uniform random traffic with attacks and back-pressure
    random_gaps = 1;
    for (int r = 0; r < 30; r++)
      for (int s = 0; s < N; s++) begin
        int d;
        d = s ^ int'(MASKS[$urandom_range(0, 7)]);
        case ($urandom_range(0, 7))
          0: queue_pkt(s, s ^ 4'hF, window(s, s ^ 4'hF), 0);       // destination not in table
          1: queue_pkt(s, d, window(s, d) ^ 16'h8000, 0);           // outside the window
          default: queue_pkt(s, d, window(s, d) | addr_t'($urandom_range(0, 16'h0FFF)), 1);
        endcase
      end
    wait_drain();
    checks++;
    if (n_alert_in != exp_alert_in || n_alert_out != 0) begin
      failures++;
      $display("FAIL alerts: in %0d of %0d, out %0d", n_alert_in, exp_alert_in, n_alert_out);
    end
    checks++;
    if (n_stall == 0 || exp_alert_in == 0) begin failures++; $display("FAIL mechanisms not exercised"); end
    $display("delivered %0d, alerts %0d, stalls %0d", n_delivered, n_alert_in, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
