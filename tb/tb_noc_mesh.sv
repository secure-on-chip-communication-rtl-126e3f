// tb_noc_mesh: end-to-end test of the 8 x 8 IAV-protected mesh at its default
// size (no parameter overrides).
//
// Every node has a behavioural network interface that injects packets and
// accepts delivered flits with random back-pressure. The IAV tables encode an
// access policy: node s may send to the 16 nodes s ^ m for the masks m of
// MASKS, each pair with its own 4 KiB address window, and the destination's
// output-port table admits exactly those sources with the same windows.
// Row 14 of every input table also admits node s ^ 6'h2A, which no output
// table admits, so such packets pass the first check and must be stopped by
// the second.
//
// Phases:
//   1 uniform   random allowed destinations, plus attack packets: a
//               destination not in the table, an address outside the window,
//               a forged source id, and the row-14 packets above;
//   2 transpose packets to the transposed node ({y,x} -> {x,y}), first sent
//               before the tables allow it (all blocked), then again after
//               row 15 of the tables has been rewritten at run time;
//   3 hotspot   four distributed nodes receive twice the share of packets.
// Each packet carries a serial number; a scoreboard checks that every allowed
// packet arrives once, unchanged, at its destination, that no blocked packet
// arrives anywhere, and that each blocked packet raised exactly one alert at
// the right router with the right id. Mechanism counts (both alert kinds,
// back-pressure stalls, arbitration contention, reconfiguration) must all be
// non-zero.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int unsigned N = 64;
  localparam logic [5:0] MASKS [14] = '{6'h01, 6'h02, 6'h04, 6'h08, 6'h10, 6'h20, 6'h03,
                                        6'h0C, 6'h30, 6'h09, 6'h12, 6'h24, 6'h3F, 6'h1B};
  localparam logic [5:0] BAD_MASK = 6'h2A;

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t ni_data_in [N], ni_data_out [N];
  logic  ni_req_in [N], ni_ack_in [N], ni_req_out [N], ni_ack_out [N];
  logic  cfg_we;
  node_id_t cfg_node;
  iav_side_e cfg_side;
  logic [4:0] cfg_index;
  iav_entry_t cfg_entry;
  logic alert_in [N], alert_out [N], misroute [N];
  logic [11:0] alert_in_id [N], alert_out_id [N];

  int checks = 0, failures = 0;
  longint cycle = 0;

  packet_t inj_q [N][$];
  packet_t expected [int];       // serial -> packet still to arrive
  int exp_alert_in [N], exp_alert_out [N], n_alert_in [N], n_alert_out [N];
  int n_delivered = 0, n_stall = 0, n_contention = 0, n_reconfig = 0;
  int serial = 0;
  bit transpose_open = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  noc_mesh dut (.*);

  // ------------------------------------------------------------- policy
  function automatic addr_t window(node_id_t s, node_id_t d);
    return addr_t'({(s[1:0] ^ d[3:2]), (s[3:2] ^ d[1:0])}) << 12;
  endfunction

  function automatic node_id_t transpose(node_id_t n);
    return {n[2:0], n[5:3]};
  endfunction

  function automatic bit allowed_pair(node_id_t s, node_id_t d, addr_t a, output bit lvl1);
    bit in_ok, out_ok;
    in_ok = 0; out_ok = 0;
    foreach (MASKS[i]) if (d == (s ^ MASKS[i])) begin in_ok = 1; out_ok = 1; end
    if (d == (s ^ BAD_MASK)) in_ok = 1;
    if (transpose_open && d == transpose(s) && d != s) begin in_ok = 1; out_ok = 1; end
    if (a < window(s, d) || a > (window(s, d) | 16'h0FFF)) begin in_ok = 0; out_ok = 0; end
    if (d == (s ^ BAD_MASK)) out_ok = 0;
    lvl1 = in_ok;
    return in_ok && out_ok;
  endfunction

  task automatic cfg_write(node_id_t n, iav_side_e side, int row, iav_entry_t e);
    @(negedge clk);
    cfg_we = 1; cfg_node = n; cfg_side = side; cfg_index = 5'(row); cfg_entry = e;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_tables();
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < 14; i++) begin
        node_id_t d;
        d = node_id_t'(n) ^ MASKS[i];
        cfg_write(node_id_t'(n), IAV_INPUT, i, '{1'b1, d, window(node_id_t'(n), d), window(node_id_t'(n), d) | 16'h0FFF});
        // at node n, source d = n ^ m sends with window(d, n)
        cfg_write(node_id_t'(n), IAV_OUTPUT, i, '{1'b1, d, window(d, node_id_t'(n)), window(d, node_id_t'(n)) | 16'h0FFF});
      end
      begin
        node_id_t b;
        b = node_id_t'(n) ^ BAD_MASK;
        cfg_write(node_id_t'(n), IAV_INPUT, 14, '{1'b1, b, window(node_id_t'(n), b), window(node_id_t'(n), b) | 16'h0FFF});
      end
    end
  endtask

  task automatic open_transpose();
    for (int n = 0; n < N; n++) begin
      node_id_t t;
      t = transpose(node_id_t'(n));
      cfg_write(node_id_t'(n), IAV_INPUT, 15, '{(t != n), t, window(node_id_t'(n), t), window(node_id_t'(n), t) | 16'h0FFF});
      cfg_write(node_id_t'(n), IAV_OUTPUT, 15, '{(t != n), t, window(t, node_id_t'(n)), window(t, node_id_t'(n)) | 16'h0FFF});
    end
    transpose_open = 1;
    n_reconfig++;
  endtask

  // queue one packet from s to d; a forged source is given in fake_src
  task automatic queue_pkt(node_id_t s, node_id_t d, addr_t a, node_id_t src_field);
    packet_t p;
    bit lvl1, ok;
    p = packet_t'({$urandom, $urandom});
    p.data[31:0] = 32'(serial);
    p.id_src = src_field; p.id_dest = d; p.address = a;
    ok = allowed_pair(s, d, a, lvl1);
    if (src_field != s) begin ok = 0; lvl1 = 0; end
    if (ok) expected[serial] = p;
    else if (!lvl1) exp_alert_in[s]++;
    else exp_alert_out[d]++;
    serial++;
    inj_q[s].push_back(p);
  endtask

  function automatic addr_t in_window(node_id_t s, node_id_t d);
    return window(s, d) | addr_t'($urandom_range(0, 16'h0FFF));
  endfunction

  // ------------------------------------------------ network interfaces
  task automatic ni_tx(int n);
    forever begin
      packet_t p;
      @(negedge clk);
      ni_req_in[n] = 0;
      if (inj_q[n].size() == 0) continue;
      p = inj_q[n].pop_front();
      for (int f = 0; f < 4; f++) begin
        while ($urandom_range(0, 3) == 0) begin ni_req_in[n] = 0; @(negedge clk); end
        ni_req_in[n] = 1; ni_data_in[n] = p[16*f +: 16];
        #1;
        while (!ni_ack_in[n]) begin @(negedge clk); #1; end
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
      ni_ack_out[n] = ($urandom_range(0, 3) != 0);
      #1;
      if (ni_req_out[n] && !ni_ack_out[n]) n_stall++;
      if (ni_req_out[n] && ni_ack_out[n]) begin
        p[16*f +: 16] = ni_data_out[n];
        f++;
        if (f == 4) begin
          int s;
          s = int'(p.data[31:0]);
          checks++;
          if (!expected.exists(s) || expected[s] != p || p.id_dest != node_id_t'(n)) begin
            failures++;
            $display("FAIL node %0d got unexpected packet %h", n, p);
          end else begin
            expected.delete(s);
          end
          n_delivered++;
          f = 0;
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (alert_in[n]) begin
        n_alert_in[n]++;
        checks++;
        // the id field names this node as source, or the forged source n ^ 7
        if (alert_in_id[n][11:6] != node_id_t'(n) && alert_in_id[n][11:6] != (node_id_t'(n) ^ 6'h07)) begin
          failures++; $display("FAIL alert id at %0d", n);
        end
      end
      if (alert_out[n]) begin
        n_alert_out[n]++;
        checks++;
        if (alert_out_id[n][5:0] != node_id_t'(n)) begin failures++; $display("FAIL alert id at %0d", n); end
      end
      if (misroute[n]) begin failures++; $display("FAIL misroute at %0d", n); end
    end
  end

  // switch contention anywhere in the mesh
  for (genvar gy = 0; gy < 8; gy++) begin : g_mon_y
    for (genvar gx = 0; gx < 8; gx++) begin : g_mon_x
      always @(posedge clk) if (rst_n) begin
        for (int q = 0; q < 5; q++) begin
          int want;
          want = 0;
          for (int k = 0; k < 4; k++) if (dut.g_y[gy].g_x[gx].u_router.op_swt_req[q][k]) want++;
          if (want > 1) n_contention++;
        end
      end
    end
  end

  task automatic wait_drain(string phase);
    longint t0;
    bit busy;
    t0 = cycle;
    do begin
      repeat (50) @(negedge clk);
      busy = 0;
      for (int n = 0; n < N; n++) if (inj_q[n].size() != 0) busy = 1;
    end while ((busy || expected.size() != 0) && cycle - t0 < 200000);
    repeat (300) @(negedge clk);
    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d packets not delivered", phase, expected.size());
    end
    $display("%s done at cycle %0d, delivered so far %0d", phase, cycle, n_delivered);
  endtask

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_in, tot_out, exp_in, exp_out;
    node_id_t hot [4];
    hot = '{6'b001_001, 6'b001_110, 6'b110_001, 6'b110_110};
    for (int n = 0; n < N; n++) begin
      ni_req_in[n] = 0; ni_data_in[n] = '0; ni_ack_out[n] = 0;
      exp_alert_in[n] = 0; exp_alert_out[n] = 0; n_alert_in[n] = 0; n_alert_out[n] = 0;
    end
    cfg_we = 0; cfg_node = '0; cfg_side = IAV_INPUT; cfg_index = '0; cfg_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_tables();
    for (int n = 0; n < N; n++) begin
      fork
        automatic int nn = n;
        ni_tx(nn);
        ni_rx(nn);
      join_none
    end

    // phase 1: uniform traffic over the allowed pairs, with attacks
    for (int r = 0; r < 12; r++)
      for (int s = 0; s < N; s++) begin
        node_id_t sn, d;
        int kind;
        sn = node_id_t'(s);
        d = sn ^ MASKS[$urandom_range(0, 13)];
        kind = $urandom_range(0, 9);
        case (kind)
          0: queue_pkt(sn, sn ^ 6'h15, in_window(sn, sn ^ 6'h15), sn);           // not in table
          1: queue_pkt(sn, d, window(sn, d) ^ 16'h8000, sn);                      // outside window
          2: queue_pkt(sn, d, in_window(sn, d), sn ^ 6'h07);                       // forged source
          3: queue_pkt(sn, sn ^ BAD_MASK, in_window(sn, sn ^ BAD_MASK), sn);      // stopped at level 2
          default: queue_pkt(sn, d, in_window(sn, d), sn);
        endcase
      end
    wait_drain("uniform");

    // phase 2: transpose, blocked first, allowed after reconfiguration
    for (int s = 0; s < N; s++)
      if (transpose(node_id_t'(s)) != node_id_t'(s))
        queue_pkt(node_id_t'(s), transpose(node_id_t'(s)), in_window(node_id_t'(s), transpose(node_id_t'(s))), node_id_t'(s));
    wait_drain("transpose before reconfiguration");
    open_transpose();
    for (int r = 0; r < 4; r++)
      for (int s = 0; s < N; s++)
        if (transpose(node_id_t'(s)) != node_id_t'(s))
          queue_pkt(node_id_t'(s), transpose(node_id_t'(s)), in_window(node_id_t'(s), transpose(node_id_t'(s))), node_id_t'(s));
    wait_drain("transpose");

    // phase 3: hotspot, hot nodes reachable through the masks get double weight
    for (int r = 0; r < 8; r++)
      for (int s = 0; s < N; s++) begin
        node_id_t sn, d;
        sn = node_id_t'(s);
        d = sn ^ MASKS[$urandom_range(0, 13)];
        foreach (hot[h]) foreach (MASKS[i])
          if ((sn ^ MASKS[i]) == hot[h] && $urandom_range(0, 6) == 0) d = hot[h];
        queue_pkt(sn, d, in_window(sn, d), sn);
      end
    wait_drain("hotspot");

    tot_in = 0; tot_out = 0; exp_in = 0; exp_out = 0;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (n_alert_in[n] != exp_alert_in[n] || n_alert_out[n] != exp_alert_out[n]) begin
        failures++;
        $display("FAIL node %0d alerts in %0d/%0d out %0d/%0d", n, n_alert_in[n], exp_alert_in[n], n_alert_out[n], exp_alert_out[n]);
      end
      tot_in += n_alert_in[n]; tot_out += n_alert_out[n];
    end
    $display("delivered %0d, level-1 alerts %0d, level-2 alerts %0d, stalls %0d, contention %0d, reconfigurations %0d",
             n_delivered, tot_in, tot_out, n_stall, n_contention, n_reconfig);
    checks++; if (tot_in == 0)       begin failures++; $display("FAIL no level-1 alert"); end
    checks++; if (tot_out == 0)      begin failures++; $display("FAIL no level-2 alert"); end
    checks++; if (n_stall == 0)      begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (n_contention == 0) begin failures++; $display("FAIL no contention"); end
    checks++; if (n_reconfig == 0)   begin failures++; $display("FAIL no reconfiguration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
