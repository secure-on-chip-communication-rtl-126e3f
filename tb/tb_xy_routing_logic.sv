// tb_xy_routing_logic: exhaustive check of XY route computation.
// For several router positions every destination id is applied and the
// chosen port is compared with a reference that walks x first, then y.
module tb_xy_routing_logic;
  import noc_pkg::*;

  localparam node_id_t RID = 6'b011_010;  // x = 2, y = 3
  logic enable, route_valid;
  node_id_t id_dest;
  port_e route_port;
  logic [NPORTS-1:0] route;
  int checks = 0, failures = 0;

  xy_routing_logic #(.ROUTER_ID(RID)) dut (.*);

  function automatic port_e ref_route(node_id_t me, node_id_t dst);
    int mx = me[2:0], my = me[5:3], dx = dst[2:0], dy = dst[5:3];
    if (dx > mx) return PORT_EAST;
    if (dx < mx) return PORT_WEST;
    if (dy > my) return PORT_SOUTH;
    if (dy < my) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int d = 0; d < 64; d++) begin
        enable = e[0];
        id_dest = node_id_t'(d);
        #1;
        checks++;
        if (enable) begin
          if (route_port != ref_route(RID, id_dest) || route != (5'b1 << ref_route(RID, id_dest)) || !route_valid) begin
            failures++;
            $display("FAIL dest %0d: port %0d route %b", d, route_port, route);
          end
        end else if (route != '0 || route_valid) begin
          failures++;
          $display("FAIL route while disabled");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
