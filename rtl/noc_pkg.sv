// noc_pkg: types and constants shared by the IAV-protected mesh NoC.
//
// A packet is 64 bits carried as four 16-bit flits, flit 0 first
// (flit k holds packet bits [16k+15:16k]). Inside the packet:
//   [5:0]   id_dest  destination node        [11:6]  id_src  source node
//   [27:12] address  16-bit memory address   [30:28] access type
//   [63:31] data and configuration bits
// The field positions follow the published 64-node, 16-bit-channel header
// format. The address therefore straddles flit 0 (bits 15:12) and flit 1
// (bits 11:0), which is why the IAV check starts once two flits are buffered.
//
// A node id is {y[2:0], x[2:0]} of the router in an 8x8 mesh; this split of
// the 6-bit id into coordinates, the port numbering and the direction of
// north/south are choices of this design.
package noc_pkg;

  localparam int unsigned FLIT_W    = 16;  // physical channel width
  localparam int unsigned PKT_FLITS = 4;   // flits per packet
  localparam int unsigned ID_W      = 6;   // node id width (64 nodes)
  localparam int unsigned COORD_W   = 3;   // x and y coordinate width
  localparam int unsigned ADDR_W    = 16;  // memory address width
  localparam int unsigned NPORTS    = 5;   // local, north, east, south, west

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [ID_W-1:0]   node_id_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Router port numbering. North is towards y-1, south towards y+1,
  // east towards x+1, west towards x-1.
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Full 64-bit packet, as the header format lays it out.
  typedef struct packed {
    logic [32:0] data;      // [63:31]
    logic [2:0]  access;    // [30:28]
    addr_t       address;   // [27:12]
    node_id_t    id_src;    // [11:6]
    node_id_t    id_dest;   // [5:0]
  } packet_t;

  // One row of an IAV lookup table: the node id, the lower and the upper
  // bound of the memory area that id may reach. valid is this design's own
  // addition so that unused rows match nothing.
  typedef struct packed {
    logic     valid;
    node_id_t id;
    addr_t    l_bound;
    addr_t    u_bound;
  } iav_entry_t;

  // Which identity the IAV compares with the table. At the local input port
  // the destination is looked up and the source must be the router itself;
  // at the local output port the source is looked up and the destination
  // must be the router itself.
  typedef enum logic {
    IAV_INPUT  = 1'b0,
    IAV_OUTPUT = 1'b1
  } iav_side_e;

  function automatic node_id_t hdr_dest(flit_t f0);
    return f0[ID_W-1:0];
  endfunction

  function automatic node_id_t hdr_src(flit_t f0);
    return f0[2*ID_W-1:ID_W];
  endfunction

  function automatic addr_t hdr_addr(flit_t f0, flit_t f1);
    return {f1[11:0], f0[15:12]};
  endfunction

  // Index of the k-th "other" port of port p (k = 0..3). Each port talks to
  // the four ports other than itself through 4-bit swt_req/swt_ack buses.
  function automatic int unsigned peer(int unsigned p, int unsigned k);
    return (k < p) ? k : k + 1;
  endfunction

  // Inverse of peer(): slot of port q among the other ports of p (q != p).
  function automatic int unsigned slot(int unsigned p, int unsigned q);
    return (q < p) ? q : q - 1;
  endfunction

endpackage
