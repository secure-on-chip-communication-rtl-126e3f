// iav: Id and Address Verification module of a local router port.
//
// Holds a lookup table of ENTRIES rows {id, L_bound, U_bound}. When check is
// pulsed (the FIFO has buffered the first two flits of a packet) the module
// takes the 12-bit id field {id_src, id_dest} and the 16-bit address of the
// header and decides, in the same cycle, whether the packet is allowed:
//   * Check_dest / Check_src: one id must be this router's own id, the other
//     must equal the id of a table row.
//       SIDE = IAV_INPUT  (local input port):  id_src == ROUTER_ID,
//                                               id_dest looked up in the table.
//       SIDE = IAV_OUTPUT (local output port): id_dest == ROUTER_ID,
//                                               id_src looked up in the table.
//   * Check_L / Check_U: the address must lie within L_bound..U_bound
//     (both inclusive) of a row whose id matched.
// The verdict is registered: one cycle after check, done is high for one
// cycle together with either enable (allowed) or alert (blocked). alert_id
// carries the offending packet's 12-bit id field for the manager core.
//
// The table is written through cfg_we / cfg_index / cfg_entry, one row per
// cycle; reset clears every row's valid bit, so nothing passes until the
// table is loaded. This write port stands in for loading new table contents
// by reconfiguration; its form, the valid bit and the one-cycle registered
// verdict are this design's choices. The bounds are full byte addresses, so a
// table aligned to 64-byte blocks behaves as a block-granular check.
module iav
  import noc_pkg::*;
#(
  parameter iav_side_e   SIDE      = IAV_INPUT,
  parameter int unsigned ENTRIES   = 32,
  parameter node_id_t    ROUTER_ID = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // table load
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_index,
  input  iav_entry_t                 cfg_entry,
  // verification request
  input  logic                       check,
  input  logic [2*ID_W-1:0]          id,       // {id_src, id_dest}
  input  addr_t                      address,
  // verdict
  output logic                       done,
  output logic                       enable,
  output logic                       alert,
  output logic [2*ID_W-1:0]          alert_id
);

  iav_entry_t table_q [ENTRIES];

  node_id_t    id_dest, id_src, lookup_id, own_id;
  logic        own_ok;
  logic [ENTRIES-1:0] id_hit, l_ok, u_ok, row_ok;
  logic        allowed;

  assign id_dest   = id[ID_W-1:0];
  assign id_src    = id[2*ID_W-1:ID_W];
  assign lookup_id = (SIDE == IAV_INPUT) ? id_dest : id_src;
  assign own_id    = (SIDE == IAV_INPUT) ? id_src  : id_dest;
  assign own_ok    = (own_id == ROUTER_ID);

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      id_hit[i] = table_q[i].valid && (table_q[i].id == lookup_id);
      l_ok[i]   = (address >= table_q[i].l_bound);
      u_ok[i]   = (address <= table_q[i].u_bound);
      row_ok[i] = id_hit[i] && l_ok[i] && u_ok[i];
    end
  end

  assign allowed = own_ok && (|row_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_index] <= cfg_entry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      enable   <= 1'b0;
      alert    <= 1'b0;
      alert_id <= '0;
    end else begin
      done   <= check;
      enable <= check && allowed;
      alert  <= check && !allowed;
      if (check && !allowed) alert_id <= id;
    end
  end

endmodule
