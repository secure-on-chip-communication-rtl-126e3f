// flit_fifo: the flit buffer of a router port.
//
// A circular buffer of DEPTH flits (four by default, one whole packet).
// Writes and reads happen on the rising clock edge when wr_en / rd_en are
// high; a write into a full buffer or a read from an empty one is ignored.
// rd_data is the oldest flit (first-word fall-through). flush empties the
// buffer in one cycle; it is used to discard a packet that failed the IAV
// check. peek0 / peek1 show the oldest and second-oldest flits, which is how
// the IAV module reads the header (destination/source ids and address) while
// the packet is still buffered. full is the FIFO_full signal that tells the
// control logic a complete packet is held.
//
// Sizes follow the described port buffer (four flits of 16 bits); the
// pointer scheme, flush and peek outputs are this design's own.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = PKT_FLITS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  wr_en,
  input  flit_t wr_data,
  input  logic  rd_en,
  output flit_t rd_data,
  output flit_t peek0,
  output flit_t peek1,
  output logic  full,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign full  = (count == DEPTH[$bits(count)-1:0]);
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  assign rd_data = mem[rd_ptr];
  assign peek0   = mem[rd_ptr];
  assign peek1   = mem[incr(rd_ptr)];

endmodule
