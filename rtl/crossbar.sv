// crossbar: the central crosspoint switch of the five-port router.
//
// It connects each input port to the output ports of the four other channels
// and carries both the switch handshake and the flits:
//   * in_swt_req[p][k] (input p asks for its k-th other port) is delivered to
//     output q = peer(p,k) as out_swt_req[q][slot(q,p)]; the output ports'
//     out_swt_ack bits are carried back the same way to in_swt_ack.
//   * Output q receives the flit and valid bit of input peer(q, sel[q]),
//     where sel[q] is the 2-bit swt_sel its arbiter holds.
// Purely combinational. No path from a port to itself exists, so a packet
// cannot leave by the channel it came in on.
module crossbar
  import noc_pkg::*;
(
  input  logic [NPORTS-2:0] in_swt_req  [NPORTS],
  output logic [NPORTS-2:0] in_swt_ack  [NPORTS],
  input  flit_t             in_data     [NPORTS],
  input  logic              in_valid    [NPORTS],
  output logic [NPORTS-2:0] out_swt_req [NPORTS],
  input  logic [NPORTS-2:0] out_swt_ack [NPORTS],
  input  logic [1:0]        out_sel     [NPORTS],
  output flit_t             out_data    [NPORTS],
  output logic              out_valid   [NPORTS]
);

  always_comb begin
    for (int unsigned p = 0; p < NPORTS; p++) begin
      for (int unsigned k = 0; k < NPORTS - 1; k++) begin
        out_swt_req[p][k] = in_swt_req[peer(p, k)][slot(peer(p, k), p)];
        in_swt_ack[p][k]  = out_swt_ack[peer(p, k)][slot(peer(p, k), p)];
      end
    end
  end

  always_comb begin
    for (int unsigned q = 0; q < NPORTS; q++) begin
      out_data[q]  = in_data[peer(q, 32'(out_sel[q]))];
      out_valid[q] = in_valid[peer(q, 32'(out_sel[q]))];
    end
  end

endmodule
