// rr_arbiter: rotating-priority arbiter of a router output port.
//
// N requesters (the input ports of the four other channels). When advance is
// high and at least one request is present, grant is the one-hot choice of
// the first requester at or after the current priority pointer, and grant_idx
// its index; both are combinational. On the clock edge where a grant is taken
// (advance && |req) the pointer moves to the slot after the winner, so the
// port just served drops to lowest priority.
//
// Rotating priority with the served port lowered is what the output port
// uses; the pointer form is this design's own.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 advance,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;
  logic          found;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    found     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (!found && req[idx]) begin
        found      = 1'b1;
        grant_idx  = idx;
        grant[idx] = advance;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ptr <= '0;
    else if (advance && found) ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

endmodule
