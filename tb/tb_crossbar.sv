// tb_crossbar: checks the switch request/ack exchange and the data muxing.
// Each input requests one random other port; the request must appear at that
// output in the slot of the requester, an ack raised there must come back to
// the requester, and each output must carry the flit of the input its select
// value names.
module tb_crossbar;
  import noc_pkg::*;

  logic [3:0] in_swt_req [5];
  logic [3:0] in_swt_ack [5];
  flit_t      in_data    [5];
  logic       in_valid   [5];
  logic [3:0] out_swt_req[5];
  logic [3:0] out_swt_ack[5];
  logic [1:0] out_sel    [5];
  flit_t      out_data   [5];
  logic       out_valid  [5];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int tgt [5];
      for (int p = 0; p < 5; p++) begin
        int k;
        k = $urandom_range(0, 3);
        tgt[p] = (k < p) ? k : k + 1;
        in_swt_req[p] = 4'b1 << k;
        in_data[p]    = flit_t'($urandom);
        in_valid[p]   = $urandom_range(0, 1);
        out_sel[p]    = 2'($urandom_range(0, 3));
        out_swt_ack[p] = 4'($urandom);
      end
      #1;
      for (int q = 0; q < 5; q++) begin
        for (int k = 0; k < 4; k++) begin
          int p, s;
          p = (k < q) ? k : k + 1;          // k-th other port of q
          s = (q < p) ? q : q - 1;          // slot of q at p
          checks++;
          if (out_swt_req[q][k] != (tgt[p] == q)) begin failures++; $display("FAIL req q%0d k%0d", q, k); end
          checks++;
          if (in_swt_ack[p][s] != out_swt_ack[q][k]) begin failures++; $display("FAIL ack"); end
        end
        begin
          int src;
          src = (out_sel[q] < q) ? out_sel[q] : out_sel[q] + 1;
          checks++;
          if (out_data[q] != in_data[src] || out_valid[q] != in_valid[src]) begin
            failures++; $display("FAIL data q%0d sel %0d", q, out_sel[q]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
