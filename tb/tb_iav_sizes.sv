// tb_iav_sizes: the IAV module at every table size the design is meant for.
// One input-side instance per size (1, 8, 16, 32, 64 and 128 rows) is loaded
// with a full table of random rows through its cfg port and then given random
// headers: mostly ids taken from a random row and addresses at or near that
// row's bounds, plus headers with a forged source id. Each verdict is
// compared with a reference search over a copy of the table. The verdict must
// come exactly one cycle after check at every size, and done must stay low in
// a cycle after no check. The sizes beyond 32 rows need only the ENTRIES
// parameter; the same header layout is used throughout.
module tb_iav_sizes;
  import noc_pkg::*;

  localparam int       NSIZES = 6;
  localparam int       SIZES [NSIZES] = '{1, 8, 16, 32, 64, 128};
  localparam int       PROBES = 400;
  localparam node_id_t RID    = 6'd37;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  bit   finished [NSIZES];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int E  = SIZES[g];

    logic                       cfg_we;
    logic [$clog2(E)-1:0]       cfg_index;
    iav_entry_t                 cfg_entry;
    logic                       check;
    logic [2*ID_W-1:0]          id;
    addr_t                      address;
    logic                       done, enable, alert;
    logic [2*ID_W-1:0]          alert_id;
    iav_entry_t                 tbl [E];

    iav #(.SIDE(IAV_INPUT), .ENTRIES(E), .ROUTER_ID(RID)) dut (
      .clk, .rst_n, .cfg_we, .cfg_index, .cfg_entry, .check, .id, .address,
      .done, .enable, .alert, .alert_id);

    initial begin
      int       r;
      node_id_t src, dst;
      addr_t    a, lo, hi;
      bit       exp;
      int       passes, blocks;

      cfg_we = 0; cfg_index = '0; cfg_entry = '0;
      check = 0; id = '0; address = '0;
      passes = 0; blocks = 0;
      finished[g] = 0;
      wait (rst_n);

      // load every row
      for (int i = 0; i < E; i++) begin
        lo = addr_t'($urandom_range(0, 16'hFFFF));
        hi = addr_t'($urandom_range(0, 16'hFFFF));
        if (lo > hi) begin a = lo; lo = hi; hi = a; end
        tbl[i].valid   = 1'b1;
        tbl[i].id      = node_id_t'($urandom);
        tbl[i].l_bound = lo;
        tbl[i].u_bound = hi;
        @(negedge clk);
        cfg_we    = 1;
        cfg_index = $bits(cfg_index)'(i);
        cfg_entry = tbl[i];
      end
      @(negedge clk);
      cfg_we = 0;

      for (int p = 0; p < PROBES; p++) begin
        r   = (p % 8 == 0) ? E - 1 : $urandom_range(0, E - 1);
        dst = ($urandom_range(0, 9) == 0) ? node_id_t'($urandom) : tbl[r].id;
        src = ($urandom_range(0, 9) == 0) ? node_id_t'(RID ^ 6'd1) : RID;
        case ($urandom_range(0, 5))
          0: a = tbl[r].l_bound;
          1: a = tbl[r].u_bound;
          2: a = tbl[r].l_bound - 16'd1;
          3: a = tbl[r].u_bound + 16'd1;
          default: a = addr_t'($urandom_range(0, 16'hFFFF));
        endcase

        exp = 0;
        if (src == RID)
          for (int i = 0; i < E; i++)
            if (tbl[i].valid && tbl[i].id == dst &&
                a >= tbl[i].l_bound && a <= tbl[i].u_bound) exp = 1;

        @(negedge clk);
        check = 1; id = {src, dst}; address = a;
        @(negedge clk);
        check = 0;
        checks++;
        if (!done || enable != exp || alert != !exp || (!exp && alert_id != {src, dst})) begin
          failures++;
          $display("FAIL size=%0d src=%0d dst=%0d addr=%h exp=%0d done=%0d en=%0d al=%0d",
                   E, src, dst, a, exp, done, enable, alert);
        end
        if (exp) passes++; else blocks++;
        @(negedge clk);
        checks++;
        if (done || enable || alert) begin
          failures++;
          $display("FAIL size=%0d: verdict without check", E);
        end
      end

      // both outcomes must have been seen at this size
      checks++;
      if (passes == 0 || blocks == 0) begin
        failures++;
        $display("FAIL size=%0d: passes=%0d blocks=%0d", E, passes, blocks);
      end
      $display("size %0d: %0d passed, %0d blocked", E, passes, blocks);
      finished[g] = 1;
    end
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      foreach (finished[i]) all &= finished[i];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
