// tb_flit_fifo: self-checking test of the 4-flit port buffer.
// Random writes and reads are compared against a queue model; full, empty,
// count, the two peek outputs and flush are checked every cycle.
module tb_flit_fifo;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, wr_en, rd_en, full, empty;
  flit_t wr_data, rd_data, peek0, peek1;
  logic [2:0] count;
  int checks = 0, failures = 0;
  flit_t model[$];

  always #5 clk = ~clk;

  flit_fifo #(.DEPTH(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare outputs with the model
      check(count == 3'(model.size()), "count");
      check(full == (model.size() == 4), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0] && peek0 == model[0], "head");
      if (model.size() > 1) check(peek1 == model[1], "peek1");
      // drive the next operation
      flush   = ($urandom_range(0, 99) == 0);
      wr_en   = $urandom_range(0, 1);
      rd_en   = $urandom_range(0, 1);
      wr_data = flit_t'($urandom);
      @(posedge clk);
      #1;
      if (flush) model.delete();
      else begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && model.size() < 4;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
