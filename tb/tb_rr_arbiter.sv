// tb_rr_arbiter: checks rotating priority of the output-port arbiter.
// Random requests are applied; each grant must be the first requester at or
// after a model pointer, and the pointer moves past the winner. A run with all
// four ports requesting must serve them in turn.
module tb_rr_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic advance;
  logic [3:0] req, grant;
  logic [1:0] grant_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  always #5 clk = ~clk;

  rr_arbiter #(.N(4)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all requesting: strict rotation 0,1,2,3,0,...
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      advance = 1; req = 4'hF;
      #1;
      checks++;
      if (grant != (4'b1 << (i % 4))) begin failures++; $display("FAIL rotation %0d grant %b", i, grant); end
      @(posedge clk);
      ptr = (i % 4 + 1) % 4;
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int exp_idx;
      logic [3:0] exp_grant;
      @(negedge clk);
      advance = $urandom_range(0, 3) != 0;
      req     = 4'($urandom);
      #1;
      exp_idx = -1;
      for (int k = 0; k < 4; k++) if (exp_idx < 0 && req[(ptr + k) % 4]) exp_idx = (ptr + k) % 4;
      exp_grant = (advance && exp_idx >= 0) ? (4'b1 << exp_idx) : 4'b0;
      checks++;
      if (grant != exp_grant || (exp_idx >= 0 && grant_idx != 2'(exp_idx))) begin
        failures++;
        $display("FAIL req %b ptr %0d grant %b exp %b", req, ptr, grant, exp_grant);
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
