// tb_iav: self-checking test of the Id and Address Verification module.
// Two instances, one per side (local input port, local output port), get the
// same table: the three example rows of the module's description
// (id 000000: 0x0000-0xA3FF, id 001100: 0x6540-0xA3FF, id 001011:
// 0xAA80-0xBB7F) plus random rows. Directed and random headers are checked
// against a reference model; the verdict must come exactly one cycle after
// check, with enable or alert, and alert_id must carry the id field.
module tb_iav;
  import noc_pkg::*;

  localparam int unsigned ENT = 16;
  localparam node_id_t RID = 6'd21;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  logic [3:0] cfg_index;
  iav_entry_t cfg_entry;
  logic check;
  logic [11:0] id;
  addr_t address;
  logic done_i, en_i, al_i, done_o, en_o, al_o;
  logic [11:0] aid_i, aid_o;
  int checks = 0, failures = 0;
  iav_entry_t tbl [ENT];

  always #5 clk = ~clk;

  iav #(.SIDE(IAV_INPUT), .ENTRIES(ENT), .ROUTER_ID(RID)) dut_in (
    .clk, .rst_n, .cfg_we, .cfg_index, .cfg_entry, .check, .id, .address,
    .done(done_i), .enable(en_i), .alert(al_i), .alert_id(aid_i));
  iav #(.SIDE(IAV_OUTPUT), .ENTRIES(ENT), .ROUTER_ID(RID)) dut_out (
    .clk, .rst_n, .cfg_we, .cfg_index, .cfg_entry, .check, .id, .address,
    .done(done_o), .enable(en_o), .alert(al_o), .alert_id(aid_o));

  function automatic bit ref_ok(bit out_side, node_id_t src, node_id_t dst, addr_t a);
    node_id_t look, own;
    look = out_side ? src : dst;
    own  = out_side ? dst : src;
    if (own != RID) return 0;
    foreach (tbl[i])
      if (tbl[i].valid && tbl[i].id == look && a >= tbl[i].l_bound && a <= tbl[i].u_bound) return 1;
    return 0;
  endfunction

  task automatic expect_ok(bit got_done, bit got_en, bit got_al, logic [11:0] got_id,
                           bit exp, logic [11:0] idv, string side);
    checks++;
    if (!got_done || got_en != exp || got_al != !exp || (!exp && got_id != idv)) begin
      failures++;
      $display("FAIL %s id=%h addr=%h exp=%0d done=%0d en=%0d al=%0d", side, idv, address, exp, got_done, got_en, got_al);
    end
  endtask

  task automatic run(node_id_t src, node_id_t dst, addr_t a);
    bit ei, eo;
    @(negedge clk);
    check = 1; id = {src, dst}; address = a;
    ei = ref_ok(0, src, dst, a);
    eo = ref_ok(1, src, dst, a);
    @(negedge clk);
    check = 0;
    checks++;
    // one cycle after check: verdict present
    expect_ok(done_i, en_i, al_i, aid_i, ei, {src, dst}, "in");
    expect_ok(done_o, en_o, al_o, aid_o, eo, {src, dst}, "out");
    @(negedge clk);
    if (done_i || done_o || en_i || al_i) begin failures++; $display("FAIL verdict longer than one cycle"); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_index = '0; cfg_entry = '0; check = 0; id = '0; address = '0;
    foreach (tbl[i]) tbl[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // empty table: everything is blocked
    run(RID, 6'd0, 16'h0100);
    // load the table
    tbl[0] = '{1'b1, 6'b000000, 16'h0000, 16'hA3FF};
    tbl[1] = '{1'b1, 6'b001100, 16'h6540, 16'hA3FF};
    tbl[2] = '{1'b1, 6'b001011, 16'hAA80, 16'hBB7F};
    for (int i = 3; i < 12; i++) begin
      addr_t lo, hi;
      lo = addr_t'($urandom) & 16'hFFC0;
      hi = lo + (addr_t'($urandom_range(1, 64)) << 6) - 1;
      if (hi < lo) hi = 16'hFFFF;
      tbl[i] = '{1'b1, node_id_t'($urandom), lo, hi};
    end
    for (int i = 0; i < ENT; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_index = 4'(i); cfg_entry = tbl[i];
    end
    @(negedge clk);
    cfg_we = 0;
    // directed cases on the example rows (input side: src = this router)
    run(RID, 6'b000000, 16'h0000);   // lower edge, allowed
    run(RID, 6'b000000, 16'hA3FF);   // upper edge, allowed
    run(RID, 6'b000000, 16'hA400);   // one past upper bound
    run(RID, 6'b001100, 16'h653F);   // one below lower bound
    run(RID, 6'b001100, 16'h6540);
    run(RID, 6'b001011, 16'hBB7F);
    run(RID, 6'b001011, 16'hBB80);
    run(RID, 6'b111111, 16'h0000);   // destination not in table
    run(6'd5, 6'b000000, 16'h0010);  // spoofed source
    // output side: dst = this router, src looked up
    run(6'b001100, RID, 16'h7000);
    run(6'b001100, RID, 16'h6000);
    run(6'b001011, RID, 16'hAA80);
    // random
    for (int t = 0; t < 3000; t++) begin
      node_id_t s, d;
      addr_t a;
      int pick;
      pick = $urandom_range(0, 11);
      a = ($urandom_range(0, 1) != 0) ? tbl[pick].l_bound + addr_t'($urandom_range(0, 200)) - 16'd100 : addr_t'($urandom);
      case ($urandom_range(0, 2))
        0: begin s = RID; d = tbl[pick].id; end
        1: begin s = tbl[pick].id; d = RID; end
        default: begin s = node_id_t'($urandom); d = node_id_t'($urandom); end
      endcase
      run(s, d, a);
    end
    // rewriting a row takes effect (reconfiguration)
    @(negedge clk);
    cfg_we = 1; cfg_index = 4'd0; cfg_entry = '{1'b0, 6'b000000, 16'h0000, 16'hA3FF};
    tbl[0] = cfg_entry;
    @(negedge clk);
    cfg_we = 0;
    run(RID, 6'b000000, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
