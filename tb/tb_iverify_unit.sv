// tb_iverify_unit: one iVERIFY lane for processor 1 with checksums on, on
//   B0 (entry, 6 insns) -> B1;  B1 (4 insns, ends in a system call) -> B2;
//   B2 (3 insns) -> B0 | B3;  B3 (exit)
// Checks a legal run (including the uncounted system call after iCUFFE), an
// instruction-count mismatch, an iCUFFE naming another block, an illegal
// successor, a corrupted checksum (message dropped, cse set) and the lane
// state handed to iCHK.
module tb_iverify_unit;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, cfg_we = 0;
  cp_msg_t   msg = '0;
  bid_t      cfg_bid = '0;
  bb_entry_t cfg_entry = '0;
  logic ice, cfe, cse, done, ice_now, cfe_now, cse_now, started, prev_was_e;
  cnt_t prev_ic, prev_limit;
  int   ic;

  iverify_unit #(.PID(1), .DEPTH(64), .CS_EN(1'b1), .KEY(TB_KEY)) dut (
    .clk, .rst_n, .step, .msg, .cfg_we, .cfg_bid, .cfg_entry,
    .ice, .cfe, .cse, .done, .ice_now, .cfe_now, .cse_now,
    .started, .prev_was_e, .prev_ic, .prev_limit);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic restart();
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      cfg_we = 1; cfg_bid = bid_t'(b);
      case (b)
        0: cfg_entry = mk_entry(1, 0, 1, -1, 6, 0);
        1: cfg_entry = mk_entry(0, 0, 2, -1, 4, 0);
        2: cfg_entry = mk_entry(0, 0, 0, 3, 3, 0);
        default: cfg_entry = mk_entry(0, 1, -1, -1, 2, 0);
      endcase
    end
    @(negedge clk); cfg_we = 0;
    ic = 500;
  endtask

  task automatic send(cp_kind_e k, int pid, int bid, int dn, logic e_ice, logic e_cfe,
                      logic flip = 0);
    @(negedge clk);
    ic += dn;
    msg.kind  = k;
    msg.esid  = mk_esid(pid, bid);
    msg.count = cnt_t'(ic);
    msg.ecs   = ref_ecs(k, msg.esid, msg.count) ^ {7'b0, flip};
    step = 1;
    #1;
    chk(cse_now == flip, "cse_now");
    chk(ice_now == e_ice, $sformatf("ice_now blk %0d n %0d", bid, dn));
    chk(cfe_now == e_cfe, $sformatf("cfe_now blk %0d", bid));
    @(negedge clk); step = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    restart();
    chk(!started, "not started");
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    chk(started && !prev_was_e && prev_ic == 500 && prev_limit == 6, "state after B0");
    send(CP_ICUFFB, 1, 1, 6, 0, 0);
    send(CP_ICUFFE, 1, 1, 4, 0, 0);      // B1 body up to iCUFFE
    chk(prev_was_e, "prev_was_e after iCUFFE");
    send(CP_ICUFFB, 1, 2, 777, 0, 0);    // system call length not checked
    send(CP_ICUFFB, 1, 0, 3, 0, 0);
    send(CP_ICUFFB, 1, 1, 6, 0, 0);
    send(CP_ICUFFE, 1, 1, 4, 0, 0);
    send(CP_ICUFFB, 1, 2, 20, 0, 0);
    chk(!done, "not done");
    send(CP_ICUFFB, 1, 3, 3, 0, 0);
    chk(done && !ice && !cfe && !cse, "legal run done");

    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 1, 7, 1, 0);      // one instruction too many in B0
    chk(ice && !cfe, "sticky ice");

    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 1, 5, 1, 0);      // one too few
    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 1, 6, 0, 0);
    send(CP_ICUFFE, 1, 2, 4, 0, 1);      // iCUFFE of another block
    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 1, 6, 0, 0);
    send(CP_ICUFFE, 1, 1, 4, 0, 0);
    send(CP_ICUFFE, 1, 1, 4, 0, 1);      // two iCUFFE in a row
    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 3, 6, 0, 1);      // B0 -> B3 not an edge
    restart();
    send(CP_ICUFFE, 1, 0, 0, 0, 1);      // must start with iCUFFB
    restart();
    send(CP_ICUFFB, 1, 0, 0, 0, 0);
    send(CP_ICUFFB, 1, 1, 6, 0, 0, 1);   // checksum corrupted: dropped
    chk(cse && !ice && !cfe && prev_ic == 500, "cse, message dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
