// tb_tverify_unit: one tVERIFY lane for processor 2 on a four-block program
//   B0 (entry) -> B1;  B1 -> B2 | B3;  B2 -> B1;  B3 (exit)
// with Tmin/Tmax per block. Runs a legal path (times on both limits, which
// are inclusive), then paths with a too short and a too long block, an
// illegal transition, a foreign pId, an unknown block and a wrong first
// block, and checks tie/cfe per step, the sticky flags and done.
module tb_tverify_unit;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, cfg_we = 0;
  cp_msg_t   msg = '0;
  bid_t      cfg_bid = '0;
  bb_entry_t cfg_entry = '0;
  logic tie, cfe, done, tie_now, cfe_now;
  int   cc;

  tverify_unit #(.PID(2), .DEPTH(64), .KEY(TB_KEY)) dut (
    .clk, .rst_n, .step, .msg, .cfg_we, .cfg_bid, .cfg_entry,
    .tie, .cfe, .done, .tie_now, .cfe_now);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic restart();
    rst_n = 0; @(negedge clk); rst_n = 1;
    // Tmin/Tmax: B0 [10,20], B1 [5,8], B2 [30,30], B3 [1,100]
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      cfg_we = 1; cfg_bid = bid_t'(b);
      case (b)
        0: cfg_entry = mk_entry(1, 0, 1, -1, 10, 20);
        1: cfg_entry = mk_entry(0, 0, 2, 3, 5, 8);
        2: cfg_entry = mk_entry(0, 0, 1, -1, 30, 30);
        default: cfg_entry = mk_entry(0, 1, -1, -1, 1, 100);
      endcase
    end
    @(negedge clk); cfg_we = 0;
    cc = 1000;
  endtask

  // report block `bid` of processor `pid` `dt` cycles after the previous one
  task automatic send(int pid, int bid, int dt, logic exp_tie, logic exp_cfe);
    @(negedge clk);
    cc += dt;
    msg = '{kind: CP_TCUFFB, esid: mk_esid(pid, bid), count: cnt_t'(cc), ecs: '0};
    step = 1;
    #1;
    chk(tie_now == exp_tie, $sformatf("tie_now blk %0d dt %0d", bid, dt));
    chk(cfe_now == exp_cfe, $sformatf("cfe_now blk %0d", bid));
    @(negedge clk); step = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // legal run: B0 B1 B2 B1 B3, times at the limits
    restart();
    send(2, 0, 0, 0, 0);
    send(2, 1, 10, 0, 0);   // B0 took 10 = Tmin
    send(2, 2, 8, 0, 0);    // B1 took 8 = Tmax
    send(2, 1, 30, 0, 0);
    chk(!done, "not done before exit");
    send(2, 3, 5, 0, 0);
    chk(done && !tie && !cfe, "legal run done without errors");

    restart();
    send(2, 0, 0, 0, 0);
    send(2, 1, 9, 1, 0);    // B0 too short
    chk(tie && !cfe, "sticky tie");
    send(2, 2, 9, 1, 0);    // B1 too long
    chk(tie, "tie stays");

    restart();
    send(2, 0, 0, 0, 0);
    send(2, 2, 15, 0, 1);   // B0 -> B2 is not an edge
    chk(cfe && !tie && !done, "sticky cfe");

    restart();
    send(2, 0, 0, 0, 0);
    send(3, 1, 15, 0, 1);   // right block, wrong processor
    send(2, 1, 15, 1, 1);   // state moved to the rejected B1: no B1->B1 edge, 15 > Tmax(B1)

    restart();
    send(2, 0, 0, 0, 0);
    send(2, 40, 15, 0, 1);  // unknown block

    restart();
    send(2, 1, 0, 0, 1);    // B1 is not an entry block
    // a forged SID (random encrypted value) is rejected in almost all cases
    restart();
    send(2, 0, 0, 0, 0);
    begin
      int bad = 0;
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        cc += 15;
        msg = '{kind: CP_TCUFFB, esid: sid_t'($urandom), count: cnt_t'(cc), ecs: '0};
        #1;
        if (cfe_now) bad++;
      end
      chk(bad >= 48, "forged SIDs fail control flow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
