// tb_tcuffs_monitor: the tCUFFS MONITOR with three processors whose FIFOs are
// modelled by the testbench. Each processor runs an 8-block program in which
// block b may go to b+1 or b+2 and takes between b+5 and b+15 cycles.
// Checks: a legal run ends in done/halted with every message checked; the
// loop visits FIFO 0 every N_APP+2 cycles; a timing error and a control-flow
// error stop the loop, raise abort and name the processor in irq; an inactive
// processor counts as done; done waits for the last processor when one
// takes a shorter path.
module tb_tcuffs_monitor;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 3, L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, cfg_we = 0;
  logic [N-1:0] active = '1, fifo_empty, fifo_pop, tie, cfe, irq;
  cp_msg_t fifo_rdata [N];
  pid_t cfg_pid = '0;
  bid_t cfg_bid = '0;
  bb_entry_t cfg_entry = '0;
  logic error, done, abort, halted;
  logic [31:0] msgs_checked;
  cp_msg_t q [N][$];
  int pops0 [$];
  int cyc = 0;

  tcuffs_monitor #(.N_APP(N), .DEPTH(64), .KEY(TB_KEY)) dut (
    .clk, .rst_n, .run, .active, .fifo_empty, .fifo_rdata, .fifo_pop,
    .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .tcuffs_tie (tie), .tcuffs_cfe (cfe), .irq, .error, .done, .abort, .halted,
    .msgs_checked);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int j = 0; j < N; j++) begin
      fifo_empty[j] = (q[j].size() == 0);
      fifo_rdata[j] = (q[j].size() != 0) ? q[j][0] : '0;
    end
  always @(posedge clk)
    for (int j = 0; j < N; j++)
      if (fifo_pop[j]) begin
        void'(q[j].pop_front());
        if (j == 0) pops0.push_back(cyc);
      end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic restart();
    run = 0; rst_n = 0;
    for (int j = 0; j < N; j++) q[j].delete();
    pops0.delete();
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < N; p++)
      for (int b = 0; b < L; b++) begin
        @(negedge clk);
        cfg_we = 1; cfg_pid = pid_t'(p); cfg_bid = bid_t'(b);
        cfg_entry = mk_entry(b == 0, b == L - 1, (b + 1 < L) ? b + 1 : -1,
                             (b + 2 < L) ? b + 2 : -1, b + 5, b + 15);
      end
    @(negedge clk); cfg_we = 0;
  endtask

  // queue the path 0,1,...,L-1 for processor p; block `bad` takes `badt`
  task automatic load_path(int p, int bad = -1, int badt = 0, int skip_to = -1);
    int cc = 100;
    for (int b = 0; b < L; b++) begin
      int bb;
      bb = (b == 3 && skip_to >= 0) ? skip_to : b;
      q[p].push_back('{kind: CP_TCUFFB, esid: mk_esid(p, bb), count: cnt_t'(cc), ecs: '0});
      cc += (b == bad) ? badt : b + 10;
    end
  endtask

  // processor p takes the short legal path 0,2,4,6,7 (five checkpoints)
  task automatic load_short(int p);
    int cc = 100;
    int path [5] = '{0, 2, 4, 6, 7};
    foreach (path[i]) begin
      q[p].push_back('{kind: CP_TCUFFB, esid: mk_esid(p, path[i]), count: cnt_t'(cc), ecs: '0});
      cc += path[i] + 10;
    end
  endtask

  task automatic wait_halt(int maxc);
    int c = 0;
    while (!halted && c < maxc) begin @(negedge clk); c++; end
    chk(halted, "halted");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // legal run on all three processors
    restart();
    for (int p = 0; p < N; p++) load_path(p);
    @(negedge clk) run = 1;
    wait_halt(1000);
    chk(done && !error && !abort && irq == 0, "legal run done");
    chk(msgs_checked == N * L, $sformatf("messages checked %0d", msgs_checked));
    chk(pops0.size() == L, "all of FIFO 0 read");
    for (int i = 1; i < pops0.size(); i++)
      chk(pops0[i] - pops0[i-1] == N + 2, $sformatf("loop period %0d", pops0[i] - pops0[i-1]));

    // processor 1: block 4 runs 40 cycles (Tmax 19)
    restart();
    for (int p = 0; p < N; p++) load_path(p, (p == 1) ? 4 : -1, 40);
    @(negedge clk) run = 1;
    wait_halt(1000);
    chk(error && abort && !done && irq == 3'b010 && tie == 3'b010 && cfe == 0, "timing error");
    repeat (20) @(negedge clk);
    chk(q[0].size() == 2 && q[2].size() == 2, "loop stopped after the error");

    // processor 2: block 0 -> 1 -> 2 -> 6 (not a successor of 2)
    restart();
    for (int p = 0; p < N; p++) load_path(p, -1, 0, (p == 2) ? 6 : -1);
    @(negedge clk) run = 1;
    wait_halt(1000);
    chk(error && cfe == 3'b100 && irq == 3'b100, "control-flow error");

    // processor 0 finishes early: done must wait for the last processor
    restart();
    load_short(0); load_path(1); load_path(2);
    @(negedge clk) run = 1;
    wait_halt(1000);
    chk(done && !error, "short path legal");
    chk(msgs_checked == 5 + 2 * L, $sformatf("done after the last processor, %0d checked", msgs_checked));
    chk(q[1].size() == 0 && q[2].size() == 0, "all FIFOs drained before done");

    // processor 2 inactive and silent
    restart();
    active = 3'b011;
    load_path(0); load_path(1);
    @(negedge clk) run = 1;
    wait_halt(1000);
    chk(done && !error, "inactive processor counts as done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
