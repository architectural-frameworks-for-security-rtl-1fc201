// tb_icuffs_monitor: the iCUFFS MONITOR with three processors, FIFOs and
// instruction counters modelled by the testbench. Each processor runs an
// 8-block program; block b (b+4 instructions) may go to b+1 or b+2, and
// block 2 ends in a system call (iCUFFB ... iCUFFE, then 100 unchecked
// instructions). Checks: a legal run ends in done with every message checked
// and the loop visits FIFO 0 every N_APP+5 cycles; an instruction-count
// error, a processor that stops reporting (caught by iCHK as TOE), and a
// corrupted checksum each stop the loop and name the processor.
module tb_icuffs_monitor;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 3, L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, cfg_we = 0;
  logic [N-1:0] active = '1, fifo_empty, fifo_pop, ice, cfe, toe, cse, irq;
  logic [N-1:0] probe_ack = '0;
  cnt_t probe_count [N];
  logic probe_req;
  cp_msg_t fifo_rdata [N];
  pid_t cfg_pid = '0;
  bid_t cfg_bid = '0;
  bb_entry_t cfg_entry = '0;
  logic error, done, abort, halted;
  logic [31:0] msgs_checked, probes;
  cp_msg_t q [N][$];
  int ic_now [N];
  int pops0 [$];
  int cyc = 0;

  icuffs_monitor #(.N_APP(N), .DEPTH(64), .CS_EN(1'b1), .SYSCALL_MAX(32'd200),
                   .KEY(TB_KEY)) dut (
    .clk, .rst_n, .run, .active, .fifo_empty, .fifo_rdata, .fifo_pop,
    .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .probe_req, .probe_ack, .probe_count,
    .icuffs_ice (ice), .icuffs_cfe (cfe), .icuffs_toe (toe), .icuffs_cse (cse),
    .irq, .error, .done, .abort, .halted, .msgs_checked, .probes);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int j = 0; j < N; j++) begin
      fifo_empty[j] = (q[j].size() == 0);
      fifo_rdata[j] = (q[j].size() != 0) ? q[j][0] : '0;
    end
  always @(posedge clk) begin
    for (int j = 0; j < N; j++)
      if (fifo_pop[j]) begin
        void'(q[j].pop_front());
        if (j == 0) pops0.push_back(cyc);
      end
    probe_ack <= {N{probe_req}};
    if (probe_req) for (int j = 0; j < N; j++) probe_count[j] <= cnt_t'(ic_now[j]);
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic restart();
    run = 0; rst_n = 0;
    for (int j = 0; j < N; j++) begin q[j].delete(); ic_now[j] = 0; probe_count[j] = 0; end
    pops0.delete();
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < N; p++)
      for (int b = 0; b < L; b++) begin
        @(negedge clk);
        cfg_we = 1; cfg_pid = pid_t'(p); cfg_bid = bid_t'(b);
        cfg_entry = mk_entry(b == 0, b == L - 1, (b + 1 < L) ? b + 1 : -1,
                             (b + 2 < L) ? b + 2 : -1, b + 4, 0);
      end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic put(int p, cp_kind_e k, int bid, int ic, logic flip = 0);
    cp_msg_t m;
    m.kind = k; m.esid = mk_esid(p, bid); m.count = cnt_t'(ic);
    m.ecs = ref_ecs(k, m.esid, m.count) ^ {7'b0, flip};
    q[p].push_back(m);
  endtask

  // queue the legal path for processor p; stop after `upto` blocks; add `extra`
  // instructions to block `bad`; corrupt the checksum of block `flipb`
  task automatic load_path(int p, int upto = L, int bad = -1, int flipb = -1);
    int ic = 10;
    for (int b = 0; b < upto; b++) begin
      put(p, CP_ICUFFB, b, ic, b == flipb);
      ic += b + 4 + ((b == bad) ? 1 : 0);
      if (b == 2) begin
        put(p, CP_ICUFFE, 2, ic);
        ic += 100;                     // the system call
      end
    end
    ic_now[p] = (upto == L) ? ic : ic + 40;   // a silent processor keeps running
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
    restart();
    for (int p = 0; p < N; p++) load_path(p);
    @(negedge clk) run = 1;
    wait_halt(2000);
    chk(done && !error && irq == 0, "legal run done");
    chk(msgs_checked == N * (L + 1), $sformatf("messages checked %0d", msgs_checked));
    chk(probes > 0, "iCHK ran");
    for (int i = 1; i < pops0.size(); i++)
      chk(pops0[i] - pops0[i-1] == N + 5, $sformatf("loop period %0d", pops0[i] - pops0[i-1]));

    restart();
    for (int p = 0; p < N; p++) load_path(p, L, (p == 1) ? 5 : -1);
    @(negedge clk) run = 1;
    wait_halt(2000);
    chk(error && ice == 3'b010 && irq == 3'b010 && cfe == 0 && toe == 0, "instruction-count error");

    restart();
    load_path(0, 4); load_path(1); load_path(2);
    @(negedge clk) run = 1;
    wait_halt(2000);
    chk(error && toe == 3'b001 && irq == 3'b001 && ice == 0 && cfe == 0, "missed checkpoint (TOE)");

    restart();
    for (int p = 0; p < N; p++) load_path(p, L, -1, (p == 2) ? 3 : -1);
    @(negedge clk) run = 1;
    wait_halt(2000);
    chk(error && cse == 3'b100 && irq == 3'b100 && ice == 0 && cfe == 0, "checksum error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
