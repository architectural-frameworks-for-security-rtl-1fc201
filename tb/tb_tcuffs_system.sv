// tb_tcuffs_system: the tCUFFS framework with three processors (64-entry
// tables, one-word FIFOs so that stalls are frequent) running random
// instrumented programs through app_proc_model.
// Scenarios from reset: a legal run (done, every checkpoint checked, FIFO
// stalls and interrupt deduction seen), a block that overruns its Tmax by
// 300 cycles (TIE, abort, processor named in irq) and a jump into code with
// a forged SID (CFE), and a legal run with a 300-cycle interrupt handler
// inside one block, which must not count as a timing error.
module tb_tcuffs_system;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;
  import tb_prog_pkg::*;

  localparam int N = 3, NB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, cfg_we = 0, go = 0;
  logic [N-1:0] active = '1, retire, in_isr, cp_valid, stall, tie, cfe, irq, fifo_full, fin;
  cp_kind_e cp_kind [N];
  sid_t     cp_esid [N];
  pid_t cfg_pid = '0; bid_t cfg_bid = '0; bb_entry_t cfg_entry = '0;
  logic error, done, abort, halted;
  logic [31:0] msgs;
  bb_entry_t tab [N][MAXB];
  trace_t    tr [N];
  int        ns [N], ne [N], stc [N], isc [N];
  int        m_stall = 0, m_isr = 0;

  tcuffs_system #(.N_APP(N), .DEPTH(64), .FIFO_DEPTH(1), .KEY(TB_KEY)) dut (
    .clk, .rst_n, .run, .active, .retire, .in_isr, .cp_valid, .cp_kind, .cp_esid, .stall,
    .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .tcuffs_tie (tie), .tcuffs_cfe (cfe), .irq, .error, .done, .abort, .halted,
    .msgs_checked (msgs), .fifo_full);

  for (genvar g = 0; g < N; g++) begin : g_p
    app_proc_model #(.TL(TL)) u_p (
      .clk, .go, .abort, .trace (tr[g]), .n_steps (ns[g]), .stall (stall[g]),
      .retire (retire[g]), .in_isr (in_isr[g]), .cp_valid (cp_valid[g]),
      .cp_kind (cp_kind[g]), .cp_esid (cp_esid[g]), .finished (fin[g]),
      .stall_cycles (stc[g]), .isr_cycles (isc[g]));
  end

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic setup();
    go = 0; run = 0; rst_n = 0;
    for (int p = 0; p < N; p++) begin
      gen(p, NB, 1'b0);
      for (int b = 0; b < MAXB; b++) tab[p][b] = g_tab[b];
      for (int k = 0; k < TL; k++) tr[p][k] = g_tr[k];
      ns[p] = g_ns; ne[p] = g_ne;
    end
  endtask

  task automatic start_and_wait();
    int c = 0;
    @(negedge clk); @(negedge clk) rst_n = 1;
    for (int p = 0; p < N; p++)
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        cfg_we = 1; cfg_pid = pid_t'(p); cfg_bid = bid_t'(b); cfg_entry = tab[p][b];
      end
    @(negedge clk);
    cfg_we = 0; run = 1; go = 1;
    while (!halted && c < 50000) begin @(negedge clk); c++; end
    chk(halted, "halted");
    for (int p = 0; p < N; p++) begin m_stall += stc[p]; m_isr += isc[p]; end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    setup(); start_and_wait();
    tot = 0;
    for (int p = 0; p < N; p++) tot += ns[p];
    chk(done && !error && !abort && irq == 0, "legal run");
    chk(msgs == tot, $sformatf("checked %0d of %0d", msgs, tot));
    chk(fin == '1, "all processors finished");

    setup();
    tr[1][3].gap += 300; tr[1][3].isr += 300;
    start_and_wait();
    chk(done && !error && tie == 0, "300-cycle interrupt handler deducted, no TIE");

    setup();
    tr[2][4].idle += 300;
    start_and_wait();
    chk(error && abort && tie == 3'b100 && cfe == 0 && irq == 3'b100, "TIE on processor 2");

    setup();
    tr[0][5].esid = mk_esid(0, 27);
    start_and_wait();
    chk(error && cfe == 3'b001 && tie == 0 && irq == 3'b001, "CFE on processor 0");

    $display("stall cycles %0d, handler cycles %0d", m_stall, m_isr);
    chk(m_stall > 0, "FIFO stalls happened");
    chk(m_isr > 0, "interrupt deduction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
