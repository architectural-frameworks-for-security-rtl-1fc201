// tb_cuffs_mpsoc_top: end-to-end test of the whole fabric at its default
// size (six application processors per framework, 1024-entry tables).
//
// Every processor gets its own random 16-block program (tb_prog_pkg) and a
// behavioural processor (app_proc_model) replays one walk through it. The
// MONITOR tables are loaded first, then both frameworks run. Five scenarios,
// each from reset:
//   0  legal runs on both sides: both MONITORs end with done, no error;
//   1  tCUFFS: processor 1 spends 300 extra cycles in a block  -> TIE;
//      iCUFFS: processor 2 executes one extra instruction       -> ICE;
//   2  tCUFFS: processor 3 jumps to injected code reporting a forged SID -> CFE;
//      iCUFFS: processor 4 likewise                              -> CFE;
//   3  iCUFFS: processor 5 is hijacked and never reports again   -> TOE;
//   4  iCUFFS: a bit of a message from processor 0 flips on the link -> CSE.
// Each mechanism (FIFO stall, interrupt deduction, system call with iCUFFE,
// iCHK probing, each error kind, abort and done) is counted; one that never
// happens is a failure.
module tb_cuffs_mpsoc_top;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;
  import tb_prog_pkg::*;

  localparam int N = 6, NB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // tCUFFS side
  logic t_run = 0, t_cfg_we = 0;
  logic [N-1:0] t_active = '1, t_retire, t_in_isr, t_cp_valid, t_stall;
  cp_kind_e t_cp_kind [N];
  sid_t     t_cp_esid [N];
  pid_t t_cfg_pid = '0; bid_t t_cfg_bid = '0; bb_entry_t t_cfg_entry = '0;
  logic [N-1:0] t_tie, t_cfe, t_irq, t_fifo_full;
  logic t_error, t_done, t_abort, t_halted;
  logic [31:0] t_msgs;
  // iCUFFS side
  logic i_run = 0, i_cfg_we = 0;
  logic [N-1:0] i_active = '1, i_retire, i_in_isr, i_cp_valid, i_stall;
  cp_kind_e i_cp_kind [N];
  sid_t     i_cp_esid [N];
  logic [MSG_W-1:0] i_link_flip [N];
  pid_t i_cfg_pid = '0; bid_t i_cfg_bid = '0; bb_entry_t i_cfg_entry = '0;
  logic [N-1:0] i_ice, i_cfe, i_toe, i_cse, i_irq, i_fifo_full;
  logic i_error, i_done, i_abort, i_halted;
  logic [31:0] i_msgs, i_probes;

  cuffs_mpsoc_top dut (
    .clk, .rst_n,
    .t_run, .t_active, .t_retire, .t_in_isr, .t_cp_valid, .t_cp_kind, .t_cp_esid, .t_stall,
    .t_cfg_we, .t_cfg_pid, .t_cfg_bid, .t_cfg_entry,
    .t_tcuffs_tie (t_tie), .t_tcuffs_cfe (t_cfe), .t_irq, .t_error, .t_done, .t_abort,
    .t_halted, .t_msgs_checked (t_msgs), .t_fifo_full,
    .i_run, .i_active, .i_retire, .i_in_isr, .i_cp_valid, .i_cp_kind, .i_cp_esid, .i_stall,
    .i_link_flip, .i_cfg_we, .i_cfg_pid, .i_cfg_bid, .i_cfg_entry,
    .i_icuffs_ice (i_ice), .i_icuffs_cfe (i_cfe), .i_icuffs_toe (i_toe),
    .i_icuffs_cse (i_cse), .i_probes, .i_irq, .i_error, .i_done, .i_abort, .i_halted,
    .i_msgs_checked (i_msgs), .i_fifo_full);

  always #5 clk = ~clk;

  // programs and processors
  bb_entry_t t_tab [N][MAXB], i_tab [N][MAXB];
  trace_t    t_tr [N], i_tr [N];
  int        t_ns [N], i_ns [N], i_ne [N];
  logic      go = 0;
  logic [N-1:0] t_fin, i_fin;
  int        t_stc [N], t_isc [N], i_stc [N], i_isc [N];

  for (genvar g = 0; g < N; g++) begin : g_p
    app_proc_model #(.TL(TL)) u_t (
      .clk, .go, .abort (t_abort), .trace (t_tr[g]), .n_steps (t_ns[g]), .stall (t_stall[g]),
      .retire (t_retire[g]), .in_isr (t_in_isr[g]), .cp_valid (t_cp_valid[g]),
      .cp_kind (t_cp_kind[g]), .cp_esid (t_cp_esid[g]), .finished (t_fin[g]),
      .stall_cycles (t_stc[g]), .isr_cycles (t_isc[g]));
    app_proc_model #(.TL(TL)) u_i (
      .clk, .go, .abort (i_abort), .trace (i_tr[g]), .n_steps (i_ns[g]), .stall (i_stall[g]),
      .retire (i_retire[g]), .in_isr (i_in_isr[g]), .cp_valid (i_cp_valid[g]),
      .cp_kind (i_cp_kind[g]), .cp_esid (i_cp_esid[g]), .finished (i_fin[g]),
      .stall_cycles (i_stc[g]), .isr_cycles (i_isc[g]));
  end

  // mechanism counters
  int m_t_stall = 0, m_i_stall = 0, m_isr = 0, m_syscall = 0, m_probe = 0;
  int m_tie = 0, m_tcfe = 0, m_ice = 0, m_icfe = 0, m_toe = 0, m_cse = 0;
  int m_tdone = 0, m_idone = 0, m_abort = 0;

  // one-shot link fault: flip count bit 0 of the k-th accepted checkpoint of processor fp
  int flip_proc = -1, flip_at = 0, flip_seen = 0;
  always_comb
    for (int j = 0; j < N; j++)
      i_link_flip[j] = (j == flip_proc && i_cp_valid[j] && !i_stall[j] && flip_seen == flip_at)
                       ? MSG_W'(1 << CS_W) : '0;
  always @(posedge clk)
    if (flip_proc >= 0 && i_cp_valid[flip_proc] && !i_stall[flip_proc]) flip_seen <= flip_seen + 1;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic setup();
    go = 0; t_run = 0; i_run = 0; rst_n = 0; flip_proc = -1; flip_seen = 0;
    for (int p = 0; p < N; p++) begin
      gen(p, NB, 1'b0);
      for (int b = 0; b < MAXB; b++) t_tab[p][b] = g_tab[b];
      for (int k = 0; k < TL; k++) t_tr[p][k] = g_tr[k];
      t_ns[p] = g_ns;
      gen(p, NB, 1'b1);
      for (int b = 0; b < MAXB; b++) i_tab[p][b] = g_tab[b];
      for (int k = 0; k < TL; k++) i_tr[p][k] = g_tr[k];
      i_ns[p] = g_ns; i_ne[p] = g_ne;
    end
  endtask

  task automatic start();
    @(negedge clk); @(negedge clk) rst_n = 1;
    for (int p = 0; p < N; p++)
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        t_cfg_we = 1; t_cfg_pid = pid_t'(p); t_cfg_bid = bid_t'(b); t_cfg_entry = t_tab[p][b];
        i_cfg_we = 1; i_cfg_pid = pid_t'(p); i_cfg_bid = bid_t'(b); i_cfg_entry = i_tab[p][b];
      end
    @(negedge clk);
    t_cfg_we = 0; i_cfg_we = 0;
    t_run = 1; i_run = 1; go = 1;
  endtask

  task automatic finish_run();
    int c = 0;
    while (!(t_halted && i_halted) && c < 20000) begin @(negedge clk); c++; end
    chk(t_halted && i_halted, "both MONITORs halted");
    for (int p = 0; p < N; p++) begin
      m_t_stall += t_stc[p]; m_i_stall += i_stc[p];
      m_isr += t_isc[p] + i_isc[p];
    end
    m_probe += i_probes;
    m_tie += $countones(t_tie);  m_tcfe += $countones(t_cfe);
    m_ice += $countones(i_ice);  m_icfe += $countones(i_cfe);
    m_toe += $countones(i_toe);  m_cse  += $countones(i_cse);
    m_tdone += t_done; m_idone += i_done; m_abort += t_abort + i_abort;
    for (int p = 0; p < N; p++) m_syscall += i_ne[p];
  endtask

  // index of a step whose previous checkpoint is an iCUFFB (so its count is checked)
  function automatic int b_after_b(int p, int from);
    for (int s = from; s < i_ns[p]; s++)
      if (i_tr[p][s-1].kind == CP_ICUFFB && i_tr[p][s].kind == CP_ICUFFB) return s;
    return from;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int j = 0; j < N; j++) begin t_cp_kind[j] = CP_TCUFFB; i_cp_kind[j] = CP_ICUFFB; end
    // 0: legal
    setup(); start(); finish_run();
    chk(t_done && !t_error && i_done && !i_error, "legal runs complete");
    begin
      int tot = 0;
      for (int p = 0; p < N; p++) tot += t_ns[p];
      chk(t_msgs == tot, $sformatf("tCUFFS checked %0d of %0d", t_msgs, tot));
      tot = 0;
      for (int p = 0; p < N; p++) tot += i_ns[p];
      chk(i_msgs == tot, $sformatf("iCUFFS checked %0d of %0d", i_msgs, tot));
    end
    // 1: timing error / instruction-count error
    setup();
    t_tr[1][5].idle += 300;
    s = b_after_b(2, 3); i_tr[2][s].gap += 1;
    start(); finish_run();
    chk(t_error && t_tie == 6'b000010 && t_cfe == 0 && t_irq == 6'b000010, "TIE on processor 1");
    chk(i_error && i_ice == 6'b000100 && i_cfe == 0 && i_toe == 0 && i_irq == 6'b000100,
        "ICE on processor 2");
    // 2: injected code with a forged SID
    setup();
    t_tr[3][6].esid = mk_esid(3, 29);
    i_tr[4][6].esid = 16'h1B7E;
    start(); finish_run();
    chk(t_error && t_cfe == 6'b001000 && t_irq == 6'b001000, "tCUFFS CFE on processor 3");
    chk(i_error && i_cfe == 6'b010000 && i_irq == 6'b010000, "iCUFFS CFE on processor 4");
    // 3: hijacked processor stops reporting
    setup();
    s = b_after_b(5, 4);
    i_tr[5][s] = '{is_cp: 1'b0, kind: CP_ICUFFB, esid: '0, gap: 16'd300, isr: 16'd0, idle: 16'd0};
    i_ns[5] = s + 1;
    start(); finish_run();
    chk(t_done && !t_error, "tCUFFS unaffected");
    chk(i_error && i_toe == 6'b100000 && i_ice == 0 && i_cfe == 0 && i_irq == 6'b100000,
        "TOE on processor 5");
    // 4: soft error on the link
    setup();
    flip_proc = 0; flip_at = 4;
    start(); finish_run();
    chk(i_error && i_cse == 6'b000001 && i_irq == 6'b000001 && i_ice == 0, "CSE on processor 0");

    $display("mechanisms: t_stall=%0d i_stall=%0d isr=%0d syscall=%0d probes=%0d tie=%0d tcfe=%0d ice=%0d icfe=%0d toe=%0d cse=%0d tdone=%0d idone=%0d abort=%0d",
             m_t_stall, m_i_stall, m_isr, m_syscall, m_probe, m_tie, m_tcfe, m_ice, m_icfe,
             m_toe, m_cse, m_tdone, m_idone, m_abort);
    chk(m_t_stall > 0, "tCUFFS FIFO stall happened");
    chk(m_i_stall > 0, "iCUFFS FIFO stall happened");
    chk(m_isr > 0, "interrupt deduction happened");
    chk(m_syscall > 0, "system-call blocks (iCUFFE) happened");
    chk(m_probe > 0, "iCHK probing happened");
    chk(m_tie > 0 && m_tcfe > 0, "tCUFFS errors happened");
    chk(m_ice > 0 && m_icfe > 0 && m_toe > 0 && m_cse > 0, "iCUFFS errors happened");
    chk(m_tdone > 0 && m_idone > 0 && m_abort > 0, "done and abort happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
