// tb_icuffs_system: the iCUFFS framework with three processors (64-entry
// tables, checksums on) running random instrumented programs, with system
// calls, through app_proc_model. Scenarios from reset: a legal run, one
// extra instruction in a block (ICE), a jump to code with a forged SID
// (CFE), a hijacked processor that stops reporting (TOE, caught by the
// active iCHK probe) and a bit flip on the link (CSE).
module tb_icuffs_system;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;
  import tb_prog_pkg::*;

  localparam int N = 3, NB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, cfg_we = 0, go = 0;
  logic [N-1:0] active = '1, retire, in_isr, cp_valid, stall, fifo_full, fin;
  logic [N-1:0] ice, cfe, toe, cse, irq;
  cp_kind_e cp_kind [N];
  sid_t     cp_esid [N];
  logic [MSG_W-1:0] link_flip [N];
  pid_t cfg_pid = '0; bid_t cfg_bid = '0; bb_entry_t cfg_entry = '0;
  logic error, done, abort, halted;
  logic [31:0] msgs, probes;
  bb_entry_t tab [N][MAXB];
  trace_t    tr [N];
  int        ns [N], ne [N], stc [N], isc [N];
  int        m_stall = 0, m_isr = 0, m_sys = 0;
  int        flip_proc = -1, flip_seen = 0;

  icuffs_system #(.N_APP(N), .DEPTH(64), .FIFO_DEPTH(2), .CS_EN(1'b1),
                  .SYSCALL_MAX(32'd4096), .KEY(TB_KEY)) dut (
    .clk, .rst_n, .run, .active, .retire, .in_isr, .cp_valid, .cp_kind, .cp_esid, .stall,
    .link_flip, .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .icuffs_ice (ice), .icuffs_cfe (cfe), .icuffs_toe (toe), .icuffs_cse (cse),
    .irq, .error, .done, .abort, .halted, .msgs_checked (msgs), .probes, .fifo_full);

  for (genvar g = 0; g < N; g++) begin : g_p
    app_proc_model #(.TL(TL)) u_p (
      .clk, .go, .abort, .trace (tr[g]), .n_steps (ns[g]), .stall (stall[g]),
      .retire (retire[g]), .in_isr (in_isr[g]), .cp_valid (cp_valid[g]),
      .cp_kind (cp_kind[g]), .cp_esid (cp_esid[g]), .finished (fin[g]),
      .stall_cycles (stc[g]), .isr_cycles (isc[g]));
  end

  always #5 clk = ~clk;

  // flip bit 0 of the count of the 3rd accepted checkpoint of flip_proc
  always_comb
    for (int j = 0; j < N; j++)
      link_flip[j] = (j == flip_proc && cp_valid[j] && !stall[j] && flip_seen == 3)
                     ? MSG_W'(1 << CS_W) : '0;
  always @(posedge clk)
    if (flip_proc >= 0 && cp_valid[flip_proc] && !stall[flip_proc]) flip_seen <= flip_seen + 1;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic setup();
    go = 0; run = 0; rst_n = 0; flip_proc = -1; flip_seen = 0;
    for (int p = 0; p < N; p++) begin
      gen(p, NB, 1'b1);
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
    for (int p = 0; p < N; p++) begin m_stall += stc[p]; m_isr += isc[p]; m_sys += ne[p]; end
  endtask

  function automatic int b_after_b(int p, int from);
    for (int s = from; s < ns[p]; s++)
      if (tr[p][s-1].kind == CP_ICUFFB && tr[p][s].kind == CP_ICUFFB) return s;
    return from;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot, s;
    setup(); start_and_wait();
    tot = 0;
    for (int p = 0; p < N; p++) tot += ns[p];
    chk(done && !error && irq == 0, "legal run");
    chk(msgs == tot, $sformatf("checked %0d of %0d", msgs, tot));
    chk(probes > 0, "iCHK probed");

    setup();
    s = b_after_b(1, 3); tr[1][s].gap += 1;
    start_and_wait();
    chk(error && ice == 3'b010 && cfe == 0 && toe == 0 && irq == 3'b010, "ICE on processor 1");

    setup();
    tr[2][5].esid = 16'h7E11;
    start_and_wait();
    chk(error && cfe == 3'b100 && irq == 3'b100, "CFE on processor 2");

    setup();
    s = b_after_b(0, 4);
    tr[0][s] = '{is_cp: 1'b0, kind: CP_ICUFFB, esid: '0, gap: 16'd300, isr: 16'd0, idle: 16'd0};
    ns[0] = s + 1;
    start_and_wait();
    chk(error && toe == 3'b001 && ice == 0 && cfe == 0 && irq == 3'b001, "TOE on processor 0");

    setup();
    flip_proc = 2;
    start_and_wait();
    chk(error && cse == 3'b100 && ice == 0 && cfe == 0 && irq == 3'b100, "CSE on processor 2");

    $display("stall cycles %0d, handler instructions %0d, system calls %0d", m_stall, m_isr, m_sys);
    chk(m_stall > 0 && m_isr > 0 && m_sys > 0, "stalls, interrupts and system calls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
