// tb_workloads: the three multimedia MPSoC configurations run on the fabric
// at its default size (six processor slots per framework):
//   JPEG encoder  6 application processors + MONITOR
//   MP3           5 application processors + MONITOR
//   JPEG decoder  5 application processors + MONITOR
// The benchmark programs themselves are not available, so each application
// processor runs a random 16-block program with the same instrumentation
// (checkpoints, interrupts, system calls with iCUFFE) from tb_prog_pkg. For
// a 5-processor system the sixth slot is masked off through the active
// inputs and stays silent. Each configuration runs from reset on both
// frameworks and must end in done with no error, every checkpoint checked,
// and (iCUFFS) iCHK probing while the programs ran.
module tb_workloads;
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

  // the link-fault input is unused here
  always_comb for (int j = 0; j < N; j++) i_link_flip[j] = '0;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic setup();
    go = 0; t_run = 0; i_run = 0; rst_n = 0;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [3];
    int    napp  [3];
    names = '{"JPEG encoder", "MP3", "JPEG decoder"};
    napp  = '{6, 5, 5};
    for (int j = 0; j < N; j++) begin t_cp_kind[j] = CP_TCUFFB; i_cp_kind[j] = CP_ICUFFB; end
    for (int w = 0; w < 3; w++) begin
      int tt, ti, cyc;
      tt = 0; ti = 0; cyc = 0;
      setup();
      t_active = '0; i_active = '0;
      for (int p = 0; p < N; p++)
        if (p < napp[w]) begin
          t_active[p] = 1'b1; i_active[p] = 1'b1;
          tt += t_ns[p]; ti += i_ns[p];
        end else begin
          t_ns[p] = 0; i_ns[p] = 0;
        end
      start();
      while (!(t_halted && i_halted) && cyc < 20000) begin @(negedge clk); cyc++; end
      chk(t_halted && i_halted, {names[w], ": both MONITORs halted"});
      chk(t_done && !t_error && t_irq == 0, {names[w], ": tCUFFS done, no error"});
      chk(i_done && !i_error && i_irq == 0, {names[w], ": iCUFFS done, no error"});
      chk(t_msgs == tt, $sformatf("%s: tCUFFS checked %0d of %0d", names[w], t_msgs, tt));
      chk(i_msgs == ti, $sformatf("%s: iCUFFS checked %0d of %0d", names[w], i_msgs, ti));
      chk(i_probes > 0, {names[w], ": iCHK probed"});
      chk((t_fin & t_active) == t_active && (i_fin & i_active) == i_active,
          {names[w], ": every active processor finished"});
      $display("%s: %0d app processors, %0d + %0d checkpoints, %0d cycles, %0d probes",
               names[w], napp[w], t_msgs, i_msgs, cyc, i_probes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
