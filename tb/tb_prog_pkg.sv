// tb_prog_pkg: generates instrumented test programs for the system and top
// testbenches.
//
// A program of nblk basic blocks: block b has len[b] instructions counting its
// leading checkpoint (3..10), falls through to b+1 and, for some blocks, may
// also branch back to an earlier block (a loop). The last block is the exit.
// With syscalls set (iCUFFS), every block with b % 5 == 2 ends in a system
// call: iCUFFE after its body, then 20..40 uncounted system-call
// instructions. gen() leaves in g_tab the MONITOR table of the program and in
// g_tr/g_ns a trace
// of one random walk from block 0 to the exit, as step_t records for
// app_proc_model, with random idle cycles and interrupt-handler
// instructions sprinkled in.
//
// Table limits: iCUFFS count = len[b]; tCUFFS Tmin = len[b],
// Tmax = len[b] + IDLE_MAX + STALL_MARGIN (idle cycles and FIFO stalls lengthen
// a block, interrupt cycles are deducted).
package tb_prog_pkg;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  localparam int MAXB = 32, IDLE_MAX = 3, STALL_MARGIN = 64, TL = 256;

  typedef step_t trace_t [TL];

  // gen() leaves its result here; callers copy it out with a plain loop
  bb_entry_t g_tab [MAXB];
  step_t     g_tr  [TL];
  int        g_ns, g_ne;

  function automatic void gen(input int p, input int nblk, input bit icuffs);
    int len [MAXB];
    int back [MAXB];
    int cur, nxt, iters, n_steps, n_e;
    cp_kind_e kb;
    kb = icuffs ? CP_ICUFFB : CP_TCUFFB;
    for (int b = 0; b < MAXB; b++) begin
      len[b]  = $urandom_range(3, 10);
      back[b] = (b >= 2 && b < nblk - 1 && $urandom_range(0, 2) == 0) ?
                $urandom_range(0, b - 1) : -1;
      g_tab[b]  = mk_entry(b == 0, b == nblk - 1, (b < nblk - 1) ? b + 1 : -1, back[b],
                         len[b], icuffs ? 0 : len[b] + IDLE_MAX + STALL_MARGIN);
    end
    for (int i = 0; i < TL; i++) g_tr[i] = '0;
    n_steps = 0; n_e = 0; iters = 0;
    g_tr[0] = '{is_cp: 1'b1, kind: kb, esid: mk_esid(p, 0), gap: 16'd0, isr: 16'd0, idle: 16'd0};
    n_steps = 1;
    cur = 0;
    while (cur != nblk - 1 && n_steps < TL - 2) begin
      int isr;
      isr = ($urandom_range(0, 4) == 0) ? $urandom_range(1, 5) : 0;
      if (back[cur] >= 0 && iters < 12 && $urandom_range(0, 2) == 0) begin
        nxt = back[cur]; iters++;
      end else nxt = cur + 1;
      if (icuffs && cur % 5 == 2) begin
        g_tr[n_steps++] = '{is_cp: 1'b1, kind: CP_ICUFFE, esid: mk_esid(p, cur),
                          gap: 16'(len[cur] - 1 + isr), isr: 16'(isr), idle: 16'(0)};
        n_e++;
        g_tr[n_steps++] = '{is_cp: 1'b1, kind: kb, esid: mk_esid(p, nxt),
                          gap: 16'($urandom_range(20, 40)), isr: 16'd0, idle: 16'd1};
      end else begin
        g_tr[n_steps++] = '{is_cp: 1'b1, kind: kb, esid: mk_esid(p, nxt),
                          gap: 16'(len[cur] - 1 + isr), isr: 16'(isr),
                          idle: 16'($urandom_range(0, IDLE_MAX))};
      end
      cur = nxt;
    end
    g_ns = n_steps;
    g_ne = n_e;
  endfunction

endpackage
