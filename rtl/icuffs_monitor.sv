// icuffs_monitor: the custom hardware of the iCUFFS MONITOR processor.
//
// Same loop as tCUFFS with the iCUFFS instructions: visit every FIFO and read
// the non-empty ones, execute iVERIFY (N_APP identical lanes checking
// instruction count, control flow and, when CS_EN is set, the encrypted
// checksum), then execute iCHK, which probes all application processors for
// their instruction count and catches one that has skipped a checkpoint.
// The sequencer that stands in for the MONITOR's core does:
//   READ   N_APP cycles, cycle j pops FIFO j when it is not empty;
//   VERIFY one cycle, every lane holding a message steps;
//   CHK    iCHK: start, probe, evaluate (3 cycles);
//   TEST   one cycle, stop if error or done.
// One loop takes N_APP + 5 cycles. error is the OR of icuffs_ice, icuffs_cfe,
// icuffs_toe and icuffs_cse over the active processors and drives abort; irq
// names the offending processors; done means every active processor has
// reached its exit block.
//
// Tables are loaded through cfg_* while run is low.
module icuffs_monitor
  import cuffs_pkg::*;
#(
  parameter int          N_APP       = 6,
  parameter int          DEPTH       = 1024,
  parameter bit          CS_EN       = 1'b1,
  parameter cnt_t        SYSCALL_MAX = 32'd4096,
  parameter logic [31:0] KEY         = 32'h5A3C_96E1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [N_APP-1:0] active,
  input  logic [N_APP-1:0] fifo_empty,
  input  cp_msg_t          fifo_rdata [N_APP],
  output logic [N_APP-1:0] fifo_pop,
  input  logic             cfg_we,
  input  pid_t             cfg_pid,
  input  bid_t             cfg_bid,
  input  bb_entry_t        cfg_entry,
  // CHK_IC probe path
  output logic             probe_req,
  input  logic [N_APP-1:0] probe_ack,
  input  cnt_t             probe_count [N_APP],
  // status
  output logic [N_APP-1:0] icuffs_ice,
  output logic [N_APP-1:0] icuffs_cfe,
  output logic [N_APP-1:0] icuffs_toe,
  output logic [N_APP-1:0] icuffs_cse,
  output logic [N_APP-1:0] irq,
  output logic             error,
  output logic             done,
  output logic             abort,
  output logic             halted,
  output logic [31:0]      msgs_checked,
  output logic [31:0]      probes
);

  typedef enum logic [2:0] {S_READ, S_VERIFY, S_CHK, S_CHKW, S_TEST, S_HALT} state_e;
  localparam int JW = (N_APP > 1) ? $clog2(N_APP) : 1;

  state_e           st;
  logic [JW-1:0]    j_q;
  cp_msg_t          hold [N_APP];
  logic [N_APP-1:0] hold_v, step, lane_done;
  logic [N_APP-1:0] ice_now, cfe_now, cse_now, toe_now;
  logic [N_APP-1:0] started, prev_was_e;
  cnt_t             prev_ic [N_APP], prev_limit [N_APP];
  logic             chk_start, chk_fin;

  for (genvar g = 0; g < N_APP; g++) begin : g_lane
    iverify_unit #(.PID(g), .DEPTH(DEPTH), .CS_EN(CS_EN), .KEY(KEY)) u_iv (
      .clk, .rst_n,
      .step       (step[g]),
      .msg        (hold[g]),
      .cfg_we     (cfg_we && 32'(cfg_pid) == g),
      .cfg_bid, .cfg_entry,
      .ice        (icuffs_ice[g]),
      .cfe        (icuffs_cfe[g]),
      .cse        (icuffs_cse[g]),
      .done       (lane_done[g]),
      .ice_now    (ice_now[g]),
      .cfe_now    (cfe_now[g]),
      .cse_now    (cse_now[g]),
      .started    (started[g]),
      .prev_was_e (prev_was_e[g]),
      .prev_ic    (prev_ic[g]),
      .prev_limit (prev_limit[g])
    );
  end

  ichk_unit #(.N_APP(N_APP), .SYSCALL_MAX(SYSCALL_MAX)) u_chk (
    .clk, .rst_n,
    .start (chk_start),
    .fin   (chk_fin),
    .active,
    .started, .done (lane_done), .prev_was_e, .prev_ic, .prev_limit,
    .fifo_empty,
    .probe_req, .probe_ack, .probe_count,
    .toe     (icuffs_toe),
    .toe_now (toe_now)
  );

  assign irq       = (icuffs_ice | icuffs_cfe | icuffs_toe | icuffs_cse) & active;
  assign error     = |irq;
  assign done      = &(lane_done | ~active);
  assign abort     = error;
  assign halted    = (st == S_HALT);
  assign step      = (st == S_VERIFY) ? hold_v : '0;
  assign chk_start = (st == S_CHK);

  always_comb begin
    fifo_pop = '0;
    if (st == S_READ && run) fifo_pop[j_q] = !fifo_empty[j_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_READ;
      j_q          <= '0;
      hold_v       <= '0;
      msgs_checked <= '0;
      probes       <= '0;
      for (int k = 0; k < N_APP; k++) hold[k] <= '0;
    end else begin
      case (st)
        S_READ: if (run) begin
          if (!fifo_empty[j_q]) begin
            hold[j_q]   <= fifo_rdata[j_q];
            hold_v[j_q] <= 1'b1;
          end
          if (32'(j_q) == N_APP - 1) begin
            j_q <= '0;
            st  <= S_VERIFY;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        S_VERIFY: begin
          msgs_checked <= msgs_checked + 32'($countones(hold_v));
          hold_v       <= '0;
          st           <= S_CHK;
        end
        S_CHK: begin
          probes <= probes + 1'b1;
          st     <= S_CHKW;
        end
        S_CHKW:  if (chk_fin) st <= S_TEST;
        S_TEST:  st <= (error || done) ? S_HALT : S_READ;
        default: st <= S_HALT;
      endcase
    end
  end

endmodule
