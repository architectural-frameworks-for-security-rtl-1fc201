// cuffs_mpsoc_top: the MPSoC security fabric with both checkpoint frameworks.
//
// The tCUFFS framework (t_* ports) checks the cycle time and the control flow
// of every basic block; the iCUFFS framework (i_* ports) checks the exact
// instruction count and the control flow, actively probes the processors'
// instruction counters for missed checkpoints, and protects each message with
// an encrypted checksum. The two are alternative protection schemes for the
// same kind of MPSoC, so they stand side by side here, sharing only the clock
// and reset, and each brings out the signals of its own N_APP application
// processors (the processors, vendor cores, are not part of this RTL).
//
// Per processor: retire, in_isr, cp_valid/cp_kind/cp_esid in, stall out.
// Per framework: table loading (cfg_*), run, active mask, and the error,
// abort, irq, done and halted outputs of its MONITOR.
module cuffs_mpsoc_top
  import cuffs_pkg::*;
#(
  parameter int          N_APP       = 6,
  parameter int          DEPTH       = 1024,
  parameter int          FIFO_DEPTH  = 4,
  parameter bit          CS_EN       = 1'b1,
  parameter cnt_t        SYSCALL_MAX = 32'd4096,
  parameter logic [31:0] KEY         = 32'h5A3C_96E1
) (
  input  logic             clk,
  input  logic             rst_n,
  // tCUFFS
  input  logic             t_run,
  input  logic [N_APP-1:0] t_active,
  input  logic [N_APP-1:0] t_retire,
  input  logic [N_APP-1:0] t_in_isr,
  input  logic [N_APP-1:0] t_cp_valid,
  input  cp_kind_e         t_cp_kind [N_APP],
  input  sid_t             t_cp_esid [N_APP],
  output logic [N_APP-1:0] t_stall,
  input  logic             t_cfg_we,
  input  pid_t             t_cfg_pid,
  input  bid_t             t_cfg_bid,
  input  bb_entry_t        t_cfg_entry,
  output logic [N_APP-1:0] t_tcuffs_tie,
  output logic [N_APP-1:0] t_tcuffs_cfe,
  output logic [N_APP-1:0] t_irq,
  output logic             t_error,
  output logic             t_done,
  output logic             t_abort,
  output logic             t_halted,
  output logic [31:0]      t_msgs_checked,
  output logic [N_APP-1:0] t_fifo_full,
  // iCUFFS
  input  logic             i_run,
  input  logic [N_APP-1:0] i_active,
  input  logic [N_APP-1:0] i_retire,
  input  logic [N_APP-1:0] i_in_isr,
  input  logic [N_APP-1:0] i_cp_valid,
  input  cp_kind_e         i_cp_kind [N_APP],
  input  sid_t             i_cp_esid [N_APP],
  output logic [N_APP-1:0] i_stall,
  input  logic [MSG_W-1:0] i_link_flip [N_APP],
  input  logic             i_cfg_we,
  input  pid_t             i_cfg_pid,
  input  bid_t             i_cfg_bid,
  input  bb_entry_t        i_cfg_entry,
  output logic [N_APP-1:0] i_icuffs_ice,
  output logic [N_APP-1:0] i_icuffs_cfe,
  output logic [N_APP-1:0] i_icuffs_toe,
  output logic [N_APP-1:0] i_icuffs_cse,
  output logic [31:0]      i_probes,
  output logic [N_APP-1:0] i_irq,
  output logic             i_error,
  output logic             i_done,
  output logic             i_abort,
  output logic             i_halted,
  output logic [31:0]      i_msgs_checked,
  output logic [N_APP-1:0] i_fifo_full
);

  tcuffs_system #(.N_APP(N_APP), .DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .KEY(KEY)) u_tcuffs (
    .clk, .rst_n,
    .run (t_run), .active (t_active), .retire (t_retire), .in_isr (t_in_isr),
    .cp_valid (t_cp_valid), .cp_kind (t_cp_kind), .cp_esid (t_cp_esid), .stall (t_stall),
    .cfg_we (t_cfg_we), .cfg_pid (t_cfg_pid), .cfg_bid (t_cfg_bid), .cfg_entry (t_cfg_entry),
    .tcuffs_tie (t_tcuffs_tie), .tcuffs_cfe (t_tcuffs_cfe), .irq (t_irq),
    .error (t_error), .done (t_done), .abort (t_abort), .halted (t_halted),
    .msgs_checked (t_msgs_checked), .fifo_full (t_fifo_full)
  );

  icuffs_system #(.N_APP(N_APP), .DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .CS_EN(CS_EN),
                  .SYSCALL_MAX(SYSCALL_MAX), .KEY(KEY)) u_icuffs (
    .clk, .rst_n,
    .run (i_run), .active (i_active), .retire (i_retire), .in_isr (i_in_isr),
    .cp_valid (i_cp_valid), .cp_kind (i_cp_kind), .cp_esid (i_cp_esid), .stall (i_stall),
    .link_flip (i_link_flip),
    .cfg_we (i_cfg_we), .cfg_pid (i_cfg_pid), .cfg_bid (i_cfg_bid), .cfg_entry (i_cfg_entry),
    .icuffs_ice (i_icuffs_ice), .icuffs_cfe (i_icuffs_cfe), .icuffs_toe (i_icuffs_toe),
    .icuffs_cse (i_icuffs_cse), .irq (i_irq),
    .error (i_error), .done (i_done), .abort (i_abort), .halted (i_halted),
    .msgs_checked (i_msgs_checked), .probes (i_probes), .fifo_full (i_fifo_full)
  );

endmodule
