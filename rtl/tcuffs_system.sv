// tcuffs_system: the tCUFFS framework of an MPSoC with N_APP application
// processors and one MONITOR.
//
// Each application processor has a checkpoint port (cuff_port in cycle-count
// mode) that turns every executed tCUFFB into a {kind, encrypted SID, CC}
// word and writes it into its own FIFO (sync_fifo). The tCUFFS MONITOR polls
// the FIFOs, runs tVERIFY and aborts all processors on a timing or
// control-flow error. The processors themselves are outside this module: their
// retire, interrupt and checkpoint signals come in on ports, and stall tells a
// processor to hold its checkpoint instruction while its FIFO is full.
module tcuffs_system
  import cuffs_pkg::*;
#(
  parameter int          N_APP      = 6,
  parameter int          DEPTH      = 1024,
  parameter int          FIFO_DEPTH = 4,
  parameter logic [31:0] KEY        = 32'h5A3C_96E1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [N_APP-1:0] active,
  // application processors
  input  logic [N_APP-1:0] retire,
  input  logic [N_APP-1:0] in_isr,
  input  logic [N_APP-1:0] cp_valid,
  input  cp_kind_e         cp_kind [N_APP],
  input  sid_t             cp_esid [N_APP],
  output logic [N_APP-1:0] stall,
  // table loading
  input  logic             cfg_we,
  input  pid_t             cfg_pid,
  input  bid_t             cfg_bid,
  input  bb_entry_t        cfg_entry,
  // status
  output logic [N_APP-1:0] tcuffs_tie,
  output logic [N_APP-1:0] tcuffs_cfe,
  output logic [N_APP-1:0] irq,
  output logic             error,
  output logic             done,
  output logic             abort,
  output logic             halted,
  output logic [31:0]      msgs_checked,
  output logic [N_APP-1:0] fifo_full
);

  logic [N_APP-1:0] push, pop, empty;
  cp_msg_t          wdata [N_APP], rdata [N_APP];

  for (genvar g = 0; g < N_APP; g++) begin : g_app
    logic       ack_unused;
    cnt_t       cnt_unused;
    logic [MSG_W-1:0] rd;
    logic [$clog2(FIFO_DEPTH+1)-1:0] lvl_unused;

    cuff_port #(.MODE_INSN(1'b0), .CS_EN(1'b0), .KEY(KEY)) u_port (
      .clk, .rst_n,
      .retire (retire[g]), .in_isr (in_isr[g]),
      .cp_valid (cp_valid[g]), .cp_kind (cp_kind[g]), .cp_esid (cp_esid[g]),
      .stall (stall[g]),
      .fifo_push (push[g]), .fifo_wdata (wdata[g]), .fifo_full (fifo_full[g]),
      .probe_req (1'b0), .probe_ack (ack_unused), .probe_count (cnt_unused)
    );

    sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (push[g]), .wdata (wdata[g]),
      .pop (pop[g]), .rdata (rd),
      .full (fifo_full[g]), .empty (empty[g]), .level (lvl_unused)
    );
    assign rdata[g] = cp_msg_t'(rd);
  end

  tcuffs_monitor #(.N_APP(N_APP), .DEPTH(DEPTH), .KEY(KEY)) u_mon (
    .clk, .rst_n, .run, .active,
    .fifo_empty (empty), .fifo_rdata (rdata), .fifo_pop (pop),
    .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .tcuffs_tie, .tcuffs_cfe, .irq, .error, .done, .abort, .halted, .msgs_checked
  );

endmodule
