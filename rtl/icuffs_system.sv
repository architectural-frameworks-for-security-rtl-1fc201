// icuffs_system: the iCUFFS framework of an MPSoC with N_APP application
// processors and one MONITOR, including the checksum extension for reliable
// inter-processor communication.
//
// Each application processor has a checkpoint port (cuff_port in
// instruction-count mode, checksum on when CS_EN is set) that writes
// {kind, encrypted SID, IC, encrypted checksum} into its FIFO for every iCUFFB
// and iCUFFE. The iCUFFS MONITOR polls the FIFOs, runs iVERIFY and iCHK, and
// iCHK reads the processors' instruction counts over the CHK_IC probe path
// (probe_req to every port, the count back one cycle later).
//
// link_flip is XORed onto the word written into each FIFO. It is a
// fault-injection input that models a soft error or tampering on the
// processor-to-MONITOR link and must be zero in normal use.
module icuffs_system
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
  input  logic             run,
  input  logic [N_APP-1:0] active,
  input  logic [N_APP-1:0] retire,
  input  logic [N_APP-1:0] in_isr,
  input  logic [N_APP-1:0] cp_valid,
  input  cp_kind_e         cp_kind [N_APP],
  input  sid_t             cp_esid [N_APP],
  output logic [N_APP-1:0] stall,
  input  logic [MSG_W-1:0] link_flip [N_APP],
  input  logic             cfg_we,
  input  pid_t             cfg_pid,
  input  bid_t             cfg_bid,
  input  bb_entry_t        cfg_entry,
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
  output logic [31:0]      probes,
  output logic [N_APP-1:0] fifo_full
);

  logic [N_APP-1:0] push, pop, empty, ack;
  cp_msg_t          wdata [N_APP], rdata [N_APP];
  cnt_t             pcount [N_APP];
  logic             probe_req;

  for (genvar g = 0; g < N_APP; g++) begin : g_app
    logic [MSG_W-1:0] rd;
    logic [$clog2(FIFO_DEPTH+1)-1:0] lvl_unused;

    cuff_port #(.MODE_INSN(1'b1), .CS_EN(CS_EN), .KEY(KEY)) u_port (
      .clk, .rst_n,
      .retire (retire[g]), .in_isr (in_isr[g]),
      .cp_valid (cp_valid[g]), .cp_kind (cp_kind[g]), .cp_esid (cp_esid[g]),
      .stall (stall[g]),
      .fifo_push (push[g]), .fifo_wdata (wdata[g]), .fifo_full (fifo_full[g]),
      .probe_req, .probe_ack (ack[g]), .probe_count (pcount[g])
    );

    sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (push[g]), .wdata (MSG_W'(wdata[g]) ^ link_flip[g]),
      .pop (pop[g]), .rdata (rd),
      .full (fifo_full[g]), .empty (empty[g]), .level (lvl_unused)
    );
    assign rdata[g] = cp_msg_t'(rd);
  end

  icuffs_monitor #(.N_APP(N_APP), .DEPTH(DEPTH), .CS_EN(CS_EN),
                   .SYSCALL_MAX(SYSCALL_MAX), .KEY(KEY)) u_mon (
    .clk, .rst_n, .run, .active,
    .fifo_empty (empty), .fifo_rdata (rdata), .fifo_pop (pop),
    .cfg_we, .cfg_pid, .cfg_bid, .cfg_entry,
    .probe_req, .probe_ack (ack), .probe_count (pcount),
    .icuffs_ice, .icuffs_cfe, .icuffs_toe, .icuffs_cse,
    .irq, .error, .done, .abort, .halted, .msgs_checked, .probes
  );

endmodule
