// tcuffs_monitor: the custom hardware of the tCUFFS MONITOR processor.
//
// The MONITOR runs one fixed loop (the monitoring algorithm): visit the FIFO
// of every application processor in turn and read it if it is not empty, then
// execute tVERIFY, which checks all fetched messages at once with N_APP
// identical lanes, and repeat until an error is seen or every processor has
// finished. Here that loop is a small sequencer in place of the MONITOR's
// processor core:
//   READ   N_APP cycles, cycle j pops FIFO j when it is not empty;
//   VERIFY one cycle, every lane holding a message steps;
//   TEST   one cycle, stop if error or done, else start again.
// One loop therefore takes N_APP + 2 cycles and takes at most one message per
// processor. error is the OR of all lanes' tcuffs_tie / tcuffs_cfe flags and
// raises abort to all application processors, irq to the offending ones;
// done is high once every active processor has reached its exit block.
//
// The tables are loaded through cfg_* while run is low. Processors that run no
// program are cleared in active and count as done.
module tcuffs_monitor
  import cuffs_pkg::*;
#(
  parameter int          N_APP = 6,
  parameter int          DEPTH = 1024,
  parameter logic [31:0] KEY   = 32'h5A3C_96E1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [N_APP-1:0] active,
  // FIFO read side, one per application processor
  input  logic [N_APP-1:0] fifo_empty,
  input  cp_msg_t          fifo_rdata [N_APP],
  output logic [N_APP-1:0] fifo_pop,
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
  output logic [31:0]      msgs_checked
);

  typedef enum logic [1:0] {S_READ, S_VERIFY, S_TEST, S_HALT} state_e;
  localparam int JW = (N_APP > 1) ? $clog2(N_APP) : 1;

  state_e           st;
  logic [JW-1:0]    j_q;
  cp_msg_t          hold [N_APP];
  logic [N_APP-1:0] hold_v, step, lane_done, tie_now, cfe_now;

  for (genvar g = 0; g < N_APP; g++) begin : g_lane
    tverify_unit #(.PID(g), .DEPTH(DEPTH), .KEY(KEY)) u_tv (
      .clk, .rst_n,
      .step      (step[g]),
      .msg       (hold[g]),
      .cfg_we    (cfg_we && 32'(cfg_pid) == g),
      .cfg_bid, .cfg_entry,
      .tie       (tcuffs_tie[g]),
      .cfe       (tcuffs_cfe[g]),
      .done      (lane_done[g]),
      .tie_now   (tie_now[g]),
      .cfe_now   (cfe_now[g])
    );
  end

  assign irq    = (tcuffs_tie | tcuffs_cfe) & active;
  assign error  = |irq;
  assign done   = &(lane_done | ~active);
  assign abort  = error;
  assign halted = (st == S_HALT);
  assign step   = (st == S_VERIFY) ? hold_v : '0;

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
          st           <= S_TEST;
        end
        S_TEST:  st <= (error || done) ? S_HALT : S_READ;
        default: st <= S_HALT;
      endcase
    end
  end

endmodule
